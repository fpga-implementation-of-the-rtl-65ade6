// serial_rx: serial-port (RS-232, 8N1) receiver for the training patterns.
//
// The line idles high. A falling edge starts a frame; the line is sampled in
// the middle of the start bit, of the eight data bits (LSB first) and of the
// stop bit. byte_valid pulses for one clock with the byte once the stop bit
// has been sampled high; a low stop bit pulses frame_err instead and the
// byte is dropped. CLKS_PER_BIT is the clock-to-baud ratio; the default
// corresponds to 115200 baud at a 72.72 MHz system clock. The input is
// passed through two flip-flops before use. Frame format and baud rate are
// this design's choice.
module serial_rx #(
  parameter int CLKS_PER_BIT = 631
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_err
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} st_t;
  st_t           st;
  logic [1:0]    sync;
  logic [CW-1:0] ccnt;
  logic [2:0]    bidx;
  logic [7:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; st <= R_IDLE; ccnt <= '0; bidx <= '0; sh <= '0;
      byte_valid <= 1'b0; byte_data <= '0; frame_err <= 1'b0;
    end else begin
      sync       <= {sync[0], rx};
      byte_valid <= 1'b0;
      frame_err  <= 1'b0;
      unique case (st)
        R_IDLE: begin
          ccnt <= '0;
          if (!sync[1]) st <= R_START;
        end
        R_START: begin
          if (int'(ccnt) == CLKS_PER_BIT / 2 - 1) begin
            ccnt <= '0;
            if (sync[1]) st <= R_IDLE;      // glitch, not a start bit
            else begin
              bidx <= '0;
              st   <= R_DATA;
            end
          end else ccnt <= ccnt + 1'b1;
        end
        R_DATA: begin
          if (int'(ccnt) == CLKS_PER_BIT - 1) begin
            ccnt <= '0;
            sh   <= {sync[1], sh[7:1]};
            if (bidx == 3'd7) st <= R_STOP;
            bidx <= bidx + 1'b1;
          end else ccnt <= ccnt + 1'b1;
        end
        R_STOP: begin
          if (int'(ccnt) == CLKS_PER_BIT - 1) begin
            ccnt <= '0;
            st   <= R_IDLE;
            if (sync[1]) begin
              byte_valid <= 1'b1;
              byte_data  <= sh;
            end else frame_err <= 1'b1;
          end else ccnt <= ccnt + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
