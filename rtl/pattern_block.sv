// pattern_block: training-pattern store, random pattern server and noise filter.
//
// Storage: MAX_PAT words in distributed RAM (synchronous write, asynchronous
// read). A word holds the NI input bytes, the class bit and a per-pattern
// count of the learning events it caused. Patterns arrive as bytes from the
// serial port, NI input bytes followed by one class byte (bit 0 is the class),
// and fill the memory from address 0 (load_clear empties it).
//
// Selection: positions 0..n_elig-1 are eligible. On req a pseudo-random
// position idx = (lfsr * n_elig) >> 16 is read and broadcast to the neurons;
// pat_valid pulses 4 clocks after req. If the network classified it
// correctly the control sends cmd_correct and the pattern is swapped with the
// last eligible position, which then leaves the eligible set, so no pattern
// is drawn twice in a pass. cmd_learned (the pattern caused learning)
// increments its count and makes all n_train patterns eligible again. req
// with no eligible pattern answers with none: every pattern was classified
// correctly since the last learning event.
//
// Noise filter (cmd_filter, issued when a neuron was added): with P =
// n_train, S1 = sum(c), S2 = sum(c^2), a pattern with count c is noise when
// c > mean + phi*sd, evaluated without division or square root as
//   d = P*c - S1 > 0  and  d^2 > phi^2 * (P*S2 - S1^2)
// (phi unsigned, 4 fractional bits). Noisy patterns are swapped to the end of
// the training positions and n_train shrinks; counts of the kept patterns are
// reset to zero. The filter is off while phi_en is low (phi = infinity).
//
// ready is high while the block can take a command; commands are one-clock
// pulses. The pattern broadcast register (psi, target) changes only when a
// new pattern is sent, so it stays valid through the weight update.
// The random generator, the count width and the filter arithmetic are this
// design's choices; the swap scheme and noise rule follow the algorithm.
// Lint reports rst_n as used both asynchronously and synchronously: the
// second use is only the disable condition of the two assertions below.
module pattern_block
  import cmantec_pkg::*;
#(
  parameter int NI      = 15,
  parameter int MAX_PAT = 37888,
  parameter int CNT_W   = 8,
  localparam int AW     = $clog2(MAX_PAT + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // loading
  input  logic                     load_clear,
  input  logic                     load_valid,
  input  logic [7:0]               load_byte,
  output logic [AW-1:0]            n_pat,
  output logic                     load_full,
  // commands from the control block
  input  logic                     cmd_init,
  input  logic                     req,
  input  logic                     cmd_resend,
  input  logic                     cmd_correct,
  input  logic                     cmd_learned,
  input  logic                     cmd_filter,
  input  logic                     phi_en,
  input  logic [7:0]               phi,
  output logic                     ready,
  output logic                     none,
  output logic                     filter_removed,   // pulse per pattern removed as noise
  output logic [AW-1:0]            n_train,
  output logic [AW-1:0]            n_elig,
  // broadcast to the neurons
  output logic                     pat_valid,
  output logic [NI-1:0][PSI_W-1:0] psi,
  output logic                     target
);
  typedef struct packed {
    logic [CNT_W-1:0]            cnt;
    logic                        cls;
    logic [NI-1:0][PSI_W-1:0]    x;
  } pword_t;

  typedef enum logic [3:0] {
    S_IDLE, S_MUL, S_ADDR, S_READ, S_SEND, S_NONE, S_SWAP1, S_SWAP2,
    S_INIT, S_FSUM, S_FPREP, S_FCHK, S_FSWAP
  } st_t;

  localparam int BW = (NI > 1) ? $clog2(NI + 1) : 1;
  localparam int WIDE = 80;

  pword_t         mem [MAX_PAT];
  st_t            st;
  pword_t         cur, tmp, rd_a, rd_b;
  logic [AW-1:0]  idx, j, last;
  logic [AW-1:0]  ra, rb;
  logic [15:0]    lfsr;
  logic [AW+15:0] rprod;
  logic [BW-1:0]  bcnt;
  logic [NI-1:0][PSI_W-1:0] lbuf;
  logic [WIDE-1:0] s1, s2, vterm;
  logic [WIDE-1:0] d_val, lhs;
  logic            noisy;

  // asynchronous read ports
  assign rd_a = mem[ra];
  assign rd_b = mem[rb];

  // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1, free running
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  // read address selection
  always_comb begin
    ra = idx;
    rb = last;
    unique case (st)
      S_FSUM, S_FCHK, S_FSWAP: ra = j;
      S_INIT:                  ra = j;
      default:                 ra = idx;
    endcase
  end

  // noise test for the pattern at position j
  always_comb begin
    logic [WIDE-1:0] pc;
    pc    = WIDE'(n_train) * WIDE'(rd_a.cnt);
    noisy = 1'b0;
    d_val = '0;
    lhs   = '0;
    if (pc > s1) begin
      d_val = pc - s1;
      lhs   = (d_val * d_val) << 8;      // phi^2 carries 8 fractional bits
      noisy = lhs > vterm;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      n_pat <= '0; n_train <= '0; n_elig <= '0; load_full <= 1'b0;
      cur <= '0; tmp <= '0; idx <= '0; j <= '0; last <= '0; rprod <= '0;
      bcnt <= '0; lbuf <= '0; s1 <= '0; s2 <= '0; vterm <= '0;
      none <= 1'b0; filter_removed <= 1'b0;
    end else begin
      none           <= 1'b0;
      filter_removed <= 1'b0;
      unique case (st)
        S_IDLE: begin
          // loading from the serial port
          if (load_clear) begin
            n_pat <= '0; bcnt <= '0; load_full <= 1'b0;
            n_train <= '0; n_elig <= '0;
          end else if (load_valid) begin
            if (int'(bcnt) == NI) begin
              bcnt <= '0;
              if (int'(n_pat) < MAX_PAT) begin
                mem[n_pat] <= '{cnt: '0, cls: load_byte[0], x: lbuf};
                n_pat <= n_pat + 1'b1;
              end else load_full <= 1'b1;
            end else begin
              lbuf[bcnt] <= load_byte;
              bcnt <= bcnt + 1'b1;
            end
          end
          if (cmd_init) begin
            n_train <= n_pat;
            n_elig  <= n_pat;
            j       <= '0;
            st      <= S_INIT;
          end else if (req) begin
            st <= (n_elig == '0) ? S_NONE : S_MUL;
          end else if (cmd_resend) begin
            st <= S_SEND;
          end else if (cmd_correct) begin
            last <= n_elig - 1'b1;
            st   <= S_SWAP1;
          end else if (cmd_learned) begin
            if (cur.cnt != '1) begin
              mem[idx] <= '{cnt: cur.cnt + 1'b1, cls: cur.cls, x: cur.x};
              cur.cnt  <= cur.cnt + 1'b1;
            end
            n_elig <= n_train;
          end else if (cmd_filter && phi_en) begin
            j  <= '0;
            s1 <= '0;
            s2 <= '0;
            st <= (n_train == '0) ? S_IDLE : S_FSUM;
          end
        end
        // clear all counts before a training run
        S_INIT: begin
          if (j == n_pat) st <= S_IDLE;
          else begin
            mem[j] <= '{cnt: '0, cls: rd_a.cls, x: rd_a.x};
            j <= j + 1'b1;
          end
        end
        // random selection
        S_MUL:  begin rprod <= lfsr * n_elig; st <= S_ADDR; end
        S_ADDR: begin idx <= AW'(rprod >> 16);  st <= S_READ; end
        S_READ: begin cur <= rd_a;              st <= S_SEND; end
        S_SEND: st <= S_IDLE;
        S_NONE: begin none <= 1'b1;             st <= S_IDLE; end
        // move the correctly classified pattern out of the eligible set
        S_SWAP1: begin
          tmp       <= rd_b;
          mem[last] <= cur;
          st        <= S_SWAP2;
        end
        S_SWAP2: begin
          mem[idx] <= tmp;
          n_elig   <= last;
          st       <= S_IDLE;
        end
        // noise filter, pass 1: sums of counts and squared counts
        S_FSUM: begin
          s1 <= s1 + WIDE'(rd_a.cnt);
          s2 <= s2 + WIDE'(rd_a.cnt) * WIDE'(rd_a.cnt);
          if (j == n_train - 1'b1) st <= S_FPREP;
          else j <= j + 1'b1;
        end
        S_FPREP: begin
          vterm <= WIDE'(phi) * WIDE'(phi) * (WIDE'(n_train) * s2 - s1 * s1);
          j     <= '0;
          last  <= n_train;
          st    <= S_FCHK;
        end
        // pass 2: move noisy patterns behind the training positions
        S_FCHK: begin
          if (j == last) begin
            n_train <= last;
            n_elig  <= last;
            st      <= S_IDLE;
          end else if (noisy) begin
            tmp    <= rd_a;
            mem[j] <= mem[last - 1'b1];
            st     <= S_FSWAP;
          end else begin
            mem[j] <= '{cnt: '0, cls: rd_a.cls, x: rd_a.x};
            j <= j + 1'b1;
          end
        end
        S_FSWAP: begin
          mem[last - 1'b1] <= tmp;
          last             <= last - 1'b1;
          filter_removed   <= 1'b1;
          st               <= S_FCHK;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign ready     = (st == S_IDLE) && !cmd_init && !req && !cmd_resend && !cmd_correct
                     && !(cmd_filter && phi_en);
  assign pat_valid = (st == S_SEND);
  assign psi       = cur.x;
  assign target    = cur.cls;
  // commands are only accepted while idle; a command at another time is lost
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_init || req || cmd_resend || cmd_correct || cmd_learned || (cmd_filter && phi_en))
      |-> st == S_IDLE);
  a_one_cmd:  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({cmd_init, req, cmd_resend, cmd_correct, cmd_learned, cmd_filter}));
endmodule
