// cmantec_control: control block of the C-Mantec learner.
//
// Sequences one learning step at a time and owns the neuron activation flags
// (all NN neurons exist in hardware; the first n_active of them form the
// network). It contains the S module (network output = majority of the active
// neurons) and the Tfac module (largest Tfac of the wrong neurons).
//
// One step:
//  1. req: the pattern block draws an eligible pattern and broadcasts it;
//     the neurons compute S. When every eligible pattern has been shown
//     without an error (none), training has succeeded.
//  2. maj_valid: the majority maj is handed back to the neurons. If maj
//     matches the target, cmd_correct retires the pattern from the eligible
//     set and the next pattern is drawn.
//  3. Otherwise every neuron computes Tfac and the Tfac module finds the
//     largest. If it exceeds gfac, that neuron alone updates its weights
//     (upd_sel) and cmd_learned counts the event for the pattern.
//  4. If not, the next neuron is activated, all temperatures go back to T0
//     (temp_reset), the same pattern is presented again (cmd_resend) and,
//     once that step is over, the noise filter runs (cmd_filter). With no
//     neuron left, training stops with full.
// start clears all weights and begins; done stays high at the end with
// success or full. Commands to the pattern block and neurons are registered
// one-clock pulses; maj_valid is high for the one clock of state C_MAJ.
//
// Phase lengths, measured in clocks and reported for the last occurrence:
//   cyc_maj  from req to the majority decision       = 8 + 2*NI
//   cyc_tfac from then to the largest-Tfac decision  = N1+N2+18 + ceil(n_active/16)
//                                                    (34 + ceil(n_active/16) for 8+8 bits)
//   cyc_upd  weight modification                     = 4 + 2*NI
// The re-presentation after adding a neuron, and filtering only after that
// step, are this design's reading of "a new neuron is added to learn it".
// Lint reports rst_n as used both asynchronously and synchronously: the
// second use is only the disable condition of the two assertions below.
module cmantec_control
  import cmantec_pkg::*;
#(
  parameter int NN = 94,
  localparam int IW = $clog2(NN),
  localparam int CW = $clog2(NN + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [EXP_W-1:0]         gfac,
  // pattern block
  input  logic                     pb_ready,
  input  logic                     pb_none,
  input  logic                     target,
  output logic                     pb_init,
  output logic                     pb_req,
  output logic                     pb_resend,
  output logic                     pb_correct,
  output logic                     pb_learned,
  output logic                     pb_filter,
  // neurons
  input  logic [NN-1:0]            s,
  input  logic [NN-1:0][EXP_W-1:0] tfac,
  input  logic                     eval_done,
  input  logic                     tfac_done,
  input  logic                     upd_done,
  output logic                     clear,
  output logic                     temp_reset,
  output logic [NN-1:0]            active,
  output logic                     maj_valid,
  output logic                     maj,
  output logic [NN-1:0]            upd_sel,
  // status
  output logic                     busy,
  output logic                     done,
  output logic                     success,
  output logic                     full,
  output logic [CW-1:0]            n_active,
  output logic [15:0]              cyc_maj,
  output logic [15:0]              cyc_tfac,
  output logic [15:0]              cyc_upd
);
  typedef enum logic [3:0] {
    C_IDLE, C_WAIT, C_PAT, C_MAJ, C_TFWAIT, C_TMAX, C_UPD, C_UEND, C_DONE
  } st_t;
  st_t st;

  logic [31:0]      now, t0;
  logic             represent, pend_filter;
  logic             tm_start, tm_done;
  logic [EXP_W-1:0] max_tfac;
  logic [IW-1:0]    max_idx;

  s_module #(.NN(NN)) u_s (
    .s(s), .active(active), .n_active(n_active), .maj(maj)
  );

  tfac_module #(.NN(NN)) u_tfac (
    .clk, .rst_n, .start(tm_start), .n_active, .tfac,
    .done(tm_done), .max_tfac, .index(max_idx)
  );

  always_comb
    for (int i = 0; i < NN; i++) active[i] = (i < int'(n_active));

  assign maj_valid = (st == C_MAJ);
  assign busy      = (st != C_IDLE) && (st != C_DONE);
  assign done      = (st == C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE;
      now <= '0; t0 <= '0;
      represent <= 1'b0; pend_filter <= 1'b0;
      pb_init <= 1'b0; pb_req <= 1'b0; pb_resend <= 1'b0; pb_correct <= 1'b0;
      pb_learned <= 1'b0; pb_filter <= 1'b0; clear <= 1'b0; temp_reset <= 1'b0;
      upd_sel <= '0; tm_start <= 1'b0;
      success <= 1'b0; full <= 1'b0; n_active <= '0;
      cyc_maj <= '0; cyc_tfac <= '0; cyc_upd <= '0;
    end else begin
      now <= now + 1'b1;
      pb_init <= 1'b0; pb_req <= 1'b0; pb_resend <= 1'b0; pb_correct <= 1'b0;
      pb_learned <= 1'b0; pb_filter <= 1'b0; clear <= 1'b0; temp_reset <= 1'b0;
      upd_sel <= '0; tm_start <= 1'b0;
      unique case (st)
        C_IDLE, C_DONE: begin
          if (start) begin
            clear       <= 1'b1;
            pb_init     <= 1'b1;
            n_active    <= CW'(1);
            success     <= 1'b0;
            full        <= 1'b0;
            represent   <= 1'b0;
            pend_filter <= 1'b0;
            st          <= C_WAIT;
          end
        end
        C_WAIT: begin
          // pb_ready is low in the clock a command is presented
          if (pb_ready && !pb_init && !pb_correct && !pb_filter) begin
            if (represent) begin
              represent <= 1'b0;
              pb_resend <= 1'b1;
              t0        <= now + 1'b1;
              st        <= C_PAT;
            end else if (pend_filter) begin
              pend_filter <= 1'b0;
              pb_filter   <= 1'b1;
            end else begin
              pb_req <= 1'b1;
              t0     <= now + 1'b1;
              st     <= C_PAT;
            end
          end
        end
        C_PAT: begin
          if (pb_none) begin
            success <= 1'b1;
            st      <= C_DONE;
          end else if (eval_done) st <= C_MAJ;
        end
        C_MAJ: begin
          cyc_maj <= 16'(now - t0 + 1'b1);
          t0      <= now + 1'b1;
          if (maj == target) begin
            pb_correct <= 1'b1;
            st         <= C_WAIT;
          end else st <= C_TFWAIT;
        end
        C_TFWAIT: begin
          if (tfac_done) begin
            tm_start <= 1'b1;
            st       <= C_TMAX;
          end
        end
        C_TMAX: begin
          if (tm_done) begin
            cyc_tfac <= 16'(now - t0 + 1'b1);
            if (max_tfac > gfac) begin
              upd_sel[max_idx] <= 1'b1;
              t0 <= now + 1'b1;
              st <= C_UPD;
            end else if (int'(n_active) == NN) begin
              full <= 1'b1;
              st   <= C_DONE;
            end else begin
              n_active    <= n_active + 1'b1;
              temp_reset  <= 1'b1;
              pb_learned  <= 1'b1;
              represent   <= 1'b1;
              pend_filter <= 1'b1;
              st          <= C_WAIT;
            end
          end
        end
        C_UPD: begin
          if (upd_done) st <= C_UEND;
        end
        C_UEND: begin
          cyc_upd    <= 16'(now - t0 + 1'b1);
          pb_learned <= 1'b1;
          st         <= C_WAIT;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
  // only one neuron learns at a time, and only a wrong, active one is chosen
  a_one_learner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(upd_sel));
  a_sel_active:  assert property (@(posedge clk) disable iff (!rst_n) (upd_sel & ~active) == '0);
endmodule
