// cmantec_top: on-chip learning C-Mantec network (constructive threshold
// network with competing thermal perceptrons and a majority output).
//
// Three blocks, wired as in the block diagram of the design:
//   * pattern block : receives the training patterns over the serial line
//                     (serial_rx), stores them, serves them in random order
//                     to all neurons and filters noisy patterns;
//   * control block : S module (majority), Tfac module (largest Tfac), the
//                     activation flags and the sequencing of the algorithm;
//   * NN neurons    : each with its weights, one multiplier and an exp table.
// The neurons send S(1:n) and Tfac(1:n) to the control block and receive the
// broadcast pattern, the network output Maj(S) and a neuron-selector line.
//
// Use: send the patterns over `rx` (NI input bytes then one class byte per
// pattern), pulse `start`, wait for `done`. `success` means every remaining
// training pattern is classified correctly by the n_active neurons; `full`
// means all NN neurons were used. The algorithm parameters are inputs:
// gfac (16 bits, 15 fractional), Imax = 2^log2_imax (log2_imax <= 17) and
// phi (4 fractional bits, used only while phi_en is high).
// Defaults: 15 inputs, 8+8-bit weights, 94 neurons, 37888 patterns - the
// 15-input, 16-bit-weight configuration of the design. The clock (72.72 MHz
// in that configuration) comes from outside.
// Lint reports rst_n as used both asynchronously and synchronously: the
// second use is only the disable condition of the assertions in the
// control and pattern blocks.
module cmantec_top
  import cmantec_pkg::*;
#(
  parameter int NI           = 15,
  parameter int NN           = 94,
  parameter int N1           = 8,
  parameter int N2           = 8,
  parameter int T0           = 1 << N2,
  parameter int MAX_PAT      = 37888,
  parameter int CLKS_PER_BIT = 631,
  localparam int AW = $clog2(MAX_PAT + 1),
  localparam int CW = $clog2(NN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx,
  input  logic             load_clear,
  input  logic             start,
  input  logic [EXP_W-1:0] gfac,
  input  logic [4:0]       log2_imax,
  input  logic             phi_en,
  input  logic [7:0]       phi,
  output logic             busy,
  output logic             done,
  output logic             success,
  output logic             full,
  output logic [CW-1:0]    n_active,
  output logic [AW-1:0]    n_pat,
  output logic [AW-1:0]    n_train,
  output logic [AW-1:0]    n_elig,
  output logic             noise_removed,
  output logic             rx_frame_err,
  output logic             load_overflow,
  output logic [15:0]      cyc_maj,
  output logic [15:0]      cyc_tfac,
  output logic [15:0]      cyc_upd
);
  logic             rx_valid;
  logic [7:0]       rx_byte;
  logic             pb_init, pb_req, pb_resend, pb_correct, pb_learned, pb_filter;
  logic             pb_ready, pb_none, pat_valid, target;
  logic [NI-1:0][PSI_W-1:0] psi;
  logic             clear, temp_reset, maj_valid, maj;
  logic [NN-1:0]    active, upd_sel, s, ev_done, tf_done, up_done;
  logic [NN-1:0][EXP_W-1:0] tfac;

  serial_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx, .byte_valid(rx_valid), .byte_data(rx_byte), .frame_err(rx_frame_err)
  );

  pattern_block #(.NI(NI), .MAX_PAT(MAX_PAT)) u_pat (
    .clk, .rst_n,
    .load_clear, .load_valid(rx_valid), .load_byte(rx_byte), .n_pat, .load_full(load_overflow),
    .cmd_init(pb_init), .req(pb_req), .cmd_resend(pb_resend), .cmd_correct(pb_correct),
    .cmd_learned(pb_learned), .cmd_filter(pb_filter), .phi_en, .phi,
    .ready(pb_ready), .none(pb_none), .filter_removed(noise_removed), .n_train, .n_elig,
    .pat_valid, .psi, .target
  );

  cmantec_control #(.NN(NN)) u_ctrl (
    .clk, .rst_n, .start, .gfac,
    .pb_ready, .pb_none, .target,
    .pb_init, .pb_req, .pb_resend, .pb_correct, .pb_learned, .pb_filter,
    .s, .tfac, .eval_done(|ev_done), .tfac_done(|tf_done), .upd_done(|up_done),
    .clear, .temp_reset, .active, .maj_valid, .maj, .upd_sel,
    .busy, .done, .success, .full, .n_active, .cyc_maj, .cyc_tfac, .cyc_upd
  );

  for (genvar g = 0; g < NN; g++) begin : g_neuron
    cmantec_neuron #(.NI(NI), .N1(N1), .N2(N2), .T0(T0)) u_neuron (
      .clk, .rst_n, .clear, .temp_reset, .active(active[g]), .log2_imax,
      .pat_valid, .psi, .target, .maj_valid, .maj, .upd_sel(upd_sel[g]),
      .s(s[g]), .tfac(tfac[g]),
      .eval_done(ev_done[g]), .tfac_done(tf_done[g]), .upd_done(up_done[g])
    );
  end
endmodule
