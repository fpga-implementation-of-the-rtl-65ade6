// tfac_module: largest Tfac among the neurons and the index of its neuron.
//
// The neurons present Tfac values already forced to zero for neurons that
// are inactive or answered correctly, so the maximum over all of them is the
// maximum over the "wrong" neurons. The values are examined in groups of 16
// neurons, one group per clock: a combinational tree finds the largest value
// of the group and compares it with the largest value found so far, T(z),
// which is kept in a register together with its index z. Only the groups that
// contain active neurons are scanned, ceil(n_active/16) clocks in all.
//
// Timing: start is a one-cycle pulse while tfac[] is stable; done pulses in
// the cycle after the last group, with max_tfac/index valid from then until
// the next start. On equal values the lowest neuron index wins.
module tfac_module
  import cmantec_pkg::*;
#(
  parameter int NN = 94,
  localparam int IW = $clog2(NN),
  localparam int CW = $clog2(NN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [CW-1:0]        n_active,
  input  logic [NN-1:0][EXP_W-1:0] tfac,
  output logic                 done,
  output logic [EXP_W-1:0]     max_tfac,
  output logic [IW-1:0]        index
);
  localparam int NG = (NN + TFAC_GROUP - 1) / TFAC_GROUP;   // number of groups
  localparam int GW = (NG > 1) ? $clog2(NG) : 1;

  logic [GW-1:0] grp, last_grp;
  logic          run;

  // Group selected this clock; neurons past NN read as zero.
  logic [TFAC_GROUP-1:0][EXP_W-1:0] gv;
  always_comb begin
    for (int j = 0; j < TFAC_GROUP; j++) begin
      int n;
      n = int'(grp) * TFAC_GROUP + j;
      gv[j] = (n < NN) ? tfac[n] : '0;
    end
  end

  // Maximum of the group and of the running maximum T(z).
  logic [EXP_W-1:0] best_v;
  logic [IW-1:0]    best_i;
  always_comb begin
    best_v = max_tfac;
    best_i = index;
    for (int j = 0; j < TFAC_GROUP; j++) begin
      if (gv[j] > best_v) begin
        best_v = gv[j];
        best_i = IW'(int'(grp) * TFAC_GROUP + j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      done     <= 1'b0;
      grp      <= '0;
      last_grp <= '0;
      max_tfac <= '0;
      index    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run      <= 1'b1;
        grp      <= '0;
        last_grp <= (n_active == 0) ? '0 : GW'((int'(n_active) - 1) / TFAC_GROUP);
        max_tfac <= '0;
        index    <= '0;
      end else if (run) begin
        max_tfac <= best_v;
        index    <= best_i;
        if (grp == last_grp) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          grp <= grp + 1'b1;
        end
      end
    end
  end

endmodule
