// exp_table: sampled exp(-x) for the neuron's Tfac computation.
//
// Holds exp(-k/8) for k = 0..63 (x from 0 to 7.875 in steps of 0.125) plus
// the end point exp(-8), as unsigned 16-bit values with 15 fractional bits.
// Given the table index k it returns the two samples that bracket x, e0 =
// exp(-k/8) and e1 = exp(-(k+1)/8); the neuron interpolates linearly between
// them with its own multiplier. Values for x >= 8 are forced to zero by the
// neuron. The table is computed at elaboration from exp(-k/8) = exp(-1/8)^k,
// rounded to the nearest step, so no data file is needed. Purely
// combinational (a small ROM in LUTs, one per neuron).
module exp_table
  import cmantec_pkg::*;
(
  input  logic [5:0]       k,
  output logic [EXP_W-1:0] e0,
  output logic [EXP_W-1:0] e1
);
  localparam int N = EXP_ENTRIES + 1;

  function automatic logic [N-1:0][EXP_W-1:0] build();
    logic [N-1:0][EXP_W-1:0] t;
    for (int n = 0; n < N; n++) t[n] = exp_sample(n);
    return t;
  endfunction

  localparam logic [N-1:0][EXP_W-1:0] TABLE = build();

  assign e0 = TABLE[k];
  assign e1 = TABLE[7'(k) + 7'd1];
endmodule
