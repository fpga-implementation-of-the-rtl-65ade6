// shift_add_mult: unsigned multiplier built only from shifters and adders.
//
// The product is the sum of the multiplicand shifted left by i for every set
// bit i of the multiplier, so no vendor multiplier core is needed and the code
// ports to any FPGA. It is purely combinational: each neuron owns one instance
// and time-multiplexes it between the potential h, the temperature, the
// exponential interpolation, Tfac and the weight update. The result is
// A_W + B_W bits wide, matching the Na x Nb -> Na + Nb sizing of the
// shift-and-add scheme.
module shift_add_mult #(
  parameter int A_W = 18,
  parameter int B_W = 18
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < B_W; i++)
      if (b[i]) p = p + ((A_W+B_W)'(a) << i);
  end
endmodule
