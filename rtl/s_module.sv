// s_module: network output, the majority of the active hidden neurons.
//
// The outputs S of the active neurons are added and the sum is compared with
// half the number of active neurons, obtained by a one-bit right shift. The
// result is 1 only when more active neurons are ON than OFF; a tie gives 0.
// The circuit is combinational, so the majority is available in the cycle
// the neuron outputs are. Inactive neurons are masked out with the
// activation flags.
module s_module #(
  parameter int NN = 94,
  localparam int CW = $clog2(NN + 1)
) (
  input  logic [NN-1:0] s,         // hidden neuron outputs
  input  logic [NN-1:0] active,    // neuron activation flags
  input  logic [CW-1:0] n_active,  // number of active neurons
  output logic          maj        // network output
);
  logic [CW-1:0] ones;
  always_comb begin
    ones = '0;
    for (int i = 0; i < NN; i++) ones = ones + CW'(s[i] & active[i]);
  end
  assign maj = ones > (n_active >> 1);
endmodule
