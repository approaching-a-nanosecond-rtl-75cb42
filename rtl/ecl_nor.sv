// ecl_nor: conventional ECL NOR gate with N inputs.
//
// y = ~(a[0] | a[1] | ... | a[N-1]). Combinational, no clock.
// In the adder its outputs drive a shared emitter-follower node, which
// acts as a wire-OR of the gate outputs; that wire-OR is modelled by the
// instantiating module as an OR of the y outputs. The gate type and the
// limit of four inputs per gate in the H network follow the published
// design; N's default of 2 is this model's choice.
module ecl_nor #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  output logic         y
);

  always_comb y = ~(|a);

endmodule
