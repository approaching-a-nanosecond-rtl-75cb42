// bit_pg: per-bit generate/propagate gate with a single tail current.
//
// Inputs are the complemented operand bits na = ~A and nb = ~B. Outputs:
//   ng            = ~(A & B)        complemented bit generate
//   np0, np1, np2 = ~(A ^ B)        three copies of the complemented
//                                   exclusive-OR bit propagate
//   nb_shift      = nb              the B input after its one-diode level
//                                   shift, passed on to later gates
// Inside a slice the propagate is the exclusive-OR, because the same
// signal is needed for the sum bit. The three propagate copies stand for
// the separate emitter followers of the circuit, which let the copies go
// to different wire-OR nodes. Function and outputs follow the published
// design. Combinational, no clock.
module bit_pg (
  input  logic na,
  input  logic nb,
  output logic ng,
  output logic np0,
  output logic np1,
  output logic np2,
  output logic nb_shift
);

  logic np;

  always_comb begin
    ng       = na | nb;        // ~(A & B) = ~A | ~B
    np       = ~(na ^ nb);     // ~(A ^ B)
    np0      = np;
    np1      = np;
    np2      = np;
    nb_shift = nb;
  end

endmodule
