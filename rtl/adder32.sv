// adder32: 32-bit binary adder in three gate levels (Ling / lookahead /
// conditional-sum hybrid).
//
// An addition takes three steps, each about one gate delay:
//   1. every 4-bit slice (slice4) sends H, ~P3 and two copies of ~P to the
//      lookahead network;
//   2. the lookahead network computes the carry into each slice in a
//      single level (lookahead); the NPA copies of slices 1-2, 3-4 and 5-6
//      are wire-ORed here into two-slice propagates, which keeps the
//      network's gates at five inputs;
//   3. each slice turns its carry into four sum bits.
//
// Interface: operands and sum are negative logic (na = ~A, nb = ~B,
// ns = ~S), the carry in is positive logic; bit 0 is the least significant.
// The network produces no carry out, as in the published design; the
// lookahead signals of the most significant slice are brought out as
// msb_la so that a carry out can be formed outside as
//   cout = (~msb_la.np3 & msb_la.h) | (~msb_la.npb & c7),
// with c7 the carry into that slice. Purely combinational: no clock, no
// reset, the result is valid one propagation time after the inputs settle.
// Slice count, slice width, pairing and polarities follow the published
// design; msb_la as a port is this model's choice.
module adder32
  import adder_pkg::*;
(
  input  logic [WIDTH-1:0] na,      // ~A
  input  logic [WIDTH-1:0] nb,      // ~B
  input  logic             cin,     // carry in, positive logic
  output logic [WIDTH-1:0] ns,      // ~(A + B + cin), low WIDTH bits
  output slice_la_t        msb_la,  // lookahead signals of the top slice
  output logic             c_msb    // carry into the top slice
);

  slice_la_t               la [N_SLICES];
  logic [N_SLICES-1:0]     c;
  logic [N_SLICES-2:0]     h, np3, np;
  logic [N_SLICES/2-2:0]   npp;

  for (genvar i = 0; i < N_SLICES; i++) begin : g_slice
    slice4 u_slice (
      .na(na[i*SLICE_W +: SLICE_W]),
      .nb(nb[i*SLICE_W +: SLICE_W]),
      .c (c[i]),
      .ns(ns[i*SLICE_W +: SLICE_W]),
      .la(la[i])
    );
  end

  for (genvar i = 0; i < N_SLICES - 1; i++) begin : g_la
    assign h[i]   = la[i].h;
    assign np3[i] = la[i].np3;
    assign np[i]  = la[i].npb;
  end

  // Two-slice propagates: wire-OR of the NPA copies of slices 2m+1, 2m+2.
  for (genvar m = 0; m < N_SLICES / 2 - 1; m++) begin : g_pair
    assign npp[m] = la[2*m+1].npa | la[2*m+2].npa;
  end

  lookahead #(.N_SLICES(N_SLICES)) u_lookahead (
    .cin(cin), .h(h), .np3(np3), .np(np), .npp(npp), .c(c)
  );

  assign msb_la = la[N_SLICES-1];
  assign c_msb  = c[N_SLICES-1];

endmodule
