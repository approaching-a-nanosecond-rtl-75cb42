// slice4: one 4-bit slice of the 32-bit adder.
//
// Operands and sum are negative logic (na = ~A, nb = ~B, ns = ~S); the
// slice carry c is positive logic. Complementing every operand and sum bit
// of an adder while keeping the carry as is gives the same adder, so the
// slice computes S = A + B + c on the true values.
//
// Towards the lookahead network (one gate delay from the operands):
//   la.h   Ling pseudo-generate  H = G3 + G2 + P2 G1 + P2 P1 G0, with the
//          P here taken as OR propagates, expanded into eight product
//          terms of A and B. Each term is one NOR of complemented operand
//          bits (at most four inputs), and the eight NOR outputs are
//          wire-ORed. The group generate is then G = P3 H with
//          P3 = A3 + B3, so the lookahead can form G itself.
//   la.np3 ~(A3 + B3).
//   la.npa, la.npb  two copies of the complemented group propagate
//          ~(P3 P2 P1 P0), each the wire-OR of one copy of the
//          complemented exclusive-OR bit propagates from the four bit_pg
//          gates.
//
// Sum output (one gate delay from the slice carry): for bit k > 0, with
// E = A_k ^ B_k and G, P the generate and propagate of bits k-1..0,
//   ~S_k = ~E ~G ~P + ~E ~G ~c + E G + E P c,
// a wire-OR of four AND terms. The first and third terms do not depend on
// c (the sum is already known); the second and fourth select the sum with
// the carry, as in a conditional-sum adder. The fourth term is a
// special_and with c on its non-inverting input. Bit 0 is ~S_0 = ~E_0 ^ c.
// All of this follows the published design; the equations for bits 1 and 2
// are the analogues of the printed bit-3 equation.
// Purely combinational, no clock or reset.
module slice4
  import adder_pkg::*;
(
  input  logic [SLICE_W-1:0] na,   // ~A, bit 0 is the least significant
  input  logic [SLICE_W-1:0] nb,   // ~B
  input  logic               c,    // carry into the slice, positive logic
  output logic [SLICE_W-1:0] ns,   // ~S
  output slice_la_t          la    // signals to the lookahead network
);

  // ---------------------------------------------------------------- bit PG
  logic [3:0] ng, npx0, npx1, npx2;

  for (genvar i = 0; i < 4; i++) begin : g_pg
    bit_pg u_pg (
      .na(na[i]), .nb(nb[i]),
      .ng(ng[i]), .np0(npx0[i]), .np1(npx1[i]), .np2(npx2[i]),
      .nb_shift()
    );
  end

  // ---------------------------------------------------------------- H
  // Eight NOR gates of complemented operand bits, outputs wire-ORed.
  logic [7:0] hterm;
  ecl_nor #(.N(2)) u_h1 (.a({na[3], nb[3]}),               .y(hterm[0])); // A3 B3
  ecl_nor #(.N(2)) u_h2 (.a({na[2], nb[2]}),               .y(hterm[1])); // A2 B2
  ecl_nor #(.N(3)) u_h3 (.a({na[2], na[1], nb[1]}),        .y(hterm[2])); // A2 A1 B1
  ecl_nor #(.N(3)) u_h4 (.a({nb[2], na[1], nb[1]}),        .y(hterm[3])); // B2 A1 B1
  ecl_nor #(.N(4)) u_h5 (.a({na[2], na[1], na[0], nb[0]}), .y(hterm[4])); // A2 A1 A0 B0
  ecl_nor #(.N(4)) u_h6 (.a({na[2], nb[1], na[0], nb[0]}), .y(hterm[5])); // A2 B1 A0 B0
  ecl_nor #(.N(4)) u_h7 (.a({nb[2], na[1], na[0], nb[0]}), .y(hterm[6])); // B2 A1 A0 B0
  ecl_nor #(.N(4)) u_h8 (.a({nb[2], nb[1], na[0], nb[0]}), .y(hterm[7])); // B2 B1 A0 B0

  always_comb begin
    la.h   = |hterm;                 // wire-OR
    la.np3 = na[3] & nb[3];          // ~(A3 + B3)
    la.npa = |npx0;                  // wire-OR of one propagate copy
    la.npb = |npx1;                  // wire-OR of another copy
  end

  // ---------------------------------------------------------------- sum
  // True-polarity bit generate / exclusive-OR propagate inside the slice.
  logic [3:0] g, p;
  always_comb begin
    g = ~ng;
    p = ~npx2;
  end

  // Generate and propagate of bits k-1..0, for k = 1..3 (index k).
  logic [3:1] gin, pin;
  always_comb begin
    gin[1] = g[0];
    pin[1] = p[0];
    gin[2] = g[1] | (p[1] & g[0]);
    pin[2] = p[1] & p[0];
    gin[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
    pin[3] = p[2] & p[1] & p[0];
  end

  // Fourth term E_k P c: c on the non-inverting input of a special AND,
  // the complemented propagates of bits k..0 on its inverting inputs.
  logic [3:1] t_epc;
  special_and #(.N_INV(2)) u_s1 (.a(c), .b(npx2[1:0]), .y_and(t_epc[1]), .y_nand());
  special_and #(.N_INV(3)) u_s2 (.a(c), .b(npx2[2:0]), .y_and(t_epc[2]), .y_nand());
  special_and #(.N_INV(4)) u_s3 (.a(c), .b(npx2[3:0]), .y_and(t_epc[3]), .y_nand());

  always_comb begin
    ns[0] = npx2[0] ^ c;             // ~S0 = ~E0 ^ c
    for (int k = 1; k < 4; k++) begin
      ns[k] = (~p[k] & ~gin[k] & ~pin[k])   // sum known: 1 + 0
            | (~p[k] & ~gin[k] & ~c)        // selected by c = 0
            | ( p[k] &  gin[k])             // sum known: 0 after carry
            | t_epc[k];                     // selected by c = 1
    end
  end

endmodule
