// lookahead: single-level carry lookahead network of the adder.
//
// Produces the carry into every slice, c[k], in one gate level from the
// slice signals and the carry in:
//   c[k] = sum over j < k of  (propagate of slices k-1..j+1) P3^j H^j
//        + (propagate of slices k-1..0) cin
// Each slice's group generate is G^j = P3^j H^j, so the network forms the
// generates in the same gate level that forms the carries. Every product
// term is one special_and: H^j (or cin) on the non-inverting input, the
// negative-logic P3^j and group propagates on the inverting inputs. The
// terms of one carry are wire-ORed (an OR here).
//
// Slices are paired (1,2), (3,4), (5,6), ...: npp[m] is the wire-OR of the
// NPA copies of slices 2m+1 and 2m+2, the complemented propagate across
// both. A run of propagates uses a pair signal wherever the whole pair
// lies in the run, which keeps every term at four inverting inputs or
// fewer for eight slices; for example
//   c[7] = P3^6 H^6 + P^6 P3^5 H^5 + P^65 P3^4 H^4 + ...
//        + P^65 P^43 P^21 P^0 cin.
// c[0] is cin passed through a buffer. The structure, the pairing and the
// term counts (k+1 gates for c[k]) follow the published design; the signals
// of the most significant slice are not used, as on the chip.
// Purely combinational. N_SLICES must be even; above 8 slices the terms
// need more inverting inputs than the gate of the published design has.
module lookahead #(
  parameter int unsigned N_SLICES = 8
) (
  input  logic                  cin,   // carry into the adder, positive
  input  logic [N_SLICES-2:0]   h,     // H of slices 0..N-2, positive
  input  logic [N_SLICES-2:0]   np3,   // ~P3 of slices 0..N-2
  input  logic [N_SLICES-2:0]   np,    // ~P (NPB copy) of slices 0..N-2
  input  logic [N_SLICES/2-2:0] npp,   // ~P of pairs (2m+1, 2m+2)
  output logic [N_SLICES-1:0]   c      // carry into each slice
);

  // Number of propagate signals covering slices hi down to lo: a pair
  // (s-1, s) with s even counts once when both lie in the run.
  function automatic int unsigned n_prop(int lo, int hi);
    bit skip = 1'b0;
    n_prop = 0;
    for (int s = N_SLICES - 1; s >= 0; s--) begin
      if (s <= hi && s >= lo) begin
        if (skip) skip = 1'b0;
        else begin
          n_prop++;
          skip = (s % 2 == 0) && s >= 2 && (s - 1 >= lo);
        end
      end
    end
  endfunction

  // Inverting inputs of one term: propagates of slices hi..lo, then,
  // when with_p3 is set, the ~P3 of slice lo-1.
  function automatic logic [31:0] term_inputs(int lo, int hi, bit with_p3,
                                               logic [N_SLICES-2:0] np3_v,
                                               logic [N_SLICES-2:0] np_v,
                                               logic [N_SLICES/2-2:0] npp_v);
    int  idx  = 0;
    bit  skip = 1'b0;
    term_inputs = '0;
    for (int s = N_SLICES - 2; s >= 0; s--) begin
      if (s <= hi && s >= lo) begin
        if (skip) skip = 1'b0;
        else if (s % 2 == 0 && s >= 2 && s - 1 >= lo) begin
          term_inputs[idx] = npp_v[(s - 2) / 2];
          skip = 1'b1;
          idx++;
        end else begin
          term_inputs[idx] = np_v[s];
          idx++;
        end
      end
    end
    if (with_p3) term_inputs[idx] = np3_v[lo - 1];
  endfunction

  assign c[0] = cin;               // buffered carry in

  for (genvar k = 1; k < N_SLICES; k++) begin : g_carry
    logic [k:0] term;   // term[j], j < k: generated in slice j; term[k]: cin

    for (genvar j = 0; j <= k; j++) begin : g_term
      localparam bit          IS_CIN = (j == k);
      localparam int unsigned NI     = IS_CIN ? n_prop(0, k - 1)
                                              : n_prop(j + 1, k - 1) + 1;
      logic [31:0]   all_inv;
      logic [NI-1:0] inv;

      always_comb begin
        if (IS_CIN) all_inv = term_inputs(0, k - 1, 1'b0, np3, np, npp);
        else        all_inv = term_inputs(j + 1, k - 1, 1'b1, np3, np, npp);
        inv = all_inv[NI-1:0];
      end

      special_and #(.N_INV(NI)) u_and (
        .a     (IS_CIN ? cin : h[IS_CIN ? 0 : j]),
        .b     (inv),
        .y_and (term[j]),
        .y_nand()
      );
    end

    assign c[k] = |term;             // wire-OR
  end

endmodule
