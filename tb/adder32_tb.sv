// adder32_tb: end-to-end test of the 32-bit adder at its default size.
// Operands are applied in negative logic; the reference is the integer sum
// A + B + cin in 33 bits. Checks the sum, the carry into the top slice and
// the carry out formed from the top slice's lookahead signals. Directed
// cases (carry rippling from the carry in through all 32 bits, zero,
// all ones, single-bit generates) are followed by random operands.
// Every mechanism of the design is counted and must occur at least once:
//   cin_through   carry in propagated through all eight slices
//   pair_used     carry into a slice crossed a two-slice propagate pair
//   slice_gen     carry into a slice generated by a lower slice (P3 H)
//   sum_selected  a sum bit chosen by its slice carry
//   sum_known     a sum bit decided inside its slice regardless of carry
//   cout          carry out of the adder
module adder32_tb;
  import adder_pkg::*;
  int checks = 0, failures = 0;
  int n_cin_through = 0, n_pair = 0, n_slice_gen = 0;
  int n_sum_selected = 0, n_sum_known = 0, n_cout = 0;

  logic [WIDTH-1:0] na, nb, ns;
  logic             cin, c_msb;
  slice_la_t        msb_la;

  adder32 dut (.na(na), .nb(nb), .cin(cin), .ns(ns), .msb_la(msb_la), .c_msb(c_msb));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [WIDTH-1:0] a, logic [WIDTH-1:0] b, logic ci);
    logic [WIDTH:0]   sum;
    logic [WIDTH-1:0] prop;
    logic [N_SLICES-1:0] cs;   // reference carry into each slice
    logic             cout;
    na = ~a; nb = ~b; cin = ci;
    #1;
    sum  = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, ci};
    prop = a ^ b;
    for (int k = 0; k < N_SLICES; k++) begin
      logic [WIDTH:0] lo;
      lo = k == 0 ? 33'(ci)
                  : (({1'b0, a} & ((33'd1 << (SLICE_W*k)) - 1))
                   + ({1'b0, b} & ((33'd1 << (SLICE_W*k)) - 1)) + 33'(ci));
      cs[k] = lo[SLICE_W*k];
    end
    checks++;
    if (ns !== ~sum[WIDTH-1:0]) begin
      failures++; $display("A=%h B=%h cin=%b S=%h exp=%h", a, b, ci, ~ns, sum[WIDTH-1:0]);
    end
    checks++;
    if (c_msb !== cs[N_SLICES-1]) begin
      failures++; $display("A=%h B=%h cin=%b c_msb=%b exp=%b", a, b, ci, c_msb, cs[N_SLICES-1]);
    end
    cout = (~msb_la.np3 & msb_la.h) | (~msb_la.npb & c_msb);
    checks++;
    if (cout !== sum[WIDTH]) begin
      failures++; $display("A=%h B=%h cin=%b cout=%b exp=%b", a, b, ci, cout, sum[WIDTH]);
    end

    // mechanism counts, from the reference values
    if (ci && &prop) n_cin_through++;
    if (sum[WIDTH]) n_cout++;
    for (int k = 1; k < N_SLICES; k++) begin
      // carry into slice k produced by slice k-1's own generate
      if (cs[k] && !(&prop[SLICE_W*(k-1) +: SLICE_W])) n_slice_gen++;
    end
    for (int m = 0; m < N_SLICES/2 - 1; m++) begin
      // carry crossing pair (2m+1, 2m+2) into slice 2m+3
      if (cs[2*m+3] && &prop[SLICE_W*(2*m+1) +: 2*SLICE_W] && cs[2*m+1]) n_pair++;
    end
    for (int i = 0; i < WIDTH; i++) begin
      int lsb;
      lsb = i - (i % SLICE_W);
      if (i == lsb) continue;
      if (&prop[lsb +: SLICE_W] || ((prop >> lsb) & ((32'd1 << (i - lsb)) - 1))
                                   == ((32'd1 << (i - lsb)) - 1))
        n_sum_selected++;
      else
        n_sum_known++;
    end
  endtask

  initial begin
    run(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);   // ripple from cin to cout
    run(32'h0000_0000, 32'h0000_0000, 1'b0);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    run(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    run(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < WIDTH; i++) begin
      run(32'h1 << i, 32'h1 << i, 1'b0);
      run(32'hFFFF_FFFF ^ (32'h1 << i), 32'h1 << i, 1'b1);
      run(32'hFFFF_FFFF << i, 32'h1 << i, 1'b0);
    end
    for (int i = 0; i < 300000; i++) begin
      logic [WIDTH-1:0] a, b;
      a = $urandom;
      b = $urandom;
      if (i % 4 == 1) b = ~a ^ (32'h1 << ($urandom % 32));  // long carry chains
      run(a, b, 1'($urandom));
    end
    $display("cin_through=%0d pair_used=%0d slice_gen=%0d sum_selected=%0d sum_known=%0d cout=%0d",
             n_cin_through, n_pair, n_slice_gen, n_sum_selected, n_sum_known, n_cout);
    checks++;
    if (n_cin_through == 0 || n_pair == 0 || n_slice_gen == 0 ||
        n_sum_selected == 0 || n_sum_known == 0 || n_cout == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
