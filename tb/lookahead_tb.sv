// lookahead_tb: checks the lookahead network against a ripple reference.
// Random slice signals (H, ~P3, ~P for slices 0..6 and the carry in) are
// applied, with each pair propagate formed as the wire-OR of its two
// slices' ~P, as the adder does. The reference ripples
//   c[0] = cin,  c[k+1] = P3^k H^k | P^k c[k]
// through the slices, which is the recurrence the one-level network
// expands. All-propagate and all-generate patterns are applied as well.
// Counts how often a carry came from the carry in through every slice and
// how often it crossed a pair propagate.
module lookahead_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  int n_cin_through = 0, n_pair = 0;

  logic            cin;
  logic [N-2:0]    h, np3, np;
  logic [N/2-2:0]  npp;
  logic [N-1:0]    c;

  lookahead #(.N_SLICES(N)) dut (.cin(cin), .h(h), .np3(np3), .np(np), .npp(npp), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(logic [N-2:0] h_v, logic [N-2:0] p3_v,
                                 logic [N-2:0] p_v, logic cin_v);
    logic [N-1:0] exp_c;
    h = h_v; np3 = ~p3_v; np = ~p_v; cin = cin_v;
    for (int m = 0; m < N/2 - 1; m++) npp[m] = np[2*m+1] | np[2*m+2];
    #1;
    exp_c[0] = cin_v;
    for (int k = 0; k < N - 1; k++)
      exp_c[k+1] = (p3_v[k] & h_v[k]) | (p_v[k] & exp_c[k]);
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("h=%b p3=%b p=%b cin=%b c=%b exp=%b", h_v, p3_v, p_v, cin_v, c, exp_c);
    end
    if (cin_v && &p_v) n_cin_through++;
    // carry into slice 7 generated in slice 4 or below, crossing pair (5,6)
    if (exp_c[7] && p_v[6] && p_v[5] && !(p3_v[6] & h_v[6]) && !(p3_v[5] & h_v[5]))
      n_pair++;
  endtask

  initial begin
    apply_and_check('1, '1, '1, 1'b1);
    apply_and_check('0, '0, '1, 1'b1);
    apply_and_check('0, '0, '1, 1'b0);
    apply_and_check('1, '1, '0, 1'b0);
    for (int s = 0; s < N - 1; s++) begin
      // single generate in slice s, everything above propagates
      apply_and_check(7'(1 << s), 7'(1 << s), '1, 1'b0);
      apply_and_check(7'(1 << s), 7'(1 << s), ~7'(1 << (N - 2)), 1'b0);
    end
    for (int i = 0; i < 200000; i++) begin
      logic [N-2:0] p_v;
      // bias towards propagates so long carry chains occur
      p_v = 7'($urandom) | 7'($urandom);
      apply_and_check(7'($urandom), 7'($urandom), p_v, 1'($urandom));
    end
    $display("carry in through all slices: %0d, crossed pair (5,6): %0d", n_cin_through, n_pair);
    checks++;
    if (n_cin_through == 0 || n_pair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
