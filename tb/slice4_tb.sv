// slice4_tb: exhaustive check of one 4-bit slice over all operands and
// both slice carries (512 cases). References, computed from the true
// operand values:
//   sum  = (A + B + c) mod 16, expected on ns in complemented form;
//   H    = A3 B3 | carry out of bits 2..0 with no carry in;
//   np3  = ~(A3 | B3);
//   npa = npb = ~(A ^ B == 4'hF).
// The group identity G = P3 H (carry out of the slice with no carry in) is
// checked as well. Also counts how often a sum bit was decided inside the
// slice and how often it was selected by the slice carry.
module slice4_tb;
  import adder_pkg::*;
  int checks = 0, failures = 0;
  int n_known = 0, n_selected = 0;

  logic [3:0] na, nb, ns;
  logic c;
  slice_la_t la;

  slice4 dut (.na(na), .nb(nb), .c(c), .ns(ns), .la(la));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] a, b;
      logic [4:0] sum;
      logic c3, h_exp, g_exp;
      a = v[3:0]; b = v[7:4]; c = v[8];
      na = ~a; nb = ~b;
      #1;
      sum   = a + b + {4'b0, c};
      c3    = ({1'b0, a[2:0]} + {1'b0, b[2:0]}) >> 3;
      h_exp = (a[3] & b[3]) | c3;
      g_exp = ((5'(a) + 5'(b)) >> 4) != 0;

      checks++;
      if (ns !== ~sum[3:0]) begin
        failures++; $display("A=%h B=%h c=%b ns=%h exp=%h", a, b, c, ns, ~sum[3:0]);
      end
      checks++;
      if (la.h !== h_exp) begin failures++; $display("A=%h B=%h H=%b exp=%b", a, b, la.h, h_exp); end
      checks++;
      if (la.np3 !== !(a[3] | b[3])) begin failures++; $display("A=%h B=%h np3=%b", a, b, la.np3); end
      checks++;
      if (la.npa !== ((a ^ b) != 4'hF) || la.npb !== ((a ^ b) != 4'hF)) begin
        failures++; $display("A=%h B=%h npa=%b npb=%b", a, b, la.npa, la.npb);
      end
      checks++;
      if (((a[3] | b[3]) & la.h) !== g_exp) begin
        failures++; $display("A=%h B=%h P3*H differs from G", a, b);
      end

      // Bit k's carry depends on c only when bits k-1..0 all propagate.
      for (int k = 1; k < 4; k++) begin
        logic [3:0] m;
        m = 4'((1 << k) - 1);
        if (((a ^ b) & m) == m) n_selected++;
        else n_known++;
      end
    end
    $display("sum bits decided in slice: %0d, selected by slice carry: %0d", n_known, n_selected);
    checks++;
    if (n_known == 0 || n_selected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
