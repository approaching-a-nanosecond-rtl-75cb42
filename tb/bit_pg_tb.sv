// bit_pg_tb: exhaustive check of the bit generate/propagate gate. The
// operands are applied in negative logic; the reference takes the true
// bits A, B and expects ng = ~(A & B), np0..np2 = ~(A ^ B), nb_shift = ~B.
module bit_pg_tb;
  int checks = 0, failures = 0;
  logic na, nb, ng, np0, np1, np2, nbs;

  bit_pg dut (.na(na), .nb(nb), .ng(ng), .np0(np0), .np1(np1), .np2(np2),
              .nb_shift(nbs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic a, b;
      a = v[0]; b = v[1];
      na = !a; nb = !b;
      #1;
      checks++;
      if (ng !== !(a && b)) begin failures++; $display("A=%b B=%b ng=%b", a, b, ng); end
      checks++;
      if (np0 !== (a == b) || np1 !== (a == b) || np2 !== (a == b)) begin
        failures++; $display("A=%b B=%b np=%b%b%b", a, b, np0, np1, np2);
      end
      checks++;
      if (nbs !== !b) begin failures++; $display("A=%b B=%b nb_shift=%b", a, b, nbs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
