// ecl_nor_tb: exhaustive check of the NOR gate at two and four inputs
// against a bitwise reference. Prints one TB_RESULT line.
module ecl_nor_tb;
  int checks = 0, failures = 0;

  logic [1:0] a2;  logic y2;
  logic [3:0] a4;  logic y4;
  ecl_nor #(.N(2)) dut2 (.a(a2), .y(y2));
  ecl_nor #(.N(4)) dut4 (.a(a4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a2 = v[1:0]; #1;
      checks++;
      if (y2 !== (v == 0)) begin failures++; $display("N=2 a=%b y=%b", a2, y2); end
    end
    for (int v = 0; v < 16; v++) begin
      a4 = v[3:0]; #1;
      checks++;
      if (y4 !== (v == 0)) begin failures++; $display("N=4 a=%b y=%b", a4, y4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
