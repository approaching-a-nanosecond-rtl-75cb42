// special_and_tb: exhaustive check of the special AND gate with one to
// four inverting inputs. Reference: y_and is 1 exactly when a is 1 and
// every inverting input is 0; y_nand is its complement.
module special_and_tb;
  int checks = 0, failures = 0;

  logic a;
  logic [0:0] b1; logic [1:0] b2; logic [2:0] b3; logic [3:0] b4;
  logic [4:1] ya, yn;

  special_and #(.N_INV(1)) d1 (.a(a), .b(b1), .y_and(ya[1]), .y_nand(yn[1]));
  special_and #(.N_INV(2)) d2 (.a(a), .b(b2), .y_and(ya[2]), .y_nand(yn[2]));
  special_and #(.N_INV(3)) d3 (.a(a), .b(b3), .y_and(ya[3]), .y_nand(yn[3]));
  special_and #(.N_INV(4)) d4 (.a(a), .b(b4), .y_and(ya[4]), .y_nand(yn[4]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [4:1] exp_and;
      a  = v[4];
      b4 = v[3:0]; b3 = v[2:0]; b2 = v[1:0]; b1 = v[0:0];
      #1;
      exp_and[1] = v[4] && (v[0:0] == 0);
      exp_and[2] = v[4] && (v[1:0] == 0);
      exp_and[3] = v[4] && (v[2:0] == 0);
      exp_and[4] = v[4] && (v[3:0] == 0);
      for (int n = 1; n <= 4; n++) begin
        checks++;
        if (ya[n] !== exp_and[n] || yn[n] !== !exp_and[n]) begin
          failures++;
          $display("N_INV=%0d in=%b and=%b nand=%b", n, v[4:0], ya[n], yn[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
