// special_and: ECL AND gate with one non-inverting input and up to four
// inverting inputs, giving both polarities.
//
//   y_and  = a & ~b[0] & ... & ~b[N_INV-1]
//   y_nand = ~y_and
//
// In the circuit the inverting inputs sit in the upper differential pair
// and the non-inverting input a, level-shifted by one diode, steers the
// tail current from the lower pair; that makes a slightly slower than the
// b inputs. A variant with the roles swapped (a fast, used where the
// carry must arrive late) has the same logic function, so one model covers
// both. This gate lets a positive-logic H or carry be ANDed with
// negative-logic propagate signals in one gate delay. The function and
// the limit of four inverting inputs follow the published design.
// Combinational, no clock.
module special_and #(
  parameter int unsigned N_INV = 4
) (
  input  logic             a,       // non-inverting input
  input  logic [N_INV-1:0] b,       // inverting inputs
  output logic             y_and,
  output logic             y_nand
);

  always_comb begin
    y_and  = a & ~(|b);
    y_nand = ~y_and;
  end

  initial assert (N_INV >= 1 && N_INV <= 4)
    else $error("special_and: N_INV must be 1 to 4");

endmodule
