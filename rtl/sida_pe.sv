// SIDA processing element: y = (a (x) b) (+) c, with (x) and (+) each chosen
// from multiply, saturating add, min, max, and, or (and "pass a" for (+)).
// The same element serves the OS, E-Wise and IS cores: a semiring
// multiply-accumulate for the products, and a fused element-wise operation
// (y (x) scalar) (+) w for the E-Wise core. Combinational.
// The document states that the PEs of the three cores are identical and
// support mul-add, and-or and min-add; the two-operator form is a choice of
// this design.
module sida_pe
  import sida_pkg::*;
(
  input  alu_e  mul_op,
  input  alu_e  add_op,
  input  val_t  a,
  input  val_t  b,
  input  val_t  c,
  output val_t  y
);
  assign y = alu(add_op, alu(mul_op, a, b), c);
endmodule
