// ssd_arith_unit: arithmetic unit made of the single-stage multiplier
// (ssd_mul) and the divider (div_structural), side by side.
//
// The two units share the clock and the reset and are otherwise independent:
// each keeps its own operands, controls and results, and both may run at the
// same time. Ports are the units' own ports with a mul_ or div_ prefix.
//
// Multiplier: mul_enable gates it; operands sampled on an enabled edge give
// their product two enabled edges later, one new product per cycle.
// Divider: a div_start pulse loads div_a / div_b; div_ok rises WIDTH+1 edges
// after the start edge, with div_q the quotient and div_r the remainder;
// div_err flags a zero divisor.
//
// Both units run on 32-bit operands, as the design specifies. Sharing one
// reset between the two is this implementation's choice.
module ssd_arith_unit #(
  parameter int unsigned WIDTH = ssd_pkg::SSD_WIDTH,
  parameter int unsigned EXPW  = ssd_pkg::exp_bits(WIDTH)
) (
  input  logic               clk,
  input  logic               rst,
  // multiplier
  input  logic               mul_enable,
  input  logic [WIDTH-1:0]   mul_opa,
  input  logic [WIDTH-1:0]   mul_opb,
  output logic [2*WIDTH-1:0] mul_product,
  output logic [EXPW-1:0]    mul_exponent,
  output logic               mul_sign,
  output logic               mul_exception,
  // divider
  input  logic               div_start,
  input  logic [WIDTH-1:0]   div_a,
  input  logic [WIDTH-1:0]   div_b,
  output logic [WIDTH-1:0]   div_q,
  output logic [WIDTH-1:0]   div_r,
  output logic               div_err,
  output logic               div_ok
);

  ssd_mul #(.WIDTH(WIDTH), .EXPW(EXPW)) u_mul (
    .clk      (clk),
    .rst      (rst),
    .enable   (mul_enable),
    .opa      (mul_opa),
    .opb      (mul_opb),
    .product  (mul_product),
    .exponent (mul_exponent),
    .sign     (mul_sign),
    .exception(mul_exception)
  );

  div_structural #(.WIDTH(WIDTH)) u_div (
    .clk  (clk),
    .reset(rst),
    .start(div_start),
    .A    (div_a),
    .B    (div_b),
    .D    (div_q),
    .R    (div_r),
    .err  (div_err),
    .ok   (div_ok)
  );

endmodule
