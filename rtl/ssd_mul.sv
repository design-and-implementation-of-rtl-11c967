// ssd_mul: 32 x 32 -> 64-bit multiplier built in a single stage.
//
// The whole multiplication is one combinational block (ssd_mul_core) placed
// between an input register and an output register, instead of being cut
// into several short stages with registers in between. The clock period is
// then bounded by the input register's clock-to-out, the one large
// combinational delay and the output register's setup time, and only these
// two register ranks are spent on it.
//
// Interface (names as in the published RTL view of the unit):
//   clk, rst     - rising-edge clock; synchronous, active-high reset that
//                  clears every register to zero
//   enable       - the unit works only while enable is high: both register
//                  ranks load only on an enabled clock edge and hold otherwise
//   opa, opb     - WIDTH-bit two's complement operands
//   product      - 2*WIDTH-bit product opa*opb (registered)
//   exponent     - floor(log2|product|), the position of the leading one
//   sign         - product is negative
//   exception    - overflow: the product does not fit in WIDTH signed bits
//
// Timing: operands sampled on an enabled edge appear on the outputs after the
// next enabled edge, so with enable held high the latency is two clock edges
// and a new product leaves every cycle. When enable is low the outputs hold.
//
// From the design: the operand width, the 64-bit product, the enable and
// reset behaviour, the exception output and the one-register-rank-each-side
// single-stage structure. This implementation's own choices: signed
// operands, synchronous reset, the meaning of exponent and of exception,
// and that enable gates both register ranks.
module ssd_mul #(
  parameter int unsigned WIDTH = ssd_pkg::SSD_WIDTH,
  parameter int unsigned EXPW  = ssd_pkg::exp_bits(WIDTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [WIDTH-1:0]   opa,
  input  logic [WIDTH-1:0]   opb,
  output logic [2*WIDTH-1:0] product,
  output logic [EXPW-1:0]    exponent,
  output logic               sign,
  output logic               exception
);

  // Input register rank (FF_in).
  logic [WIDTH-1:0] opa_q, opb_q;

  // Output of the single combinational stage.
  logic [2*WIDTH-1:0] product_d;
  logic [EXPW-1:0]    exponent_d;
  logic               sign_d, exception_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      opa_q <= '0;
      opb_q <= '0;
    end else if (enable) begin
      opa_q <= opa;
      opb_q <= opb;
    end
  end

  ssd_mul_core #(.WIDTH(WIDTH), .EXPW(EXPW)) u_core (
    .a        (opa_q),
    .b        (opb_q),
    .product  (product_d),
    .exponent (exponent_d),
    .sign     (sign_d),
    .exception(exception_d)
  );

  // Output register rank (FF_out): the 64-bit product register.
  always_ff @(posedge clk) begin
    if (rst) begin
      product   <= '0;
      exponent  <= '0;
      sign      <= 1'b0;
      exception <= 1'b0;
    end else if (enable) begin
      product   <= product_d;
      exponent  <= exponent_d;
      sign      <= sign_d;
      exception <= exception_d;
    end
  end

endmodule
