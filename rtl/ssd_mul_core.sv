// ssd_mul_core: the one large block of combinational logic that sits between
// the operand register and the product register of the single-stage
// multiplier. All of the multiplication happens here in one combinational
// delay; there are no internal registers.
//
// Function: a and b are WIDTH-bit two's complement numbers. The outputs are
//   product   - the full 2*WIDTH-bit two's complement product a*b
//   sign      - 1 when the product is negative (product MSB)
//   exponent  - bit position of the most significant 1 of |product|, that is
//               floor(log2|product|); 0 when the product is 0 or +-1
//   exception - overflow: the product does not fit in a WIDTH-bit two's
//               complement word (it needs the upper half of the result)
//
// The 32-bit operand width, the 64-bit product and the port names product,
// exponent and sign follow the multiplier's published interface. The design
// does not fix the multiplication algorithm, the meaning of the 6-bit
// exponent, signed operands or what counts as an exception; the choices above
// are this implementation's own. The product is written as a plain signed
// multiplication so that synthesis picks the adder/compressor structure
// (or DSP blocks) for the target.
//
// Timing: purely combinational.
module ssd_mul_core #(
  parameter int unsigned WIDTH = ssd_pkg::SSD_WIDTH,
  parameter int unsigned EXPW  = ssd_pkg::exp_bits(WIDTH)
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] product,
  output logic [EXPW-1:0]    exponent,
  output logic               sign,
  output logic               exception
);

  logic signed [2*WIDTH-1:0] a_ext, b_ext;
  logic        [2*WIDTH-1:0] magnitude;

  // Sign-extend both operands to the product width so the multiplication is
  // carried out at full width.
  assign a_ext = {{WIDTH{a[WIDTH-1]}}, a};
  assign b_ext = {{WIDTH{b[WIDTH-1]}}, b};

  always_comb begin
    product   = a_ext * b_ext;
    sign      = product[2*WIDTH-1];
    magnitude = sign ? (~product + 1'b1) : product;

    // Leading-one detector: the last set bit found scanning upward wins.
    exponent = '0;
    for (int unsigned i = 0; i < 2*WIDTH; i++) begin
      if (magnitude[i]) exponent = EXPW'(i);
    end

    // The product fits in WIDTH bits when its top WIDTH+1 bits all equal the
    // sign bit.
    exception = (product[2*WIDTH-1:WIDTH-1] != {(WIDTH+1){sign}});
  end

endmodule
