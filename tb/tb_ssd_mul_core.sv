// tb_ssd_mul_core: self-checking test of the multiplier's combinational
// stage. Applies corner operands (0, +-1, most negative, most positive) and
// random operands, and compares product, sign, exponent and the overflow
// flag with values worked out here from 64-bit integer arithmetic and a
// bit-length search written independently of the design.
module tb_ssd_mul_core;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned EXPW  = 6;

  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] product;
  logic [EXPW-1:0]    exponent;
  logic               sign, exception;

  int checks = 0, failures = 0;

  ssd_mul_core #(.WIDTH(WIDTH)) dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] x, input logic [31:0] y);
    longint    p;
    longint    m;
    int        e;
    bit        ovf;
    a = x; b = y;
    #1;
    p   = longint'(signed'(x)) * longint'(signed'(y));
    m   = (p < 0) ? -p : p;
    e   = 0;
    // bit length of |p| minus one; |p| never exceeds 2**62 here
    while (e < 62 && (longint'(1) << (e + 1)) <= m) e++;
    ovf = (p > 64'sd2147483647) || (p < -64'sd2147483648);
    checks++;
    if (product !== p || sign !== (p < 0) || exponent !== EXPW'(e) ||
        exception !== ovf) begin
      failures++;
      $display("FAIL a=%0d b=%0d: got p=%0d s=%0b e=%0d x=%0b, want p=%0d s=%0b e=%0d x=%0b",
               signed'(x), signed'(y), signed'(product), sign, exponent, exception,
               p, p < 0, e, ovf);
    end
  endtask

  logic [31:0] corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                               32'h7FFF_FFFF, 32'h0000_FFFF, 32'hFFFF_0000,
                               32'h0001_0000};

  initial begin
    foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j]);
    repeat (3000) check_one($urandom, $urandom);
    // small operands exercise the overflow boundary
    repeat (1000) check_one(32'($urandom_range(0, 131071)) - 32'd65536,
                            32'($urandom_range(0, 131071)) - 32'd65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
