// tb_ssd_arith_unit_w64: the arithmetic unit configured for 64-bit operands
// (WIDTH = 64: 128-bit product, 7-bit exponent, 65-edge division).
// Multiplier results are compared with a 128-bit multiplication of the
// sign-extended operands done here, and a bit-length search for the exponent;
// divider results with 64-bit unsigned / and %, and the latency with
// WIDTH+1 edges.
module tb_ssd_arith_unit_w64;
  localparam int unsigned WIDTH   = 64;
  localparam int unsigned EXPW    = 7;
  localparam int unsigned LATENCY = WIDTH + 1;

  logic               clk = 1'b0;
  logic               rst;
  logic               mul_enable;
  logic [WIDTH-1:0]   mul_opa, mul_opb;
  logic [2*WIDTH-1:0] mul_product;
  logic [EXPW-1:0]    mul_exponent;
  logic               mul_sign, mul_exception;
  logic               div_start;
  logic [WIDTH-1:0]   div_a, div_b, div_q, div_r;
  logic               div_err, div_ok;

  int checks = 0, failures = 0;

  ssd_arith_unit #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic mul_one(input logic [63:0] x, input logic [63:0] y);
    logic signed [127:0] p, m;
    int                  e;
    bit                  ovf;
    @(negedge clk) begin mul_enable = 1'b1; mul_opa = x; mul_opb = y; end
    @(posedge clk);
    @(negedge clk) mul_enable = 1'b1;
    @(posedge clk); #1;
    p   = $signed({{64{x[63]}}, x}) * $signed({{64{y[63]}}, y});
    m   = (p < 0) ? -p : p;
    e   = 0;
    for (int i = 0; i < 127; i++) if (m >= (128'sd1 <<< i)) e = i;
    ovf = (p[127:63] != {65{p[127]}});
    check(mul_product == p, "product");
    check(mul_sign == (p < 0), "sign");
    check(mul_exponent == EXPW'(e), "exponent");
    check(mul_exception == ovf, "exception");
  endtask

  task automatic div_one(input logic [63:0] a, input logic [63:0] b);
    int edges;
    @(negedge clk) begin div_a = a; div_b = b; div_start = 1'b1; end
    @(posedge clk);
    @(negedge clk) div_start = 1'b0;
    edges = 1;
    while (!div_ok && edges < 4 * LATENCY) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == LATENCY, "division latency");
    check(div_q == ((b == 0) ? '1 : a / b), "quotient");
    check(div_r == ((b == 0) ? a : a % b), "remainder");
    check(div_err == (b == 0), "err");
  endtask

  initial begin
    rst = 1'b1; mul_enable = 1'b0; mul_opa = '0; mul_opb = '0;
    div_start = 1'b0; div_a = '0; div_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    mul_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    mul_one(64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF);
    mul_one(64'd0, rnd64());
    repeat (300) mul_one(rnd64(), rnd64());
    repeat (100) mul_one(64'($signed($urandom)), 64'($signed($urandom)));
    div_one(64'hFFFF_FFFF_FFFF_FFFF, 64'd1);
    div_one(64'd12345, 64'd0);
    repeat (150) div_one(rnd64(), rnd64() >> $urandom_range(0, 63));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
