// tb_ssd_mul: self-checking test of the single-stage multiplier.
// Checks that reset clears the outputs, that with enable held high a product
// appears exactly two clock edges after its operands are applied (and not
// after one), that a new product leaves every cycle, and that the outputs
// hold while enable is low. A random run with enable toggling compares every
// cycle against a two-rank register model kept here, whose values come from
// 64-bit integer arithmetic.
module tb_ssd_mul;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned EXPW  = 6;

  logic               clk = 1'b0;
  logic               rst, enable;
  logic [WIDTH-1:0]   opa, opb;
  logic [2*WIDTH-1:0] product;
  logic [EXPW-1:0]    exponent;
  logic               sign, exception;

  int checks = 0, failures = 0;

  ssd_mul #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    longint p;
    int     e;
    bit     s;
    bit     x;
  } res_t;

  function automatic res_t ref_mul(logic [31:0] x, logic [31:0] y);
    res_t   r;
    longint m;
    r.p = longint'(signed'(x)) * longint'(signed'(y));
    m   = (r.p < 0) ? -r.p : r.p;
    r.e = 0;
    while (r.e < 62 && (longint'(1) << (r.e + 1)) <= m) r.e++;
    r.s = (r.p < 0);
    r.x = (r.p > 64'sd2147483647) || (r.p < -64'sd2147483648);
    return r;
  endfunction

  task automatic expect_out(input res_t r, input string what);
    checks++;
    if (product !== r.p || exponent !== EXPW'(r.e) || sign !== r.s ||
        exception !== r.x) begin
      failures++;
      $display("FAIL %s: got p=%0d e=%0d s=%0b x=%0b want p=%0d e=%0d s=%0b x=%0b",
               what, signed'(product), exponent, sign, exception, r.p, r.e, r.s, r.x);
    end
  endtask

  // reference model of the two register ranks
  logic [31:0] ma, mb;
  res_t        mout;

  initial begin
    res_t zero;
    zero = '{p: 0, e: 0, s: 0, x: 0};
    rst = 1'b1; enable = 1'b1; opa = 32'd1234; opb = 32'd5678;
    repeat (3) @(posedge clk);
    #1 expect_out(zero, "reset");
    @(negedge clk) rst = 1'b0;

    // latency: operands applied before edge 1, product after edge 2
    opa = 32'hFFFF_FFF9; opb = 32'd6;           // -7 * 6
    @(posedge clk); #1;
    expect_out(zero, "not yet after one edge");
    @(negedge clk) begin opa = 32'h8000_0000; opb = 32'h8000_0000; end
    @(posedge clk); #1;
    expect_out(ref_mul(32'hFFFF_FFF9, 32'd6), "after two edges");
    // throughput: next product one cycle later
    @(negedge clk) begin opa = 32'd3; opb = 32'd5; end
    @(posedge clk); #1;
    expect_out(ref_mul(32'h8000_0000, 32'h8000_0000), "back-to-back");

    // stall: with enable low nothing moves, even with new operands
    @(negedge clk) begin enable = 1'b0; opa = 32'd99; opb = 32'd99; end
    repeat (4) begin
      @(posedge clk); #1;
      expect_out(ref_mul(32'h8000_0000, 32'h8000_0000), "hold while disabled");
    end
    @(negedge clk) enable = 1'b1;   // operands 3*5 still in the input rank
    @(posedge clk); #1;
    expect_out(ref_mul(32'd3, 32'd5), "resume after stall");

    // random run against the register model
    @(negedge clk) begin rst = 1'b1; end
    @(posedge clk); #1 expect_out(zero, "second reset");
    ma = 0; mb = 0; mout = zero;
    repeat (5000) begin
      @(negedge clk);
      rst    = 1'b0;
      enable = ($urandom_range(0, 3) != 0);
      opa = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(0, 200)) - 32'd100;
      opb = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(0, 200)) - 32'd100;
      @(posedge clk);
      if (enable) begin
        mout = ref_mul(ma, mb);
        ma = opa; mb = opb;
      end
      #1 expect_out(mout, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
