// tb_ssd_arith_unit: end-to-end test of the arithmetic unit at its default
// 32-bit size. The multiplier and the divider run at the same time from two
// concurrent processes on the shared clock.
//
// Multiplier process: random operands with enable toggling, compared every
// cycle with a model of the two register ranks (values from 64-bit integer
// arithmetic). Divider process: a chain of divisions, some with a zero
// divisor, some abandoned by an early start, each checked for its result and
// its WIDTH+1-edge latency. Each mechanism of the unit is counted: multiplier
// stalls (enable low), overflow exceptions, negative products, completed
// divisions, divide-by-zero errors and restarted divisions; one that never
// happened counts as a failure.
module tb_ssd_arith_unit;
  localparam int unsigned LATENCY = 33;

  logic        clk = 1'b0;
  logic        rst;
  logic        mul_enable;
  logic [31:0] mul_opa, mul_opb;
  logic [63:0] mul_product;
  logic [5:0]  mul_exponent;
  logic        mul_sign, mul_exception;
  logic        div_start;
  logic [31:0] div_a, div_b, div_q, div_r;
  logic        div_err, div_ok;

  int checks = 0, failures = 0;
  int n_stall = 0, n_exception = 0, n_negative = 0;
  int n_div = 0, n_div_zero = 0, n_restart = 0;

  ssd_arith_unit dut (.*);

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

  // ---------------- multiplier ----------------
  task automatic run_mul();
    logic [31:0] ma = '0, mb = '0;
    longint      p = 0, m;
    int          e = 0;
    repeat (3000) begin
      @(negedge clk);
      mul_enable = ($urandom_range(0, 4) != 0);
      mul_opa = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(0, 400)) - 32'd200;
      mul_opb = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(0, 400)) - 32'd200;
      @(posedge clk);
      if (mul_enable) begin
        p = longint'(signed'(ma)) * longint'(signed'(mb));
        m = (p < 0) ? -p : p;
        e = 0;
        while (e < 62 && (longint'(1) << (e + 1)) <= m) e++;
        ma = mul_opa; mb = mul_opb;
      end else begin
        n_stall++;
      end
      #1;
      check(mul_product == p, "product");
      check(mul_sign == (p < 0), "sign");
      check(mul_exponent == 6'(e), "exponent");
      check(mul_exception == ((p > 64'sd2147483647) || (p < -64'sd2147483648)), "exception");
      if (mul_exception) n_exception++;
      if (mul_sign) n_negative++;
    end
  endtask

  // ---------------- divider ----------------
  task automatic run_div();
    logic [31:0] a, b;
    int          edges;
    repeat (60) begin
      a = $urandom;
      case ($urandom_range(0, 5))
        0:       b = '0;
        1:       b = 32'($urandom_range(1, 20));
        default: b = $urandom >> $urandom_range(0, 31);
      endcase
      // now and then start a division and abandon it a few cycles later
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk) begin div_a = $urandom; div_b = $urandom; div_start = 1'b1; end
        @(negedge clk) div_start = 1'b0;
        repeat ($urandom_range(1, 20)) @(negedge clk);
        n_restart++;
      end
      @(negedge clk) begin div_a = a; div_b = b; div_start = 1'b1; end
      @(posedge clk);
      @(negedge clk) begin div_start = 1'b0; div_a = $urandom; div_b = $urandom; end
      edges = 1;
      while (!div_ok && edges < 4 * LATENCY) begin
        @(posedge clk); #1;
        edges++;
      end
      check(edges == LATENCY, "division latency");
      check(div_q == ((b == 0) ? 32'hFFFF_FFFF : a / b), "quotient");
      check(div_r == ((b == 0) ? a : a % b), "remainder");
      check(div_err == (b == 0), "err");
      n_div++;
      if (div_err) n_div_zero++;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; mul_enable = 1'b0; mul_opa = '0; mul_opb = '0;
    div_start = 1'b0; div_a = '0; div_b = '0;
    repeat (3) @(posedge clk);
    #1 check(mul_product == 0 && !mul_exception && !div_ok && !div_err && div_q == 0,
             "reset state");
    @(negedge clk) rst = 1'b0;
    fork
      run_mul();
      run_div();
    join
    check(n_stall > 0, "multiplier stall exercised");
    check(n_exception > 0, "multiplier overflow exercised");
    check(n_negative > 0, "negative product exercised");
    check(n_div > 0, "division exercised");
    check(n_div_zero > 0, "divide by zero exercised");
    check(n_restart > 0, "division restart exercised");
    $display("mechanisms: stall=%0d exception=%0d negative=%0d divisions=%0d div_by_zero=%0d restart=%0d",
             n_stall, n_exception, n_negative, n_div, n_div_zero, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
