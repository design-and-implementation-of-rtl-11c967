// tb_div_structural: self-checking test of the 32-bit divider.
// For corner and random operands it pulses start, counts clock edges until
// ok rises and checks that this takes exactly WIDTH+1 edges (the start edge
// plus one edge per quotient bit), that ok stays low before that, and that
// D, R and err match A/B and A%B computed here (divide by zero: err high,
// D all ones, R = A). It also checks reset, that ok holds after a division,
// and that a start during a division abandons it and delivers the new one.
module tb_div_structural;
  localparam int unsigned WIDTH   = 32;
  localparam int unsigned LATENCY = WIDTH + 1;

  logic             clk = 1'b0;
  logic             reset, start;
  logic [WIDTH-1:0] A, B, D, R;
  logic             err, ok;

  int checks = 0, failures = 0;

  div_structural #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (A=%0d B=%0d D=%0d R=%0d err=%0b ok=%0b)", what, A, B, D, R, err, ok);
    end
  endtask

  // Runs one division and checks its result and its latency.
  task automatic divide(input logic [31:0] a, input logic [31:0] b);
    int          edges;
    logic [31:0] q_ref, r_ref;
    @(negedge clk) begin A = a; B = b; start = 1'b1; end
    @(posedge clk);
    @(negedge clk) begin start = 1'b0; A = $urandom; B = $urandom; end
    edges = 1;
    while (!ok && edges < 4 * LATENCY) begin
      @(posedge clk); #1;
      edges++;
    end
    q_ref = (b == 0) ? 32'hFFFF_FFFF : a / b;
    r_ref = (b == 0) ? a : a % b;
    A = a; B = b;   // for the messages
    check(edges == LATENCY, $sformatf("latency %0d edges, want %0d", edges, LATENCY));
    check(D == q_ref, "quotient");
    check(R == r_ref, "remainder");
    check(err == (b == 0), "err");
  endtask

  logic [31:0] corners [7] = '{32'h0, 32'h1, 32'h2, 32'h7FFF_FFFF, 32'h8000_0000,
                               32'hFFFF_FFFE, 32'hFFFF_FFFF};

  initial begin
    reset = 1'b1; start = 1'b0; A = '0; B = '0;
    repeat (2) @(posedge clk);
    #1 check(D == 0 && R == 0 && !ok && !err, "reset clears outputs");
    @(negedge clk) reset = 1'b0;

    foreach (corners[i]) foreach (corners[j]) divide(corners[i], corners[j]);
    repeat (300) divide($urandom, $urandom);
    repeat (300) divide($urandom, $urandom >> $urandom_range(0, 31));

    // ok and the results hold after a division
    divide(32'd1000, 32'd7);
    repeat (10) @(posedge clk);
    #1 check(ok && D == 142 && R == 6 && !err, "result holds");

    // restart: a start in the middle of a division begins the new one
    @(negedge clk) begin A = 32'd12345; B = 32'd0; start = 1'b1; end
    @(negedge clk) start = 1'b0;
    repeat (10) @(negedge clk);
    #1 check(!ok, "busy division has ok low");
    divide(32'd99, 32'd10);
    check(D == 9 && R == 9 && !err, "restart delivers the new division");

    // reset in the middle of a division
    @(negedge clk) begin A = 32'd50; B = 32'd3; start = 1'b1; end
    @(negedge clk) begin start = 1'b0; end
    repeat (5) @(negedge clk);
    reset = 1'b1;
    @(posedge clk); #1;
    check(D == 0 && R == 0 && !ok && !err, "reset during division");
    @(negedge clk) reset = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    #1 check(!ok, "no result after reset without start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
