// div_structural: 32-bit unsigned divider, D = A / B and R = A % B.
//
// Restoring shift-subtract division, one quotient bit per clock. The partial
// remainder and the dividend share one 2*WIDTH-bit shift register {rem, quo}.
// Every step shifts it left by one, subtracts the divisor from the upper
// WIDTH+1 bits, keeps the difference when it is not negative and shifts in a
// quotient bit of 1, or keeps the shifted remainder and shifts in a 0. The
// shift, the subtraction and the restore/keep choice are one combinational
// path, so each quotient bit costs a single clock: the single-stage form of
// the step. After WIDTH steps the upper half holds the remainder and the
// lower half the quotient.
//
// Interface (names as in the published RTL view of the unit):
//   clk, reset - rising-edge clock; synchronous, active-high reset that
//                clears every register to zero
//   start      - sampled high on a clock edge: load A and B and begin; a start
//                while a division runs abandons it and begins the new one
//   A, B       - dividend and divisor, unsigned
//   D          - quotient (valid while ok is high)
//   R          - remainder (valid while ok is high)
//   ok         - the division has finished; stays high until the next start
//   err        - B was zero; set with the start, and D = all ones, R = A
//
// Timing: with start sampled on edge 0, ok rises after edge WIDTH (33 edges
// for 32-bit operands counting the start edge: one load, 32 steps). D and R
// are the working register itself, so they change while ok is low.
//
// From the design: the port list, the start/ok/err behaviour described for
// the unit, and the systematic subtract-at-every-position method. This
// implementation's own choices: unsigned operands, restoring division at one
// bit per clock, synchronous reset, restart on start, and what D and R hold
// after a divide by zero (what the same steps give with a zero divisor).
module div_structural #(
  parameter int unsigned WIDTH = ssd_pkg::SSD_WIDTH,
  parameter int unsigned CNTW  = ssd_pkg::cnt_bits(WIDTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  output logic [WIDTH-1:0] D,
  output logic [WIDTH-1:0] R,
  output logic             err,
  output logic             ok
);

  logic [2*WIDTH-1:0] rq;        // {partial remainder, dividend/quotient}
  logic [WIDTH-1:0]   divisor;
  logic [CNTW-1:0]    steps_left;
  logic               busy;

  // One restoring step.
  logic [WIDTH:0]     trial;     // shifted partial remainder, WIDTH+1 bits
  logic [WIDTH:0]     diff;
  logic               q_bit;
  logic [2*WIDTH-1:0] rq_next;

  always_comb begin
    trial   = rq[2*WIDTH-1:WIDTH-1];
    diff    = trial - {1'b0, divisor};
    // The partial remainder stays below the divisor, so trial < 2*divisor and
    // a non-negative difference fits in WIDTH bits: bit WIDTH of diff is the
    // borrow, set exactly when trial < divisor.
    q_bit   = ~diff[WIDTH];
    rq_next = {(q_bit ? diff[WIDTH-1:0] : trial[WIDTH-1:0]),
               rq[WIDTH-2:0], q_bit};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rq         <= '0;
      divisor    <= '0;
      steps_left <= '0;
      busy       <= 1'b0;
      ok         <= 1'b0;
      err        <= 1'b0;
    end else if (start) begin
      rq         <= {{WIDTH{1'b0}}, A};
      divisor    <= B;
      steps_left <= CNTW'(WIDTH);
      busy       <= 1'b1;
      ok         <= 1'b0;
      err        <= (B == '0);
    end else if (busy) begin
      rq         <= rq_next;
      steps_left <= steps_left - 1'b1;
      if (steps_left == CNTW'(1)) begin
        busy <= 1'b0;
        ok   <= 1'b1;
      end
    end
  end

  assign D = rq[WIDTH-1:0];
  assign R = rq[2*WIDTH-1:WIDTH];

endmodule
