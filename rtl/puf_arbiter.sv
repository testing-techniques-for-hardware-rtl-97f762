// puf_arbiter: behavioural model of the arbiter that ends a delay-PUF row.
//
// This is not synthesizable logic: the arbiter turns the arrival-time
// difference of two rising edges into one bit, and the model measures that
// difference in simulation time. The output is 1 when the first input (the
// top path) rises earlier than the second (the bottom path) and 0 otherwise.
//
// A real arbiter is a latch or flip-flop with setup and hold times. Here the
// top path plays the data input and the bottom path the clock: with
// dt = t(b) - t(a), the result is 1 for dt > ST_PS, 0 for dt < -HT_PS, and in
// between the arbiter is metastable and settles to 0 or 1 with equal
// probability. ST_PS = HT_PS = 0 is an ideal arbiter. The count of decisions
// and of metastable ones is kept in decisions and metastable.
//
// Timing: q changes TCQ_PS after the later of the two rising edges and then
// holds. The arbiter re-arms when both inputs are low again, so the next race
// starts with a falling edge of the launch signal followed by a rising one.
// The decision rule and the equally likely outcome of a setup/hold violation
// follow the published description; mapping the top path to the data input,
// the clock-to-output delay and the re-arming rule are this model's choices.
module puf_arbiter #(
  parameter real ST_PS  = 0.0,   // setup time
  parameter real HT_PS  = 0.0,   // hold time
  parameter real TCQ_PS = 10.0   // clock-to-output delay
) (
  input  logic a,  // first input: top path
  input  logic b,  // second input: bottom path
  output logic q   // 1 if a rose first
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime     t_a, t_b;
  logic        a_prev, b_prev;
  logic        got_a, got_b, decided;
  logic        q_r;
  int unsigned decisions;
  int unsigned metastable;

  initial begin
    a_prev     = 1'b0;
    b_prev     = 1'b0;
    got_a      = 1'b0;
    got_b      = 1'b0;
    decided    = 1'b0;
    q_r        = 1'b0;
    decisions  = 0;
    metastable = 0;
  end

  always @(a or b) begin
    realtime dt;
    logic    v;
    if (a && !a_prev && !got_a) begin
      got_a = 1'b1;
      t_a   = $realtime;
    end
    if (b && !b_prev && !got_b) begin
      got_b = 1'b1;
      t_b   = $realtime;
    end
    if (got_a && got_b && !decided) begin
      decided = 1'b1;
      dt = t_b - t_a;
      if (dt > ST_PS) v = 1'b1;
      else if (dt < -HT_PS) v = 1'b0;
      else begin
        v = 1'($urandom_range(1));
        metastable++;
      end
      decisions++;
      q_r <= #(TCQ_PS) v;
    end
    if (!a && !b) begin
      got_a   = 1'b0;
      got_b   = 1'b0;
      decided = 1'b0;
    end
    a_prev = a;
    b_prev = b;
  end

  assign q = q_r;

endmodule
