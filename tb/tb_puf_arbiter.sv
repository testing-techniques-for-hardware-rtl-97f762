// tb_puf_arbiter: self-checking test of the arbiter model.
//
// Two arbiters are raced side by side: an ideal one (no setup or hold time)
// and one with a 30 ps setup and 10 ps hold time. Each race lowers both
// inputs, then raises them dt picoseconds apart (dt > 0: the first input wins).
// Checked against the decision rule: 1 when dt > ST, 0 when dt < -HT, and a
// metastable decision, counted by the model, in between; the output must
// keep its old value until 10 ps (the clock-to-output delay) after the later
// edge and hold the new one from then on; a metastable arbiter must settle
// both ways about equally often; and a decided arbiter must ignore further
// edges until both inputs are low again. A watchdog ends the run if it hangs.
module tb_puf_arbiter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCQ = 10.0;

  logic a, b, q_id, q_nd;
  int checks = 0, failures = 0;

  puf_arbiter ideal (.a(a), .b(b), .q(q_id));
  puf_arbiter #(.ST_PS(30.0), .HT_PS(10.0)) nonideal (.a(a), .b(b), .q(q_nd));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Race with a rising edge on a at time 0 and on b at time dt (either order).
  task automatic race(input real dt);
    a = 1'b0;
    b = 1'b0;
    #200;
    if (dt >= 0.0) begin
      a = 1'b1;
      #(dt);
      b = 1'b1;
    end else begin
      b = 1'b1;
      #(-dt);
      a = 1'b1;
    end
  endtask

  initial begin
    int unsigned m0;
    int ones;
    logic old_id;
    a = 1'b0;
    b = 1'b0;
    #100;
    // Decision rule and output timing of the ideal arbiter.
    for (int k = 0; k < 8; k++) begin
      real dt;
      logic exp;
      dt = (k % 2 == 0) ? (5.0 + 3.0 * k) : -(5.0 + 3.0 * k);
      exp = (dt > 0.0);
      old_id = q_id;
      race(dt);
      #(TCQ - 1.0);
      check(q_id, old_id, $sformatf("ideal output held before clock-to-output, dt=%0.1f", dt));
      #2.0;
      check(q_id, exp, $sformatf("ideal decision dt=%0.1f", dt));
      // Further edges while decided are ignored.
      a = 1'b0;
      #20;
      a = 1'b1;
      #50;
      check(q_id, exp, "ideal output kept until re-armed");
    end
    // Asymmetric setup/hold: outside the window the answer is fixed.
    for (int k = 0; k < 6; k++) begin
      real dt;
      dt = (k % 2 == 0) ? (31.0 + 7.0 * k) : -(11.0 + 7.0 * k);
      m0 = nonideal.metastable;
      race(dt);
      #(TCQ + 1.0);
      check(q_nd, dt > 0.0, $sformatf("non-ideal decision dt=%0.1f", dt));
      checks++;
      if (nonideal.metastable != m0) begin
        failures++;
        $display("FAIL dt=%0.1f counted as metastable", dt);
      end
    end
    // Inside the window: 20 ps (top early, but within setup) and -5 ps.
    ones = 0;
    m0 = nonideal.metastable;
    for (int k = 0; k < 400; k++) begin
      race((k % 2 == 0) ? 20.0 : -5.0);
      #(TCQ + 1.0);
      check(q_id, (k % 2 == 0), "ideal arbiter decides inside the other's window");
      ones += int'(q_nd);
    end
    checks++;
    if (nonideal.metastable - m0 != 400) begin
      failures++;
      $display("FAIL metastable count %0d, expected 400", nonideal.metastable - m0);
    end
    checks++;
    if (ones < 150 || ones > 250) begin
      failures++;
      $display("FAIL metastable outcomes not balanced: %0d ones of 400", ones);
    end
    checks++;
    if (ideal.decisions != 8 + 6 + 400) begin
      failures++;
      $display("FAIL ideal arbiter made %0d decisions", ideal.decisions);
    end
    $display("metastable decisions: %0d, settled to 1: %0d", nonideal.metastable, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
