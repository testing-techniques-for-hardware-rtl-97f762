// tb_puf_switch: self-checking test of the switch model.
//
// One switch is driven in both states. With sel = 0 a rising edge on the top
// input must reach the top output after d_tt and one on the bottom input the
// bottom output after d_bb; with sel = 1 top goes to bottom after d_tb and
// bottom to top after d_bt. Arrival times are measured with $realtime and
// compared with the delays the instance drew. The drawn delays themselves are
// checked statistically over 64 switches (256 elements): their mean must lie
// near 500 ps and their spread near 4 ps, as the chosen process model says. A
// switch with EXTRA_PS = 100 must be exactly 100 ps slower on its straight top
// route than the same switch without it, and equal elsewhere. A watchdog ends
// the run if it hangs.
module tb_puf_switch;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NSW = 64;

  logic ti, bi, sel, to, bo;
  logic to_x, bo_x;
  int checks = 0, failures = 0;

  puf_switch #(.SEED(7), .STAGE(3)) dut (.ti(ti), .bi(bi), .sel(sel), .to(to), .bo(bo));
  puf_switch #(.SEED(7), .STAGE(3), .EXTRA_PS(100.0)) dut_x
    (.ti(ti), .bi(bi), .sel(sel), .to(to_x), .bo(bo_x));

  // A population of switches for the delay statistics; their inputs stay low.
  real pop [NSW][4];
  for (genvar s = 0; s < NSW; s++) begin : g_pop
    logic o1, o2;
    puf_switch #(.SEED(11), .STAGE(s)) u (.ti(1'b0), .bi(1'b0), .sel(1'b0), .to(o1), .bo(o2));
    initial begin
      #1;
      pop[s][0] = u.d_tt;
      pop[s][1] = u.d_bb;
      pop[s][2] = u.d_tb;
      pop[s][3] = u.d_bt;
    end
  end

  task automatic close(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 0.001 || exp - got > 0.001) begin
      failures++;
      $display("FAIL %s: %0.4f ps, expected %0.4f ps", what, got, exp);
    end
  endtask

  // Rises one input at a known time and measures when the given output rises.
  task automatic measure(input logic s, input bit from_top, input bit to_top, output real dly);
    realtime t0;
    ti = 1'b0;
    bi = 1'b0;
    sel = s;
    #2000;
    t0 = $realtime;
    if (from_top) ti = 1'b1;
    else bi = 1'b1;
    if (to_top) @(posedge to);
    else @(posedge bo);
    dly = $realtime - t0;
  endtask

  initial begin
    real dly, sum, sq, mean, sd;
    ti = 1'b0;
    bi = 1'b0;
    sel = 1'b0;
    #10;
    measure(1'b0, 1'b1, 1'b1, dly);
    close(dly, dut.d_tt, "straight top to top");
    measure(1'b0, 1'b0, 1'b0, dly);
    close(dly, dut.d_bb, "straight bottom to bottom");
    measure(1'b1, 1'b1, 1'b0, dly);
    close(dly, dut.d_tb, "crossed top to bottom");
    measure(1'b1, 1'b0, 1'b1, dly);
    close(dly, dut.d_bt, "crossed bottom to top");
    // The route not selected must not reach the other output.
    ti = 1'b0;
    bi = 1'b0;
    sel = 1'b0;
    #2000;
    ti = 1'b1;
    #1000;
    checks++;
    if (bo !== 1'b0) begin
      failures++;
      $display("FAIL straight switch passed the top edge to the bottom output");
    end
    // Outlier switch.
    close(dut_x.d_tt - dut.d_tt, 100.0, "outlier adds to straight top delay");
    close(dut_x.d_bb, dut.d_bb, "outlier leaves bottom straight delay");
    close(dut_x.d_tb, dut.d_tb, "outlier leaves crossed delay");
    // Population statistics.
    sum = 0.0;
    sq = 0.0;
    for (int s = 0; s < NSW; s++)
      for (int k = 0; k < 4; k++) begin
        sum += pop[s][k];
        sq += pop[s][k] * pop[s][k];
      end
    mean = sum / (4.0 * NSW);
    sd = $sqrt(sq / (4.0 * NSW) - mean * mean);
    $display("element delays: mean %0.3f ps, sd %0.3f ps", mean, sd);
    checks++;
    if (mean < 499.0 || mean > 501.0) begin
      failures++;
      $display("FAIL mean element delay %0.3f ps", mean);
    end
    checks++;
    if (sd < 3.4 || sd > 4.6) begin
      failures++;
      $display("FAIL element delay spread %0.3f ps", sd);
    end
    checks++;
    if (pop[0][0] == pop[1][0] || pop[0][0] == pop[0][1]) begin
      failures++;
      $display("FAIL element delays repeat");
    end
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
