// tb_puf_row: self-checking test of one 64-switch delay-PUF row.
//
// The testbench reads the element delays every switch of the row drew and
// computes, for each challenge, the arrival times of the two edges at the
// arbiter by walking the path switch by switch (straight or crossed). From
// those it predicts the response (1 if the top path is faster) and the time
// it appears (later arrival plus the 10 ps arbiter delay), and checks both
// against the event-driven model for 300 random challenges and a few fixed
// ones. Further rows check the variation features: a row with a 60 ps delay
// outlier in switch 20, a row with correlated element delays (neighbour
// correlation 0.9), whose delay difference at the arbiter must spread less
// than that of independent delays, and a row with a 30 ps setup and 10 ps hold
// arbiter whose metastable decisions must be exactly those the reference
// places inside the window. A watchdog ends the run if it hangs.
module tb_puf_row;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;
  localparam real TCQ = 10.0;
  localparam real SETTLE = 40_000.0;

  logic launch;
  logic [N-1:0] ch;
  logic resp, resp_o, resp_c, resp_i, resp_m;
  int checks = 0, failures = 0;

  puf_row dut (.launch(launch), .ch(ch), .resp(resp));
  puf_row #(.SEED(1), .OUTLIER_STAGE(20), .OUTLIER_PS(60.0)) dut_o
    (.launch(launch), .ch(ch), .resp(resp_o));
  puf_row #(.SEED(5), .RHO(0.9)) dut_c (.launch(launch), .ch(ch), .resp(resp_c));
  puf_row #(.SEED(5)) dut_i (.launch(launch), .ch(ch), .resp(resp_i));
  puf_row #(.SEED(9), .ST_PS(30.0), .HT_PS(10.0)) dut_m (.launch(launch), .ch(ch), .resp(resp_m));

  // Element delays of each row, in the order tt, bb, tb, bt.
  real d [5][N][4];
  for (genvar i = 0; i < N; i++) begin : g_rd
    initial begin
      #1;
      d[0][i] = '{dut.g_sw[i].u_sw.d_tt, dut.g_sw[i].u_sw.d_bb,
                  dut.g_sw[i].u_sw.d_tb, dut.g_sw[i].u_sw.d_bt};
      d[1][i] = '{dut_o.g_sw[i].u_sw.d_tt, dut_o.g_sw[i].u_sw.d_bb,
                  dut_o.g_sw[i].u_sw.d_tb, dut_o.g_sw[i].u_sw.d_bt};
      d[2][i] = '{dut_c.g_sw[i].u_sw.d_tt, dut_c.g_sw[i].u_sw.d_bb,
                  dut_c.g_sw[i].u_sw.d_tb, dut_c.g_sw[i].u_sw.d_bt};
      d[3][i] = '{dut_i.g_sw[i].u_sw.d_tt, dut_i.g_sw[i].u_sw.d_bb,
                  dut_i.g_sw[i].u_sw.d_tb, dut_i.g_sw[i].u_sw.d_bt};
      d[4][i] = '{dut_m.g_sw[i].u_sw.d_tt, dut_m.g_sw[i].u_sw.d_bb,
                  dut_m.g_sw[i].u_sw.d_tb, dut_m.g_sw[i].u_sw.d_bt};
    end
  end

  // Arrival times of the top and bottom edge at the arbiter of row r.
  function automatic void arrivals(input int r, input logic [N-1:0] c,
                                   output real t_top, output real t_bot);
    real t, b;
    t = 0.0;
    b = 0.0;
    for (int i = 0; i < N; i++) begin
      real nt, nb;
      if (!c[i]) begin
        nt = t + d[r][i][0];
        nb = b + d[r][i][1];
      end else begin
        nt = b + d[r][i][3];
        nb = t + d[r][i][2];
      end
      t = nt;
      b = nb;
    end
    t_top = t;
    t_bot = b;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  real sum_c, sq_c, sum_i, sq_i;
  int n_stat = 0, n_meta_exp = 0, n_out_flip = 0;

  // One challenge: predict, launch, check value and timing on every row.
  task automatic apply(input logic [N-1:0] v);
    real tt, tb, t_late, dt;
    logic exp, old;
    int unsigned m0;
    ch = v;
    #1000;
    arrivals(0, v, tt, tb);
    exp = (tb > tt);
    t_late = (tt > tb) ? tt : tb;
    old = resp;
    m0 = dut_m.u_arb.metastable;
    launch = 1'b1;
    #(t_late + TCQ - 0.5);
    if (exp != old) check(resp, old, "response must not appear before the path delay");
    #1.0;
    check(resp, exp, $sformatf("response to %h", v));
    #(SETTLE - t_late - TCQ - 0.5);
    // Outlier row: same chip as dut, with 60 ps more on switch 20's straight top route.
    arrivals(1, v, tt, tb);
    check(resp_o, tb > tt, "outlier row response");
    if ((tb > tt) != exp) n_out_flip++;
    // Correlated and independent rows: collect the spread of the delay difference.
    arrivals(2, v, tt, tb);
    check(resp_c, tb > tt, "correlated row response");
    sum_c += tb - tt;
    sq_c += (tb - tt) * (tb - tt);
    arrivals(3, v, tt, tb);
    check(resp_i, tb > tt, "independent row response");
    sum_i += tb - tt;
    sq_i += (tb - tt) * (tb - tt);
    n_stat++;
    // Non-ideal arbiter row.
    arrivals(4, v, tt, tb);
    dt = tb - tt;
    if (dt > 30.0) check(resp_m, 1'b1, "non-ideal row, top early");
    else if (dt < -10.0) check(resp_m, 1'b0, "non-ideal row, bottom early");
    else n_meta_exp++;
    launch = 1'b0;
    #(SETTLE);
  endtask

  initial begin
    real var_c, var_i;
    launch = 1'b0;
    ch = '0;
    sum_c = 0.0;
    sq_c = 0.0;
    sum_i = 0.0;
    sq_i = 0.0;
    #(SETTLE);
    apply('0);
    apply('1);
    apply({(N/2){2'b01}});
    for (int k = 0; k < 300; k++) apply({$urandom(), $urandom()});
    checks++;
    if (dut_m.u_arb.metastable != n_meta_exp) begin
      failures++;
      $display("FAIL metastable decisions %0d, reference %0d", dut_m.u_arb.metastable, n_meta_exp);
    end
    checks++;
    if (n_meta_exp == 0) begin
      failures++;
      $display("FAIL no challenge landed in the arbiter window");
    end
    var_c = sq_c / n_stat - (sum_c / n_stat) * (sum_c / n_stat);
    var_i = sq_i / n_stat - (sum_i / n_stat) * (sum_i / n_stat);
    $display("delay difference variance: correlated %0.1f ps^2, independent %0.1f ps^2",
             var_c, var_i);
    $display("metastable decisions %0d, outlier changed %0d responses", n_meta_exp, n_out_flip);
    checks++;
    if (!(var_c < var_i)) begin
      failures++;
      $display("FAIL correlated delays do not reduce the spread at the arbiter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
