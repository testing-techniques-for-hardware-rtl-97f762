// tb_challenge_xform: self-checking test of the XOR input network.
//
// Applies corner cases and random challenges to a 64-bit instance and checks
// two things per vector, each against values computed here: the output bits
// d[i] = c[i] ^ c[i+1] (d[N-1] = c[N-1]), and the property the network exists
// for, namely that the parity of d[i..N-1] gives back c[i] for every i. A
// watchdog ends the run if it hangs.
module tb_challenge_xform;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;

  logic [N-1:0] c, d;
  int checks = 0, failures = 0;

  challenge_xform #(.N(N)) dut (.c(c), .d(d));

  task automatic check_vec(input logic [N-1:0] v);
    logic [N-1:0] exp_d;
    logic p;
    c = v;
    #1;
    for (int i = 0; i < N; i++) exp_d[i] = (i == N - 1) ? v[i] : (v[i] ^ v[i+1]);
    checks++;
    if (d !== exp_d) begin
      failures++;
      $display("FAIL c=%h d=%h expected %h", v, d, exp_d);
    end
    // Suffix parity of d must reproduce c bit by bit.
    p = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      p ^= d[i];
      checks++;
      if (p !== v[i]) begin
        failures++;
        $display("FAIL parity of d[%0d..%0d] = %b, c[%0d] = %b", i, N - 1, p, i, v[i]);
      end
    end
  endtask

  initial begin
    check_vec('0);
    check_vec('1);
    for (int i = 0; i < N; i++) check_vec(N'(1) << i);
    check_vec({(N/2){2'b01}});
    check_vec({(N/2){2'b10}});
    for (int k = 0; k < 2000; k++) check_vec({$urandom(), $urandom()});
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
