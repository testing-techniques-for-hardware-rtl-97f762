// tb_xor_combiner: self-checking test of the leave-one-out XOR network.
//
// Drives every one of the 32 input patterns of the R = 4 network (five
// arbiter bits, four responses) and random patterns of an R = 8 instance.
// The expected response j is the parity of all inputs with input j removed,
// computed here as the full parity XOR a[j]. It also checks that each
// response really depends on every input but its own, by flipping one input
// at a time. A watchdog ends the run if it hangs.
module tb_xor_combiner;
  timeunit 1ps;
  timeprecision 1fs;

  logic [4:0] a4;
  logic [3:0] r4;
  logic [8:0] a8;
  logic [7:0] r8;
  int checks = 0, failures = 0;

  xor_combiner dut (.a(a4), .resp(r4));
  xor_combiner #(.R(8)) dut8 (.a(a8), .resp(r8));

  initial begin
    for (int v = 0; v < 32; v++) begin
      a4 = 5'(v);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (r4[j] !== ((^a4) ^ a4[j])) begin
          failures++;
          $display("FAIL R=4 a=%b resp[%0d]=%b", a4, j, r4[j]);
        end
      end
      // Flipping input k must flip every response except response k.
      for (int k = 0; k <= 4; k++) begin
        logic [3:0] prev_r, expect_flip;
        prev_r = r4;
        a4[k] = ~a4[k];
        #1;
        expect_flip = 4'hF;
        if (k < 4) expect_flip[k] = 1'b0;
        checks++;
        if ((prev_r ^ r4) !== expect_flip) begin
          failures++;
          $display("FAIL R=4 flip a[%0d]: responses changed %b", k, prev_r ^ r4);
        end
        a4[k] = ~a4[k];
        #1;
      end
    end
    for (int n = 0; n < 500; n++) begin
      a8 = 9'($urandom());
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (r8[j] !== ((^a8) ^ a8[j])) begin
          failures++;
          $display("FAIL R=8 a=%b resp[%0d]=%b", a8, j, r8[j]);
        end
      end
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
