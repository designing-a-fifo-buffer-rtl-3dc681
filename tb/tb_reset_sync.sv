// tb_reset_sync: checks the brute-force reset synchronizer with 2 and 3
// stages: the output must fall at once (between clock edges) when the
// asynchronous reset falls, and rise exactly STAGES clock edges after the
// reset is released in the middle of a cycle.
`timescale 1ns/1ps
module tb_reset_sync;

  logic clk = 1'b0;
  logic arst_n = 1'b1;
  logic rst2_n, rst3_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reset_sync #(.STAGES(2)) u2 (.clk(clk), .arst_n(arst_n), .rst_n(rst2_n));
  reset_sync #(.STAGES(3)) u3 (.clk(clk), .arst_n(arst_n), .rst_n(rst3_n));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < 5; r++) begin
      int e2, e3, n;
      // assert between edges: both outputs must drop without a clock edge
      @(posedge clk); #(1 + r);
      arst_n = 1'b0;
      #0.5;
      check(!rst2_n && !rst3_n, "reset not asserted asynchronously");
      repeat (3) @(posedge clk);
      #1 check(!rst2_n && !rst3_n, "reset released while arst_n low");
      // release mid-cycle and count edges until each output rises
      #(2 + r % 3) arst_n = 1'b1;
      e2 = -1; e3 = -1; n = 0;
      while (n < 8) begin
        @(posedge clk); n++;
        #0.1;
        if (rst2_n && e2 < 0) e2 = n;
        if (rst3_n && e3 < 0) e3 = n;
      end
      check(e2 == 2, $sformatf("2-stage release after %0d edges", e2));
      check(e3 == 3, $sformatf("3-stage release after %0d edges", e3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
