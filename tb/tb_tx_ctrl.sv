// tb_tx_ctrl: checks the transmitter control against a reference model.
// After reset in_ready must stay low for STARTUP+1 cycles. Then in_valid and
// the synchronized pop are driven at random (a pop only when the model holds
// an entry); every cycle in_ready, push, the tail address and the
// occupancy count are compared with the model. The FIFO is small (8
// entries), so it fills and back-pressure is exercised; the test counts that.
`timescale 1ns/1ps
module tb_tx_ctrl;

  localparam int unsigned DEPTH   = 8;
  localparam int unsigned STARTUP = 4;
  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned CW      = $clog2(DEPTH + 1);

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          in_valid = 1'b0, in_ready, pop_sync = 1'b0, push;
  logic [AW-1:0] wr_addr;
  logic [CW-1:0] count;
  int checks = 0, failures = 0, n_full = 0;
  int m_count = 0, m_tail = 0;

  always #5 clk = ~clk;

  tx_ctrl #(.DEPTH(DEPTH), .STARTUP(STARTUP)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .pop_sync(pop_sync), .push(push), .wr_addr(wr_addr), .count(count)
  );

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    int wait_cycles;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    in_valid = 1'b1;
    wait_cycles = 0;
    @(negedge clk);
    while (!in_ready && wait_cycles < 20) begin
      @(negedge clk);
      wait_cycles++;
    end
    // the first negedge checked follows one clock edge after the release
    check(wait_cycles + 1 == int'(STARTUP) + 1, $sformatf("startup hold %0d edges", wait_cycles + 1));
    in_valid = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < 60);
      pop_sync = (m_count > 0) && ($urandom_range(0, 99) < 40);
      #1;
      begin
        automatic logic exp_ready = (m_count != int'(DEPTH));
        check(in_ready == exp_ready, $sformatf("in_ready=%0b model count %0d", in_ready, m_count));
        check(push == (in_valid && exp_ready), "push");
        check(int'(wr_addr) == m_tail, $sformatf("wr_addr=%0d expected %0d", wr_addr, m_tail));
        check(int'(count) == m_count, $sformatf("count=%0d expected %0d", count, m_count));
        if (in_valid && !exp_ready) n_full++;
        if (in_valid && exp_ready) m_tail = (m_tail + 1) % int'(DEPTH);
        m_count = m_count + int'(in_valid && exp_ready) - int'(pop_sync);
      end
    end
    check(n_full > 0, "FIFO never full");
    $display("back-pressure cycles: %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
