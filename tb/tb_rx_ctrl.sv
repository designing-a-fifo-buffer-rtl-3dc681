// tb_rx_ctrl: checks the receiver control against a reference model.
// Synchronized pushes (only while the model holds fewer than DEPTH entries)
// and out_ready are driven at random; every cycle out_valid, pop, the head
// address and the count are compared with the model. Runs of pushes without
// reads and reads without pushes make the queue both fill and run empty.
`timescale 1ns/1ps
module tb_rx_ctrl;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          push_sync = 1'b0, out_valid, out_ready = 1'b0, pop;
  logic [AW-1:0] rd_addr;
  logic [CW-1:0] count;
  int checks = 0, failures = 0, n_empty = 0, n_full = 0;
  int m_count = 0, m_head = 0;

  always #5 clk = ~clk;

  rx_ctrl #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .push_sync(push_sync),
    .out_valid(out_valid), .out_ready(out_ready), .pop(pop),
    .rd_addr(rd_addr), .count(count)
  );

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      automatic int pp = ((k / 200) % 3 == 0) ? 80 : ((k / 200) % 3 == 1) ? 20 : 50;
      @(negedge clk);
      push_sync = (m_count < int'(DEPTH)) && ($urandom_range(0, 99) < pp);
      out_ready = ($urandom_range(0, 99) < 50);
      #1;
      begin
        automatic logic exp_valid = (m_count != 0);
        check(out_valid == exp_valid, $sformatf("out_valid=%0b model count %0d", out_valid, m_count));
        check(pop == (exp_valid && out_ready), "pop");
        check(int'(rd_addr) == m_head, $sformatf("rd_addr=%0d expected %0d", rd_addr, m_head));
        check(int'(count) == m_count, $sformatf("count=%0d expected %0d", count, m_count));
        if (!exp_valid) n_empty++;
        if (m_count == int'(DEPTH)) n_full++;
        if (exp_valid && out_ready) m_head = (m_head + 1) % int'(DEPTH);
        m_count = m_count + int'(push_sync) - int'(exp_valid && out_ready);
      end
    end
    check(n_empty > 0 && n_full > 0, "queue never both empty and full");
    $display("empty cycles %0d, full cycles %0d", n_empty, n_full);
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
