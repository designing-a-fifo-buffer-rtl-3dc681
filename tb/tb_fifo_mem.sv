// tb_fifo_mem: writes random 128-bit words to random addresses of the
// default 128-entry buffer, keeping a reference copy, and reads every
// address back through the asynchronous read port, also while writes to
// other addresses go on. A write with we low must change nothing.
`timescale 1ns/1ps
module tb_fifo_mem;

  localparam int unsigned DATA_W = meso_pkg::DATA_W_DEF;
  localparam int unsigned DEPTH  = meso_pkg::DEPTH_DEF;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic              clk = 1'b0, we = 1'b0;
  logic [AW-1:0]     waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fifo_mem dut (.clk_tx(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    // fill every entry once
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = rand_word();
      ref_mem[a] = wdata;
    end
    // random writes (some with we low) mixed with reads of random addresses
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom);
      wdata = rand_word();
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < int'(DEPTH); a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL: final addr %0d read %h expected %h", a, rdata, ref_mem[a]);
      end
    end
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
