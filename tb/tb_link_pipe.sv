// tb_link_pipe: drives random bytes into a 3-stage link pipeline and checks
// that each comes out exactly three cycles later, that the stages come out
// of reset empty, and that the 0-stage form is a plain wire.
`timescale 1ns/1ps
module tb_link_pipe;

  localparam int STAGES = 3;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [7:0] d = '0, q, q0;
  logic [7:0] hist[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  link_pipe #(.STAGES(STAGES), .WIDTH(8)) dut  (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  link_pipe #(.STAGES(0),      .WIDTH(8)) dut0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q0));

  initial begin
    #1 rst_n = 1'b0;
    d = 8'hff;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL: not cleared by reset"); end
    d = 8'h00;
    rst_n = 1'b1;
    for (int i = 0; i < STAGES; i++) hist.push_back(8'h00);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      d = 8'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL: 0-stage q=%h d=%h", q0, d); end
      @(posedge clk);
      hist.push_back(d);
      void'(hist.pop_front());
      #1;
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("FAIL: cycle %0d q=%h expected %h", k, q, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
