// tb_meso_sync: checks the 4-slot mesochronous synchronizer at eight clock
// phases. The reader clock is the writer clock delayed by 0 to 9 ns of a
// 10 ns period (changed under reset). A random bit is written every writer
// cycle; the bits read every reader cycle must be the same sequence, each
// bit exactly once, delayed by 1 to 3 reader cycles (measured from the
// writer edge that stores the bit to the reader edge that samples it).
`timescale 1ns/1ps
module tb_meso_sync;

  localparam int PERIOD = 10;
  localparam int N      = 400;

  logic clk_wr = 1'b0, clk_rd = 1'b0;
  logic arst_n = 1'b1;
  logic d = 1'b0, q;
  int   checks = 0, failures = 0;
  int   phase = 0, shift = 0;

  always #(PERIOD/2) clk_wr = ~clk_wr;
  initial forever begin
    #(PERIOD/2) clk_rd = ~clk_rd;
    if (shift != 0) begin
      #(shift);
      shift = 0;
    end
  end

  meso_sync dut (
    .clk_wr(clk_wr), .rst_wr_n(arst_n), .d(d),
    .clk_rd(clk_rd), .rst_rd_n(arst_n), .q(q)
  );

  // sent[k]: bit stored at writer edge k; got[j]: bit sampled at reader edge j
  logic sent[N];
  logic got[N + 8];
  int   wr_k = -1, rd_j = -1;
  logic run = 1'b0;

  always @(posedge clk_wr) if (run && wr_k >= 0 && wr_k < N) sent[wr_k] = d;
  always @(posedge clk_wr) if (run) wr_k++;
  always @(posedge clk_rd) if (run) begin
    rd_j++;
    if (rd_j >= 0 && rd_j < N + 8) got[rd_j] = q;
  end

  int phases[8] = '{0, 1, 3, 4, 5, 6, 8, 9};

  initial begin
    for (int r = 0; r < 8; r++) begin
      int lag, ones_s, ones_g;
      #1 arst_n = 1'b0;
      run = 1'b0;
      #(2*PERIOD);
      shift = (phases[r] - phase + PERIOD) % PERIOD;
      phase = phases[r];
      #(3*PERIOD);
      // release both counters just after a writer edge; the reader leaves
      // reset on its next edge
      @(posedge clk_wr); #1;
      arst_n = 1'b1;
      wr_k = -1; rd_j = -1;
      run = 1'b1;
      for (int k = 0; k < N + 8; k++) begin
        @(negedge clk_wr);
        d = (k < N) ? 1'($urandom) : 1'b0;
      end
      repeat (8) @(negedge clk_wr);
      // find the lag: reader edge index minus writer edge index
      lag = -1;
      for (int l = 0; l <= 5 && lag < 0; l++) begin
        automatic bit ok = 1;
        for (int k = 1; k < N; k++) if (got[k + l] !== sent[k]) ok = 0;
        if (ok) lag = l;
      end
      ones_s = 0; ones_g = 0;
      for (int k = 1; k < N; k++) ones_s += int'(sent[k]);
      for (int k = 1; k < N; k++) if (lag >= 0) ones_g += int'(got[k + lag]);
      checks++;
      if (lag < 1 || lag > 3) begin
        failures++;
        $display("FAIL: phase %0d ns: sequence not delivered with a lag of 1..3 (lag %0d)", phases[r], lag);
      end else
        $display("phase %0d ns: delivered %0d pulses with a lag of %0d cycles", phases[r], ones_g, lag);
      checks++;
      if (ones_s != ones_g) begin
        failures++;
        $display("FAIL: %0d pulses sent, %0d received", ones_s, ones_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
