// tb_meso_fifo: end-to-end test of the mesochronous dual-clock FIFO at its
// default size (128-bit words, 128 entries, 4-slot synchronizers).
//
// The receiver clock is a copy of the transmitter clock delayed by a phase
// that is changed, under reset, between rounds (eight phases from 0 to 9 ns
// of a 10 ns period), and the reset is released at varying times. In each round the test
//   - sends one word into an empty FIFO and checks the forward latency,
//   - streams 300 words with both sides always ready and checks that one
//     word per cycle goes in and comes out with no bubble,
//   - fills the FIFO with the receiver stalled, checks that exactly DEPTH
//     words are accepted before tx_ready falls, then drains it,
//   - runs random valid/ready traffic for 2000 cycles.
// A scoreboard checks every word's value and order. Mechanisms counted:
// full (back-pressure), empty, push and pop in the same cycle, gap-free
// streaming; each must happen at least once.
`timescale 1ns/1ps
module tb_meso_fifo;

  localparam int unsigned DATA_W = meso_pkg::DATA_W_DEF;
  localparam int unsigned DEPTH  = meso_pkg::DEPTH_DEF;
  localparam int          PERIOD = 10;

  logic              arst_n = 1'b1;
  logic              clk_tx = 1'b0, clk_rx = 1'b0;
  logic              tx_valid = 1'b0, tx_ready;
  logic [DATA_W-1:0] tx_data = '0;
  logic              rx_valid, rx_ready = 1'b0;
  logic [DATA_W-1:0] rx_data;

  meso_fifo dut (
    .arst_n(arst_n),
    .clk_tx(clk_tx), .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_data(tx_data),
    .clk_rx(clk_rx), .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_data(rx_data)
  );

  // ---- clocks: rx is tx delayed by 'phase' ------------------------------
  int phase = 0;
  always #(PERIOD/2) clk_tx = ~clk_tx;
  // clk_rx runs free; a phase change stretches one of its half periods
  int shift = 0;
  initial forever begin
    #(PERIOD/2) clk_rx = ~clk_rx;
    if (shift != 0) begin
      #(shift);
      shift = 0;
    end
  end

  // ---- bookkeeping ---------------------------------------------------------
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0, n_stream = 0, n_latency = 0;
  longint tx_cyc = 0, rx_cyc = 0;
  logic [DATA_W-1:0] sb[$];
  longint acc_cyc[$];   // rx cycle count at acceptance, for latency
  int accepted = 0, delivered = 0;
  int lat_min = 1000, lat_max = 0;
  longint first_pop = -1, last_pop = -1;
  logic  measure_lat = 1'b0;
  logic  push_now = 1'b0;

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  always @(posedge clk_tx) begin
    tx_cyc++;
    push_now = 1'b0;
    if (arst_n && tx_valid && tx_ready) begin
      sb.push_back(tx_data);
      acc_cyc.push_back(rx_cyc);
      accepted++;
      push_now = 1'b1;
    end
    if (arst_n && tx_valid && !tx_ready && accepted > 0) n_full++;
  end

  always @(posedge clk_rx) begin
    rx_cyc++;
    if (arst_n && rx_valid && rx_ready) begin
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL: word delivered with empty scoreboard");
      end else begin
        automatic logic [DATA_W-1:0] exp = sb.pop_front();
        automatic longint a = acc_cyc.pop_front();
        if (rx_data !== exp) begin
          failures++;
          $display("FAIL: data %h expected %h", rx_data, exp);
        end
        if (measure_lat) begin
          automatic int l = int'(rx_cyc - a);
          if (l < lat_min) lat_min = l;
          if (l > lat_max) lat_max = l;
        end
      end
      delivered++;
      if (first_pop < 0) first_pop = rx_cyc;
      last_pop = rx_cyc;
      if (push_now) n_both++;
    end
    if (arst_n && !rx_valid && delivered > 0 && sb.size() == 0) n_empty++;
  end

  // ---- stimulus helpers ----------------------------------------------------
  task automatic do_reset(int p, int rel);
    arst_n   = 1'b0;
    tx_valid = 1'b0;
    rx_ready = 1'b0;
    #(3*PERIOD);
    shift = (p - phase + PERIOD) % PERIOD;
    phase = p;
    #(3*PERIOD + 1 + 4*rel);
    arst_n = 1'b1;
    sb.delete();
    acc_cyc.delete();
    accepted  = 0;
    delivered = 0;
    // wait until the transmitter accepts data
    do @(negedge clk_tx); while (!tx_ready);
  endtask

  task automatic wait_drained(int max_cycles);
    int n = 0;
    while (sb.size() != 0 && n < max_cycles) begin
      @(negedge clk_rx);
      n++;
    end
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL: %0d words never delivered", sb.size());
    end
  endtask

  // ---- test ----------------------------------------------------------------
  int phases[8] = '{0, 1, 3, 4, 5, 6, 8, 9};

  initial begin
    #1 arst_n = 1'b0;  // an edge, so every flop is reset at once
    for (int r = 0; r < 8; r++) begin
      do_reset(phases[r], r % 3);

      // 1. single-word latency
      lat_min = 1000; lat_max = 0;
      measure_lat = 1'b1;
      rx_ready = 1'b1;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk_tx);
        tx_valid = 1'b1; tx_data = rand_word();
        @(negedge clk_tx);
        tx_valid = 1'b0;
        repeat (10) @(negedge clk_tx);
      end
      wait_drained(20);
      measure_lat = 1'b0;
      // accepted at tx edge, popped at the rx edge on which rx_valid is first
      // seen: 1 to 3 cycles through the synchronizer plus the count register
      checks++;
      if (lat_min < 2 || lat_max > 4) begin
        failures++;
        $display("FAIL: phase %0d latency %0d..%0d outside 2..4", phases[r], lat_min, lat_max);
      end else n_latency++;
      $display("phase %0d ns: forward latency %0d..%0d rx cycles", phases[r], lat_min, lat_max);

      // 2. streaming, both sides always ready
      begin
        int acc0, stalls;
        acc0 = accepted; stalls = 0;
        first_pop = -1;
        @(negedge clk_tx);
        for (int k = 0; k < 300; k++) begin
          tx_valid = 1'b1; tx_data = rand_word();
          @(negedge clk_tx);
          while (!tx_ready) begin stalls++; @(negedge clk_tx); end
        end
        tx_valid = 1'b0;
        wait_drained(50);
        checks++;
        if (stalls != 0 || (last_pop - first_pop) != 299) begin
          failures++;
          $display("FAIL: streaming stalls=%0d span=%0d", stalls, last_pop - first_pop);
        end else n_stream++;
      end

      // 3. fill with the receiver stalled, then drain
      begin
        int acc0;
        rx_ready = 1'b0;
        repeat (4) @(negedge clk_rx);
        acc0 = accepted;
        @(negedge clk_tx);
        for (int k = 0; k < int'(DEPTH) + 20; k++) begin
          tx_valid = 1'b1; tx_data = rand_word();
          @(negedge clk_tx);
          if (!tx_ready) begin
            // hold the word; it will not be accepted while full
          end
        end
        checks++;
        if (accepted - acc0 != int'(DEPTH) || tx_ready) begin
          failures++;
          $display("FAIL: accepted %0d words into a stalled FIFO, expected %0d", accepted - acc0, DEPTH);
        end
        // release: keep offering, the transmitter resumes after pops return
        @(negedge clk_rx);
        rx_ready = 1'b1;
        repeat (40) @(negedge clk_tx);
        tx_valid = 1'b0;
        wait_drained(400);
      end

      // 4. random traffic
      fork
        begin
          for (int k = 0; k < 2000; k++) begin
            @(negedge clk_tx);
            if (!tx_valid || tx_ready) begin
              tx_valid = ($urandom_range(0, 99) < 55);
              tx_data  = rand_word();
            end
          end
          @(negedge clk_tx);
          tx_valid = 1'b0;
        end
        begin
          for (int k = 0; k < 2000; k++) begin
            @(negedge clk_rx);
            rx_ready = ($urandom_range(0, 99) < 50);
          end
          rx_ready = 1'b1;
        end
      join
      wait_drained(400);
    end

    // every mechanism must have occurred
    checks += 5;
    if (n_full   == 0) begin failures++; $display("FAIL: FIFO never full"); end
    if (n_empty  == 0) begin failures++; $display("FAIL: FIFO never ran empty"); end
    if (n_both   == 0) begin failures++; $display("FAIL: no simultaneous push and pop"); end
    if (n_stream == 0) begin failures++; $display("FAIL: no gap-free stream"); end
    if (n_latency == 0) begin failures++; $display("FAIL: latency never in range"); end
    $display("mechanisms: full=%0d empty=%0d push+pop=%0d streams=%0d", n_full, n_empty, n_both, n_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
