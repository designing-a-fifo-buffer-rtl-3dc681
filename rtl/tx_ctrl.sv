// tx_ctrl: transmitter-side control of the mesochronous dual-clock FIFO.
//
// The transmitter owns the buffer. It keeps the tail pointer and its own
// count of the entries that are in the queue. A word is accepted when
// in_valid and in_ready are both high: it is written at the tail address,
// the tail advances, the count goes up, and push is raised for that one
// cycle towards the forward (tx2rx) synchronizer. Each one-cycle pop_sync
// pulse, a dequeue synchronized back from the receiver, lowers the count.
// The count therefore includes words in flight to the receiver and slots the
// receiver has freed but whose pop has not yet arrived, so it never
// undercounts and the buffer cannot overflow. in_ready is low while the count
// equals DEPTH. push is also the write enable of the buffer, at wr_addr.
//
// After reset in_ready stays low for STARTUP cycles. The two domains leave
// reset independently, up to about a cycle apart; the hold makes sure the
// receiver side is running before the first push. The hold is this design's
// choice; the rest follows the original scheme.
//
// Timing: in_ready, count and wr_addr come from registers; push is
// combinational from in_valid and in_ready.
module tx_ctrl #(
  parameter int unsigned DEPTH   = meso_pkg::DEPTH_DEF,
  parameter int unsigned STARTUP = meso_pkg::STARTUP_DEF,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          pop_sync,
  output logic          push,
  output logic [AW-1:0] wr_addr,
  output logic [CW-1:0] count
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);
  localparam int unsigned   SW   = $clog2(STARTUP + 1);

  logic [SW-1:0] startup_cnt;
  logic          started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      startup_cnt <= '0;
      started     <= 1'b0;
    end else if (!started) begin
      if (startup_cnt == SW'(STARTUP)) started <= 1'b1;
      else                             startup_cnt <= startup_cnt + 1'b1;
    end
  end

  assign in_ready = started && (count != CW'(DEPTH));
  assign push     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr <= '0;
      count   <= '0;
    end else begin
      if (push) wr_addr <= (wr_addr == LAST) ? '0 : wr_addr + 1'b1;
      case ({push, pop_sync})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A synchronized pop can only refer to an entry that was pushed.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop_sync |-> (count != '0))
    else $error("tx_ctrl: pop received with an empty queue");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH))
    else $error("tx_ctrl: count above DEPTH");

endmodule
