// rx_ctrl: receiver-side control of the mesochronous dual-clock FIFO.
//
// The receiver counts the entries it may read: every one-cycle push_sync
// pulse (an enqueue that has crossed the forward synchronizer) adds one, and
// every dequeue removes one. out_valid is high while the count is non-zero;
// the word is then read from the transmitter-domain buffer at rd_addr, the
// head pointer. A dequeue happens when out_valid and out_ready are both high:
// the head advances, the count goes down and pop is raised for that cycle
// towards the backward (rx2tx) synchronizer, which frees the entry in the
// transmitter's count.
//
// Timing: out_valid, rd_addr and count come from registers; pop is
// combinational from out_valid and out_ready. A word pushed by the
// transmitter is visible here one cycle after push_sync.
module rx_ctrl #(
  parameter int unsigned DEPTH = meso_pkg::DEPTH_DEF,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_sync,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          pop,
  output logic [AW-1:0] rd_addr,
  output logic [CW-1:0] count
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  assign out_valid = (count != '0);
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      count   <= '0;
    end else begin
      if (pop) rd_addr <= (rd_addr == LAST) ? '0 : rd_addr + 1'b1;
      case ({push_sync, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push_sync |-> (count != CW'(DEPTH)))
    else $error("rx_ctrl: push received with a full queue");

endmodule
