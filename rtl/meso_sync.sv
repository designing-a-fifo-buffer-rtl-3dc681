// meso_sync: n-slot mesochronous synchronizer for one flow-control bit.
//
// Transmitter and receiver run at the same frequency with an unknown, fixed
// phase. The writer stores its input bit every clk_wr cycle into one of SLOTS
// registers, chosen by a free-running counter. The reader selects one slot
// every clk_rd cycle with its own free-running counter, which after reset
// lags the writer by GAP slots. A slot is therefore read only after it has
// been stable for about GAP cycles, and is rewritten only SLOTS cycles after
// it was written, so the reader never samples a changing register. Because
// both counters advance every cycle at the same rate, each writer cycle's bit
// is delivered exactly once: a one-cycle pulse in gives a one-cycle pulse out.
//
// Following the original scheme: SLOTS = 4, the size needed when the two
// counters are reset by an asynchronous pulse synchronized independently in
// each domain, and a gap of two between the counters. With the independent
// release the effective gap may end up one slot smaller or larger, which gives
// a forward delay of one to three cycles. The counters are reset by the
// already-synchronized reset of their own domain (see reset_sync).
//
// Ports: clk_wr/rst_wr_n/d on the writer side; clk_rd/rst_rd_n/q on the
// reader side. q is combinational from the slot registers (a mux selected by
// the read counter) and is meant to be registered by the reader's logic.
module meso_sync #(
  parameter int unsigned SLOTS = meso_pkg::SYNC_SLOTS_DEF,
  parameter int unsigned GAP   = meso_pkg::SYNC_GAP_DEF
) (
  input  logic clk_wr,
  input  logic rst_wr_n,
  input  logic d,
  input  logic clk_rd,
  input  logic rst_rd_n,
  output logic q
);

  localparam int unsigned PW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam logic [PW-1:0] RD_INIT = PW'((SLOTS - GAP) % SLOTS);
  localparam logic [PW-1:0] LAST    = PW'(SLOTS - 1);

  logic [SLOTS-1:0] slot;
  logic [PW-1:0]    wr_ptr;
  logic [PW-1:0]    rd_ptr;

  // Writer domain: free-running write counter and slot registers.
  always_ff @(posedge clk_wr or negedge rst_wr_n) begin
    if (!rst_wr_n) begin
      wr_ptr <= '0;
      slot   <= '0;
    end else begin
      slot[wr_ptr] <= d;
      wr_ptr       <= (wr_ptr == LAST) ? '0 : wr_ptr + 1'b1;
    end
  end

  // Reader domain: free-running read counter, GAP slots behind after reset.
  always_ff @(posedge clk_rd or negedge rst_rd_n) begin
    if (!rst_rd_n) rd_ptr <= RD_INIT;
    else           rd_ptr <= (rd_ptr == LAST) ? '0 : rd_ptr + 1'b1;
  end

  assign q = slot[rd_ptr];

  initial assert (GAP >= 1 && GAP < SLOTS) else $error("meso_sync: need 1 <= GAP < SLOTS");

endmodule
