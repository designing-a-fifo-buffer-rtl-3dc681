// meso_fifo: mesochronous dual-clock FIFO with implicit data synchronization.
//
// clk_tx and clk_rx have the same frequency but an unknown, constant phase
// offset. Only two single-bit flow-control signals cross between the
// domains; the DATA_W-bit words never pass through a synchronizer:
//
//   tx side  : tx_ctrl accepts words (tx_valid/tx_ready) and raises push
//              for one cycle with the tail pointer as write address.
//   forward  : {push, tail, word} -> link_pipe (LINK_STAGES, clk_tx); at its
//              end the word is written into fifo_mem and push enters
//              meso_sync tx2rx in the same cycle.
//   rx side  : rx_ctrl counts the synchronized pushes, shows the word at the
//              head pointer (rx_valid/rx_ready) and raises pop on a dequeue.
//   backward : pop -> link_pipe (LINK_STAGES, clk_rx) -> meso_sync rx2tx,
//              which lowers the transmitter's occupancy count.
//
// A word is read by the receiver only after its push has crossed, and is
// overwritten only after its pop has crossed back, so it is stable whenever
// it is read. The single asynchronous reset arst_n is synchronized in each
// domain by a reset_sync.
//
// Defaults follow the original scheme: 128-bit words, 128 entries,
// 4-slot synchronizers with a gap of two, single-cycle link (LINK_STAGES=0).
// For longer links LINK_STAGES adds registers in both directions: forward to
// the write (data, address, push), backward to the pop. The buffer's read
// data, going to the receiver, is not registered: it is stable from well
// before its push arrives until after its pop has left, so it is timed as a
// multicycle path.
//
// Timing: an accepted word is seen as rx_valid 2 to 4 rx cycles after the tx
// edge that accepted it (1 to 3 cycles through the synchronizer, depending on
// the phase and the reset release, plus the rx count register), plus
// LINK_STAGES. With enough depth for the round trip one word per cycle is
// sustained.
module meso_fifo #(
  parameter int unsigned DATA_W      = meso_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH       = meso_pkg::DEPTH_DEF,
  parameter int unsigned SYNC_SLOTS  = meso_pkg::SYNC_SLOTS_DEF,
  parameter int unsigned SYNC_GAP    = meso_pkg::SYNC_GAP_DEF,
  parameter int unsigned LINK_STAGES = 0,
  parameter int unsigned RST_STAGES  = meso_pkg::RST_STAGES_DEF,
  parameter int unsigned STARTUP     = meso_pkg::STARTUP_DEF
) (
  input  logic              arst_n,
  // transmitter domain
  input  logic              clk_tx,
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [DATA_W-1:0] tx_data,
  // receiver domain
  input  logic              clk_rx,
  output logic              rx_valid,
  input  logic              rx_ready,
  output logic [DATA_W-1:0] rx_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic rst_tx_n, rst_rx_n;

  reset_sync #(.STAGES(RST_STAGES)) u_rst_tx (.clk(clk_tx), .arst_n(arst_n), .rst_n(rst_tx_n));
  reset_sync #(.STAGES(RST_STAGES)) u_rst_rx (.clk(clk_rx), .arst_n(arst_n), .rst_n(rst_rx_n));

  // ---- transmitter domain --------------------------------------------------
  logic          push, pop_sync;
  logic [AW-1:0] wr_addr;
  logic [CW-1:0] tx_count;

  tx_ctrl #(.DEPTH(DEPTH), .STARTUP(STARTUP)) u_tx (
    .clk(clk_tx), .rst_n(rst_tx_n),
    .in_valid(tx_valid), .in_ready(tx_ready),
    .pop_sync(pop_sync), .push(push),
    .wr_addr(wr_addr), .count(tx_count)
  );

  // ---- forward link: the write and its push travel together ---------------
  // The stages are clocked by clk_tx, so the buffer write and the push that
  // enters the tx2rx synchronizer stay in the same cycle at the far end.
  logic              push_link;
  logic [AW-1:0]     mem_waddr;
  logic [DATA_W-1:0] mem_wdata;

  link_pipe #(.STAGES(LINK_STAGES), .WIDTH(1 + AW + DATA_W)) u_fwd_link (
    .clk(clk_tx), .rst_n(rst_tx_n),
    .d({push, wr_addr, tx_data}),
    .q({push_link, mem_waddr, mem_wdata})
  );

  logic [AW-1:0] rd_addr;

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_mem (
    .clk_tx(clk_tx), .we(push_link), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(rd_addr), .rdata(rx_data)
  );

  logic push_sync;

  meso_sync #(.SLOTS(SYNC_SLOTS), .GAP(SYNC_GAP)) u_tx2rx (
    .clk_wr(clk_tx), .rst_wr_n(rst_tx_n), .d(push_link),
    .clk_rd(clk_rx), .rst_rd_n(rst_rx_n), .q(push_sync)
  );

  // ---- receiver domain -----------------------------------------------------
  logic          pop;
  logic [CW-1:0] rx_count;

  rx_ctrl #(.DEPTH(DEPTH)) u_rx (
    .clk(clk_rx), .rst_n(rst_rx_n),
    .push_sync(push_sync),
    .out_valid(rx_valid), .out_ready(rx_ready),
    .pop(pop), .rd_addr(rd_addr), .count(rx_count)
  );

  // ---- backward flow control: pop, rx -> tx --------------------------------
  logic pop_link;

  link_pipe #(.STAGES(LINK_STAGES)) u_bwd_link (
    .clk(clk_rx), .rst_n(rst_rx_n), .d(pop), .q(pop_link)
  );

  meso_sync #(.SLOTS(SYNC_SLOTS), .GAP(SYNC_GAP)) u_rx2tx (
    .clk_wr(clk_rx), .rst_wr_n(rst_rx_n), .d(pop_link),
    .clk_rd(clk_tx), .rst_rd_n(rst_tx_n), .q(pop_sync)
  );

  // A word offered to the receiver stays offered, unchanged, until taken:
  // the data is read without a synchronizer, so it must never move under it.
  a_rx_hold: assert property (@(posedge clk_rx) disable iff (!rst_rx_n)
    (rx_valid && !rx_ready) |=> (rx_valid && $stable(rx_data)))
    else $error("meso_fifo: rx word changed or withdrawn before it was taken");

endmodule
