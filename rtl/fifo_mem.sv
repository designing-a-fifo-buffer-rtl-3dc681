// fifo_mem: FIFO storage of the mesochronous dual-clock FIFO.
//
// The buffer lives in the transmitter domain. A word is written at the tail
// address on the rising edge of clk_tx when we is high. The receiver reads
// the word at the head address asynchronously (combinational read port):
// the data is never synchronized itself. It is safe to use because the
// receiver only reads an entry after the push for it has crossed the
// flow-control synchronizer, and the transmitter only overwrites an entry
// after the pop for it has crossed back, so the entry is stable for many
// cycles around every read. The data wires can thus be timed as multicycle
// paths.
//
// The memory is not reset; an entry is only read after it was written.
// Ports: clk_tx, we, waddr, wdata (write port); raddr, rdata (read port).
module fifo_mem #(
  parameter int unsigned DATA_W = meso_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = meso_pkg::DEPTH_DEF,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk_tx,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk_tx) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
