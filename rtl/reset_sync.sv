// reset_sync: brute-force reset synchronizer for one clock domain.
//
// The mesochronous FIFO is reset by one asynchronous, active-low pulse that is
// synchronized separately in the transmitter and in the receiver domain. This
// block asserts its output at once (asynchronously) when arst_n falls and
// releases it only after STAGES rising edges of clk with arst_n high, so the
// release is synchronous to clk. Two stages is the usual brute-force form; one
// more in-series flop can be added through STAGES for extra reliability, as
// the original scheme allows.
//
// Ports: clk, arst_n (asynchronous reset in), rst_n (synchronized reset out).
// Timing: rst_n goes low with arst_n, high on the STAGES-th edge after release.
module reset_sync #(
  parameter int unsigned STAGES = meso_pkg::RST_STAGES_DEF
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) chain <= '0;
    else         chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign rst_n = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("reset_sync: STAGES must be at least 2");

endmodule
