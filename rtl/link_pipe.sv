// link_pipe: register stages on one wire of a long mesochronous link.
//
// When transmitter and receiver are too far apart for one clock cycle, the
// link is cut into register stages. This block is a STAGES-deep shift
// register clocked by the domain that drives the wire (the transmitter clock
// for the forward push, the receiver clock for the backward pop). STAGES = 0
// is a plain wire, the single-cycle link. Stages reset to WIDTH'(0) so no
// false event leaves the link after reset. The number of stages is left to
// the integrator; the original scheme fixes none.
//
// Ports: clk, rst_n, d (in), q (out, d delayed by STAGES cycles).
module link_pipe #(
  parameter int unsigned STAGES = 1,
  parameter int unsigned WIDTH  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(STAGES); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(STAGES); i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[STAGES-1];
  end

endmodule
