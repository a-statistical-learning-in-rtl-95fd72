// skew_fifo: delay line of one feature dimension of the training vectors.
//
// The distance pipeline is skewed: the PE of dimension m works on the training
// vector that entered the pipeline m steps earlier. Training memory delivers a
// whole vector per step, so feature m is held in a DEPTH = m stage shift register
// that advances only when the pipeline advances (adv). dout is the value written
// DEPTH advances ago; DEPTH = 0 is a plain wire. The per-dimension buffer follows
// the document; its shift-register form is this design's own.
module skew_fifo #(
  parameter int unsigned DEPTH = 1,
  parameter int unsigned WIDTH = dknn_pkg::DKNN_FEAT_W
) (
  input  logic             clk,
  input  logic             adv,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    logic [DEPTH-1:0][WIDTH-1:0] sr;
    always_ff @(posedge clk) begin
      if (adv) begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end

endmodule
