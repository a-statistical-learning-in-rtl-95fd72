// distance_pe: one stage of the Manhattan distance pipeline.
//
// Adds the one-dimensional distance |y - x| between a test feature y and a
// training feature x to the partial distance arriving from the previous stage,
// and passes the label, training index and valid bit of the training vector
// along unchanged. The first stage receives a partial distance of 0. The output
// is registered: one stage of latency per dimension. When adv is low (pipeline
// stall) the stage keeps its output. This follows the document; the valid bit
// that marks pipeline bubbles is this design's own.
module distance_pe #(
  parameter int unsigned FEAT_W  = dknn_pkg::DKNN_FEAT_W,
  parameter int unsigned DIST_W  = dknn_pkg::dist_width(dknn_pkg::DKNN_FEAT_W, dknn_pkg::DKNN_M),
  parameter int unsigned LABEL_W = dknn_pkg::idx_width(dknn_pkg::DKNN_M),
  parameter int unsigned IDX_W   = dknn_pkg::idx_width(dknn_pkg::DKNN_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic [FEAT_W-1:0]  y,
  input  logic [FEAT_W-1:0]  x,
  input  logic [DIST_W-1:0]  d_in,
  input  logic [LABEL_W-1:0] label_in,
  input  logic [IDX_W-1:0]   idx_in,
  input  logic               valid_in,
  output logic [DIST_W-1:0]  d_out,
  output logic [LABEL_W-1:0] label_out,
  output logic [IDX_W-1:0]   idx_out,
  output logic               valid_out
);

  logic [FEAT_W-1:0] absdiff;
  assign absdiff = (y >= x) ? (y - x) : (x - y);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_out     <= '0;
      label_out <= '0;
      idx_out   <= '0;
      valid_out <= 1'b0;
    end else if (adv) begin
      d_out     <= d_in + DIST_W'(absdiff);
      label_out <= label_in;
      idx_out   <= idx_in;
      valid_out <= valid_in;
    end
  end

endmodule
