// training_memory: the classifier's training set, one entry per training vector.
//
// Each of the N entries holds the label of the vector (the faulty sub-circuit it
// was recorded for) and its M features. The memory has one synchronous read port,
// used by the controller to stream one training vector per cycle into the
// distance pipeline, and one write port, used by the host to load the training
// set and by the controller to replace a training vector after a misprediction.
//
// Timing: rd_data is valid the cycle after rd_en (block RAM behaviour). A write
// and a read of the same address in one cycle return the old contents. The
// contents are not reset; the host loads them before use. N, M and the one
// vector per cycle read follow the document; the port arrangement is this
// design's own.
module training_memory #(
  parameter int unsigned M       = dknn_pkg::DKNN_M,
  parameter int unsigned N       = dknn_pkg::DKNN_N,
  parameter int unsigned FEAT_W  = dknn_pkg::DKNN_FEAT_W,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned IDX_W   = dknn_pkg::idx_width(N),
  localparam int unsigned ENTRY_W = LABEL_W + M * FEAT_W
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic [IDX_W-1:0]   rd_addr,
  output logic [ENTRY_W-1:0] rd_data,
  input  logic               we,
  input  logic [IDX_W-1:0]   wr_addr,
  input  logic [ENTRY_W-1:0] wr_data
);

  logic [ENTRY_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
