// distance_sort_pe: one cell of the K-cell systolic nearest-neighbour sorter.
//
// The cell keeps one (distance, label, index) triple. After `clear` it holds the
// largest representable distance and is marked empty. On each enabled step, a
// valid incoming triple with a smaller distance replaces the saved one and the
// saved one is passed to the next cell; otherwise the incoming triple is passed
// on. On equal distances the lower training index is kept. In a systolic chain
// a later vector can overtake an earlier one of equal distance that is still
// being pushed down, so "equal passes on" alone would make the kept set depend
// on arrival timing; the index tie-break makes it exactly the K smallest
// (distance, index) pairs. After all training vectors and K flush steps, cell
// k holds the k-th nearest neighbour, in ascending order along the chain.
//
// Timing: out_* are registered, one step of latency per cell; nothing changes
// while en is low (pipeline stall). The comparison rule follows the document;
// the empty marker (saved_valid) and the index tie-break are this design's own.
module distance_sort_pe #(
  parameter int unsigned DIST_W  = dknn_pkg::dist_width(dknn_pkg::DKNN_FEAT_W, dknn_pkg::DKNN_M),
  parameter int unsigned LABEL_W = dknn_pkg::idx_width(dknn_pkg::DKNN_M),
  parameter int unsigned IDX_W   = dknn_pkg::idx_width(dknn_pkg::DKNN_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               en,
  input  logic [DIST_W-1:0]  d_in,
  input  logic [LABEL_W-1:0] label_in,
  input  logic [IDX_W-1:0]   idx_in,
  input  logic               valid_in,
  output logic [DIST_W-1:0]  d_out,
  output logic [LABEL_W-1:0] label_out,
  output logic [IDX_W-1:0]   idx_out,
  output logic               valid_out,
  output logic [DIST_W-1:0]  saved_d,
  output logic [LABEL_W-1:0] saved_label,
  output logic [IDX_W-1:0]   saved_idx,
  output logic               saved_valid
);

  logic take;
  assign take = valid_in &&
                ((d_in < saved_d) || (saved_valid && d_in == saved_d && idx_in < saved_idx));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      saved_d     <= '1;
      saved_label <= '0;
      saved_idx   <= '0;
      saved_valid <= 1'b0;
      d_out       <= '1;
      label_out   <= '0;
      idx_out     <= '0;
      valid_out   <= 1'b0;
    end else if (en) begin
      if (take) begin
        saved_d     <= d_in;
        saved_label <= label_in;
        saved_idx   <= idx_in;
        saved_valid <= 1'b1;
        d_out       <= saved_d;
        label_out   <= saved_label;
        idx_out     <= saved_idx;
        valid_out   <= saved_valid;
      end else begin
        d_out       <= d_in;
        label_out   <= label_in;
        idx_out     <= idx_in;
        valid_out   <= valid_in;
      end
    end
  end

endmodule
