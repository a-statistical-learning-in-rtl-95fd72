// label_sort_pe: one cell of the M-cell systolic sorter that ranks labels by
// their neighbour count.
//
// The cell keeps one (count, label) pair; after `clear` the count is 0 and the
// label is marked invalid. On each enabled step an incoming valid pair is saved,
// and the saved one passed on, when the saved label is invalid, when the
// incoming count is higher, or when the counts are equal and the incoming label
// wins the tie. Otherwise the incoming pair is passed on.
// Tie rule: for each label a K-bit array is formed whose bit K-1-k is 1 when the
// k-th nearest neighbour (k = 0 nearest) carries the label, so the most
// significant bit belongs to the nearest neighbour. Comparing two arrays as
// unsigned numbers favours the label that owns the nearer neighbour. On a full
// tie (equal count and equal array) the lower label wins, so the ranking does
// not depend on the order in which labels enter the chain.
// After M inputs and M-1 settling steps, cell 0 holds the best label and cell i
// the (i+1)-th best. out_* are registered. The count comparison and the K-bit
// tie array follow the document (Sec. 4.1.5); the lower-label rule on a full
// tie and the invalid-label marker are this design's own choices.
module label_sort_pe #(
  parameter int unsigned M = dknn_pkg::DKNN_M,
  parameter int unsigned K = dknn_pkg::DKNN_K,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned CW      = $clog2(K + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      en,
  input  logic [CW-1:0]             cnt_in,
  input  logic [LABEL_W-1:0]        label_in,
  input  logic                      valid_in,
  input  logic [K-1:0][LABEL_W-1:0] nn_labels,
  input  logic [K-1:0]              nn_valid,
  output logic [CW-1:0]             cnt_out,
  output logic [LABEL_W-1:0]        label_out,
  output logic                      valid_out,
  output logic [CW-1:0]             saved_cnt,
  output logic [LABEL_W-1:0]        saved_label,
  output logic                      saved_valid
);

  function automatic logic [K-1:0] hits(input logic [LABEL_W-1:0] lbl,
                                        input logic [K-1:0][LABEL_W-1:0] nl,
                                        input logic [K-1:0] nv);
    logic [K-1:0] h;
    for (int k = 0; k < K; k++) h[K-1-k] = nv[k] && (nl[k] == lbl);
    return h;
  endfunction

  logic take;
  always_comb begin
    take = 1'b0;
    if (valid_in) begin
      if (!saved_valid)                take = 1'b1;
      else if (cnt_in > saved_cnt)     take = 1'b1;
      else if (cnt_in == saved_cnt) begin
        if (hits(label_in, nn_labels, nn_valid) > hits(saved_label, nn_labels, nn_valid))
          take = 1'b1;
        else if (hits(label_in, nn_labels, nn_valid) == hits(saved_label, nn_labels, nn_valid))
          take = label_in < saved_label;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      saved_cnt   <= '0;
      saved_label <= '0;
      saved_valid <= 1'b0;
      cnt_out     <= '0;
      label_out   <= '0;
      valid_out   <= 1'b0;
    end else if (en) begin
      if (take) begin
        saved_cnt   <= cnt_in;
        saved_label <= label_in;
        saved_valid <= 1'b1;
        cnt_out     <= saved_cnt;
        label_out   <= saved_label;
        valid_out   <= saved_valid;
      end else begin
        cnt_out     <= cnt_in;
        label_out   <= label_in;
        valid_out   <= valid_in;
      end
    end
  end

endmodule
