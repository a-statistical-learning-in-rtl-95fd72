// label_counter: the vote-counting processing element and its counters vector.
//
// After the distance sorter has settled, the controller presents the saved label
// of one sorter cell per cycle (nearest first) for K cycles. Each enabled cycle
// increments the counter of that label, if the cell holds a neighbour
// (label_valid). The counters vector then holds, for each of the M labels, how
// many of the K nearest neighbours carry it. counts update the cycle after en.
// Counting one neighbour per cycle follows the document; skipping empty cells
// is this design's own.
module label_counter #(
  parameter int unsigned M = dknn_pkg::DKNN_M,
  parameter int unsigned K = dknn_pkg::DKNN_K,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned CW      = $clog2(K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic [LABEL_W-1:0]   label,
  input  logic                 label_valid,
  output logic [M-1:0][CW-1:0] counts
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      counts <= '0;
    end else if (en && label_valid && (32'(label) < M)) begin
      counts[label] <= counts[label] + 1'b1;
    end
  end

endmodule
