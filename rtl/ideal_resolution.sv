// ideal_resolution: detects a test vector with exactly one non-zero feature.
//
// When only one sub-circuit reports potential faults, that sub-circuit is the
// answer and the nearest-neighbour search is skipped. After `start` the module
// examines one dimension per cycle for M cycles: a counter counts the non-zero
// features and a register keeps the index of the last non-zero one. `done`
// pulses in the cycle after the last dimension was examined, with nonzero_cnt
// and last_idx final (M cycles after start); they hold until the next start. nonzero_cnt == 1 means
// last_idx is the predicted faulty sub-circuit.
//
// This sequential check follows the document. test_vec must stay stable during
// the M cycles.
module ideal_resolution #(
  parameter int unsigned M      = dknn_pkg::DKNN_M,
  parameter int unsigned FEAT_W = dknn_pkg::DKNN_FEAT_W,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned CNT_W   = $clog2(M + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [M-1:0][FEAT_W-1:0] test_vec,
  output logic                     done,
  output logic [CNT_W-1:0]         nonzero_cnt,
  output logic [LABEL_W-1:0]       last_idx
);

  logic             running;
  logic [LABEL_W-1:0] dim;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running     <= 1'b0;
      dim         <= '0;
      done        <= 1'b0;
      nonzero_cnt <= '0;
      last_idx    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running     <= 1'b1;
        dim         <= '0;
        nonzero_cnt <= '0;
        last_idx    <= '0;
      end else if (running) begin
        if (test_vec[dim] != '0) begin
          nonzero_cnt <= nonzero_cnt + 1'b1;
          last_idx    <= dim;
        end
        if (32'(dim) == M - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          dim <= dim + 1'b1;
        end
      end
    end
  end

endmodule
