// fmic: faulty module identification circuit.
//
// Counts, for each of the M sub-circuits, how many sensitized faults the fault
// accumulator holds. The accumulator's flip-flops are ordered by sub-circuit,
// so sub-circuit j owns a contiguous range of fault indexes. M-1 module index
// registers (MIR) store the range boundaries: sub-circuit j owns
// MIR[j-1] <= FI < MIR[j], with 0 below sub-circuit 0 and NUM_FAULTS above
// sub-circuit M-1. The fault index counter FI steps once per evaluated bit;
// when the bit is 1, the counter of the sub-circuit whose comparator matches
// is incremented.
//
// Interface: clear zeroes FI and the counters; en evaluates fault_bit at the
// current FI (one bit per cycle); mir_we writes one boundary. count[j] is
// registered and updates the cycle after the bit is evaluated. The range
// comparators, the FI counter and the M counters follow the document; the reset
// values of the MIRs (an even split) and counter saturation are this design's.
module fmic #(
  parameter int unsigned M          = dknn_pkg::DKNN_M,
  parameter int unsigned NUM_FAULTS = dknn_pkg::CASP_NUM_FAULTS,
  parameter int unsigned CNT_W      = dknn_pkg::DKNN_FEAT_W,
  localparam int unsigned FI_W      = $clog2(NUM_FAULTS + 1),
  localparam int unsigned MIR_IW    = dknn_pkg::idx_width(M - 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       en,
  input  logic                       fault_bit,
  input  logic                       mir_we,
  input  logic [MIR_IW-1:0]          mir_idx,
  input  logic [FI_W-1:0]            mir_value,
  output logic [M-1:0][CNT_W-1:0]    count
);

  logic [FI_W-1:0]        fi_counter;
  logic [M-2:0][FI_W-1:0] mir;
  logic [M-1:0]           in_range;

  // Module index registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < M - 1; j++) mir[j] <= FI_W'(((j + 1) * NUM_FAULTS) / M);
    end else if (mir_we && (32'(mir_idx) < M - 1)) begin
      mir[mir_idx] <= mir_value;
    end
  end

  // M range comparators: lower bound <= FI < upper bound.
  always_comb begin
    for (int j = 0; j < M; j++) begin
      logic [FI_W-1:0] lo, hi;
      lo = (j == 0)     ? '0                : mir[(j == 0) ? 0 : j - 1];
      hi = (j == M - 1) ? FI_W'(NUM_FAULTS) : mir[(j == M - 1) ? 0 : j];
      in_range[j] = (fi_counter >= lo) && (fi_counter < hi);
    end
  end

  // Fault index counter and per-sub-circuit counters.
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      fi_counter <= '0;
      count      <= '0;
    end else if (en) begin
      fi_counter <= fi_counter + 1'b1;
      for (int j = 0; j < M; j++)
        if (fault_bit && in_range[j] && (count[j] != {CNT_W{1'b1}}))
          count[j] <= count[j] + 1'b1;
    end
  end

endmodule
