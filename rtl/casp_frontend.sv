// casp_frontend: turns a pass/fail test result vector into per-sub-circuit
// fault counts, the feature vector of the DKNN classifier.
//
// It chains the three parts of the diagnosis front end: the pass/fail register
// (one test result per cycle), the fault accumulator (sets the flip-flop of
// every fault that a failing test detects) and the faulty module
// identification circuit (counts the set flip-flops of each sub-circuit).
// A small sequencer drives them:
//   ACCUM  NUM_TESTS cycles. dict_test_idx names the current test; dict_data
//          must hold that test's dictionary data in the same cycle (an external,
//          combinational-read dictionary memory).
//   COUNT  NUM_FAULTS cycles; the accumulator shifts one fault per cycle into
//          the FMIC.
//   DONE   counts_valid is high until the next pf_load.
// counts_valid rises NUM_TESTS + NUM_FAULTS clock edges after the edge that
// samples pf_load.
// The three parts follow the document; the sequencing and its cycle counts are
// this design's own.
module casp_frontend #(
  parameter int unsigned M          = dknn_pkg::DKNN_M,
  parameter int unsigned NUM_TESTS  = dknn_pkg::CASP_NUM_TESTS,
  parameter int unsigned NUM_FAULTS = dknn_pkg::CASP_NUM_FAULTS,
  parameter int unsigned CNT_W      = dknn_pkg::DKNN_FEAT_W,
  localparam int unsigned TI_W      = dknn_pkg::idx_width(NUM_TESTS),
  localparam int unsigned FI_W      = $clog2(NUM_FAULTS + 1),
  localparam int unsigned MIR_IW    = dknn_pkg::idx_width(M - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pf_load,
  input  logic [NUM_TESTS-1:0]     pf_vector,
  output logic [TI_W-1:0]          dict_test_idx,
  input  logic [NUM_FAULTS-1:0]    dict_data,
  input  logic                     mir_we,
  input  logic [MIR_IW-1:0]        mir_idx,
  input  logic [FI_W-1:0]          mir_value,
  output logic [M-1:0][CNT_W-1:0]  counts,
  output logic                     counts_valid,
  output logic                     busy
);

  typedef enum logic [1:0] {S_IDLE, S_ACCUM, S_COUNT, S_DONE} state_t;
  state_t state;

  logic [TI_W-1:0] test_idx;
  logic [FI_W-1:0] fault_idx;
  logic            pf_bit, fault_bit;
  logic            acc_en, shift_en;
  logic [NUM_TESTS-1:0] pf_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      test_idx  <= '0;
      fault_idx <= '0;
    end else if (pf_load) begin
      state     <= S_ACCUM;
      test_idx  <= '0;
      fault_idx <= '0;
    end else begin
      unique case (state)
        S_ACCUM: begin
          test_idx <= test_idx + 1'b1;
          if (32'(test_idx) == NUM_TESTS - 1) state <= S_COUNT;
        end
        S_COUNT: begin
          fault_idx <= fault_idx + 1'b1;
          if (32'(fault_idx) == NUM_FAULTS - 1) state <= S_DONE;
        end
        default: ;
      endcase
    end
  end

  assign acc_en        = (state == S_ACCUM);
  assign shift_en      = (state == S_COUNT);
  assign dict_test_idx = test_idx;
  assign counts_valid  = (state == S_DONE);
  assign busy          = (state == S_ACCUM) || (state == S_COUNT);

  pf_register #(.NUM_TESTS(NUM_TESTS)) u_pf (
    .clk, .rst_n, .load(pf_load), .pf_in(pf_vector), .shift(acc_en),
    .pf_out(pf_bit), .pf_q
  );

  fault_accumulator #(.NUM_FAULTS(NUM_FAULTS)) u_fa (
    .clk, .rst_n, .clear(pf_load), .acc_en, .fail(pf_bit), .dict_data,
    .shift_en, .fault_bit, .faults()
  );

  fmic #(.M(M), .NUM_FAULTS(NUM_FAULTS), .CNT_W(CNT_W)) u_fmic (
    .clk, .rst_n, .clear(pf_load), .en(shift_en), .fault_bit,
    .mir_we, .mir_idx, .mir_value, .count(counts)
  );

endmodule
