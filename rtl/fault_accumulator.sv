// fault_accumulator: one flip-flop per fault of the delay-fault dictionary.
//
// While the pass/fail register streams test results, each flip-flop is set when
// the current test failed and the dictionary data of that test marks the fault
// as detectable by it; a set flip-flop stays set. After all tests, the flip-flops
// hold the faults sensitized by the failing tests. With shift_en the flip-flops
// form a shift chain towards index 0; fault_bit (flip-flop 0) feeds the faulty
// module identification circuit one fault per cycle, in fault-index order.
//
// Interface: clear (synchronous, zeroes all), acc_en with fail and dict_data
// (one test per cycle), shift_en (one fault out per cycle). Priority:
// clear > shift_en > acc_en. A 1 means "sensitized", following the document's
// text; the fault count NUM_FAULTS and the single clock are this design's choices.
module fault_accumulator #(
  parameter int unsigned NUM_FAULTS = dknn_pkg::CASP_NUM_FAULTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  acc_en,
  input  logic                  fail,
  input  logic [NUM_FAULTS-1:0] dict_data,
  input  logic                  shift_en,
  output logic                  fault_bit,
  output logic [NUM_FAULTS-1:0] faults
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) faults <= '0;
    else if (shift_en)   faults <= {1'b0, faults[NUM_FAULTS-1:1]};
    else if (acc_en)     faults <= faults | (dict_data & {NUM_FAULTS{fail}});
  end

  assign fault_bit = faults[0];

endmodule
