// pf_register: Pass/Fail test-response register of the diagnosis front end.
//
// Holds one bit per dictionary test (1 = the test failed, 0 = it passed), as
// delivered by the test controller after a run of the fault dictionary. The bits
// are presented one at a time on pf_out, starting with test 1 (bit 0). Each
// `shift` rotates the register by one position: the bit that leaves at the
// output end is written back at the other end, so the register behaves as a
// circular buffer and still holds the full vector after NUM_TESTS shifts.
//
// Timing: `load` copies pf_in on the next clock edge (load wins over shift);
// pf_out is the register's bit 0, so it changes one cycle after each shift.
// The circular buffer and the serial, one-test-per-cycle reading follow the
// document; the parallel load port and NUM_TESTS are this design's choices.
module pf_register #(
  parameter int unsigned NUM_TESTS = dknn_pkg::CASP_NUM_TESTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [NUM_TESTS-1:0] pf_in,
  input  logic                 shift,
  output logic                 pf_out,
  output logic [NUM_TESTS-1:0] pf_q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     pf_q <= '0;
    else if (load)  pf_q <= pf_in;
    else if (shift) pf_q <= {pf_q[0], pf_q[NUM_TESTS-1:1]};
  end

  assign pf_out = pf_q[0];

endmodule
