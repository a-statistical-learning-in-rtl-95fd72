// cdc_sync: two-flop synchronizer for level signals that cross into the
// clock domain of `clk`.
//
// Each bit of din is sampled by two flip-flops in series, so dout follows din
// two to three clk edges later with the first flop given a full cycle to
// settle. Only level flags, or toggles, that stay put for at least two clk
// periods may be passed; multi-bit data must be held stable by a handshake
// around it rather than sent through here. With BYPASS = 1 the module is a
// wire (both sides on one clock), and clk is then unused. The flops have no
// reset: their inputs are reset values while the reset is held.
// The synchronizer is this design's own; it serves the build in which the
// classifier runs on its own, faster clock behind the bus clock.
module cdc_sync #(
  parameter int unsigned WIDTH  = 1,
  parameter bit          BYPASS = 1'b0
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (BYPASS) begin : g_wire
    assign dout = din;
  end else begin : g_sync
    logic [WIDTH-1:0] s1, s2;
    always_ff @(posedge clk) begin
      s1 <= din;
      s2 <= s1;
    end
    assign dout = s2;
  end
endmodule
