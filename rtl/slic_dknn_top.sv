// slic_dknn_top: on-chip fault diagnosis with a learning classifier.
//
// A test controller runs a delay-fault dictionary on one core at a raised clock
// and hands over one pass/fail bit per test. The CASP front end turns that
// vector into a fault count per independently repairable sub-circuit of the
// core. Counts from small dictionaries are ambiguous: several sub-circuits
// usually report faults. The DKNN classifier ranks the sub-circuits by
// likelihood from a stored training set, and learns from its own mistakes. A
// host reaches the classifier through an AXI4-Lite slave. CTRL.SRC_SEL selects
// the test vector source: the host's registers (as in an FPGA prototype) or the
// front end's counts (the on-chip flow).
//
// Ports: the AXI4-Lite slave (32-bit data, 8-bit byte address, register map in
// dknn_axi_slave); the front end's pass/fail load, dictionary read port and
// module-index-register write port. The test controller and the dictionary
// memory are outside this design. One clock (clk) by default, active-low
// synchronous reset; with ASYNC_CORE = 1 the classifier core runs on core_clk,
// as in the document's faster build, and the AXI slave does the crossing.
// Front end latency: NUM_TESTS + NUM_FAULTS cycles from pf_load to
// counts_valid. Classifier latency: see dknn_core.
module slic_dknn_top #(
  parameter int unsigned M          = dknn_pkg::DKNN_M,
  parameter int unsigned K          = dknn_pkg::DKNN_K,
  parameter int unsigned N          = dknn_pkg::DKNN_N,
  parameter int unsigned FEAT_W     = dknn_pkg::DKNN_FEAT_W,
  parameter int unsigned NUM_TESTS  = dknn_pkg::CASP_NUM_TESTS,
  parameter int unsigned NUM_FAULTS = dknn_pkg::CASP_NUM_FAULTS,
  parameter bit          ASYNC_CORE = 1'b0,
  localparam int unsigned TI_W      = dknn_pkg::idx_width(NUM_TESTS),
  localparam int unsigned FI_W      = $clog2(NUM_FAULTS + 1),
  localparam int unsigned MIR_IW    = dknn_pkg::idx_width(M - 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  core_clk,     // classifier clock, used when ASYNC_CORE = 1
  // AXI4-Lite slave
  input  logic [7:0]            s_axi_awaddr,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [31:0]           s_axi_wdata,
  input  logic [3:0]            s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [7:0]            s_axi_araddr,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [31:0]           s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  output logic                  irq,
  // diagnosis front end
  input  logic                  pf_load,
  input  logic [NUM_TESTS-1:0]  pf_vector,
  output logic [TI_W-1:0]       dict_test_idx,
  input  logic [NUM_FAULTS-1:0] dict_data,
  input  logic                  mir_we,
  input  logic [MIR_IW-1:0]     mir_idx,
  input  logic [FI_W-1:0]       mir_value,
  output logic                  counts_valid,
  output logic                  frontend_busy
);

  logic [M-1:0][FEAT_W-1:0] counts;

  casp_frontend #(.M(M), .NUM_TESTS(NUM_TESTS), .NUM_FAULTS(NUM_FAULTS), .CNT_W(FEAT_W)) u_frontend (
    .clk, .rst_n, .pf_load, .pf_vector, .dict_test_idx, .dict_data,
    .mir_we, .mir_idx, .mir_value, .counts, .counts_valid, .busy(frontend_busy)
  );

  dknn_axi_slave #(.M(M), .K(K), .N(N), .FEAT_W(FEAT_W), .ADDR_W(8), .ASYNC_CORE(ASYNC_CORE)) u_dknn (
    .s_axi_aclk(clk), .s_axi_aresetn(rst_n), .core_clk,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .ext_vec(counts), .ext_vec_valid(counts_valid), .irq
  );

endmodule
