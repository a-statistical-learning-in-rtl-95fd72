// dknn_axi_slave: AXI4-Lite register front of the DKNN classifier.
//
// A host processor drives the classifier through 32-bit memory-mapped
// registers. It writes the test features, raises a "new data" flag, waits for
// the classifier's acknowledge, then polls for a prediction, reads it, and
// acknowledges it together with the retest result. All flags are levels, so a
// host that is slow or not real-time cannot miss an event:
//   host: write features, CTRL.NEW_DATA=1    core: latch vector, STATUS.DATA_ACK=1
//   host: CTRL.NEW_DATA=0                    core: STATUS.DATA_ACK=0
//   core: STATUS.PRED_VALID=1, PREDICTION    host: read PREDICTION
//   host: CTRL.PRED_ACK=1, CTRL.FOUND=r      core: STATUS.PRED_VALID=0, uses r
//   host: CTRL.PRED_ACK=0                    core: next prediction, if any
// Register map (byte addresses; 4 features per word, feature i of word w in
// bits [8i+7:8i] for 8-bit features):
//   0x00 CTRL       rw  [0] NEW_DATA [1] PRED_ACK [2] FOUND [3] SRC_SEL
//                       [4] NO_LEARN
//                       (SRC_SEL=1: the test vector comes from ext_vec;
//                       NO_LEARN=1: static KNN, the training set is not changed)
//   0x04 STATUS     ro  [0] DATA_ACK [1] PRED_VALID [2] BUSY [3] IDEAL
//                       [4] NO_FAULT [5] EXT_VALID [6] DONE [7] REPLACED
//                       (DONE and REPLACED are sticky until the next NEW_DATA)
//   0x08 PREDICTION ro  [7:0] label (sub-circuit), [15:8] rank,
//                       [31:16] training index last replaced by learning
//   0x0C TRAIN_CTRL wo  a write stores the staged training features with
//                       index [15:0] and label [23:16] (ignored while BUSY)
//   0x10 LATENCY    ro  [15:0] cycles to the first prediction, [31:16] skipped vectors
//   0x40+4w TEST_FEAT  rw  test vector words
//   0x80+4w TRAIN_FEAT rw  training vector staging words
// AXI4-Lite: one outstanding transaction per direction; a write is accepted
// when address and data are both valid; responses are always OKAY. The flag
// handshake and 32-bit user registers follow the document; the register map
// and the FOUND bit are this design's own.
// Clocking: with ASYNC_CORE = 0 everything runs on s_axi_aclk and core_clk is
// unused. With ASYNC_CORE = 1 the classifier runs on core_clk (the document's
// second build runs it at four times the bus clock). NEW_DATA and PRED_ACK
// then cross through two-flop synchronizers, the STATUS flags are registered
// in the classifier domain and synchronized back, and a TRAIN_CTRL write
// crosses as a toggle that is acknowledged back (further bus writes stall
// until then). Data words need no synchronizer: the level handshake keeps them
// stable for several cycles of either clock before they are used. The
// crossing scheme is this design's own.
module dknn_axi_slave #(
  parameter int unsigned M      = dknn_pkg::DKNN_M,
  parameter int unsigned K      = dknn_pkg::DKNN_K,
  parameter int unsigned N      = dknn_pkg::DKNN_N,
  parameter int unsigned FEAT_W = dknn_pkg::DKNN_FEAT_W,
  parameter int unsigned ADDR_W = 8,
  parameter bit          ASYNC_CORE = 1'b0,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned IDX_W   = dknn_pkg::idx_width(N),
  localparam int unsigned FPW     = 32 / FEAT_W,
  localparam int unsigned NW      = (M + FPW - 1) / FPW
) (
  input  logic                     s_axi_aclk,
  input  logic                     s_axi_aresetn,
  input  logic                     core_clk,
  input  logic [ADDR_W-1:0]        s_axi_awaddr,
  input  logic                     s_axi_awvalid,
  output logic                     s_axi_awready,
  input  logic [31:0]              s_axi_wdata,
  input  logic [3:0]               s_axi_wstrb,
  input  logic                     s_axi_wvalid,
  output logic                     s_axi_wready,
  output logic [1:0]               s_axi_bresp,
  output logic                     s_axi_bvalid,
  input  logic                     s_axi_bready,
  input  logic [ADDR_W-1:0]        s_axi_araddr,
  input  logic                     s_axi_arvalid,
  output logic                     s_axi_arready,
  output logic [31:0]              s_axi_rdata,
  output logic [1:0]               s_axi_rresp,
  output logic                     s_axi_rvalid,
  input  logic                     s_axi_rready,
  input  logic [M-1:0][FEAT_W-1:0] ext_vec,
  input  logic                     ext_vec_valid,
  output logic                     irq
);

  // Bus domain (clk) and classifier domain (cclk). With ASYNC_CORE = 0 both
  // are the bus clock and every synchronizer below is a wire.
  logic clk, rst_n, cclk, crst_n;
  assign clk   = s_axi_aclk;
  assign rst_n = s_axi_aresetn;
  assign cclk  = ASYNC_CORE ? core_clk : s_axi_aclk;
  cdc_sync #(.WIDTH(1), .BYPASS(!ASYNC_CORE)) u_rst_sync (.clk(cclk), .din(rst_n), .dout(crst_n));

  // ---------------------------------------------------------------- registers
  logic [4:0]                 ctrl;
  logic [NW-1:0][31:0]        test_w, train_w;
  logic                       data_ack, ack_seen, done_sticky, repl_sticky;

  logic [M-1:0][FEAT_W-1:0]   test_vec_regs, train_vec_regs, test_vec;
  for (genvar i = 0; i < M; i++) begin : g_unpack
    assign test_vec_regs[i]  = test_w[i / FPW][(i % FPW) * FEAT_W +: FEAT_W];
    assign train_vec_regs[i] = train_w[i / FPW][(i % FPW) * FEAT_W +: FEAT_W];
  end
  assign test_vec = ctrl[3] ? ext_vec : test_vec_regs;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // ---------------------------------------------------------------- core
  logic               core_start, core_busy, pred_valid, pred_ideal, no_fault;
  logic [LABEL_W-1:0] pred_label, pred_try;
  logic               fb_valid, core_done, replaced;
  logic [IDX_W-1:0]   replaced_idx;
  logic [15:0]        latency, stall_count;
  logic               train_we;
  logic [IDX_W-1:0]   train_idx;
  logic [LABEL_W-1:0] train_label;

  // Bus -> classifier: NEW_DATA and PRED_ACK are levels; FOUND, the test
  // vector and the staged training vector are held stable by the handshake.
  logic new_data_c, pred_ack_c;
  cdc_sync #(.WIDTH(2), .BYPASS(!ASYNC_CORE)) u_ctrl_sync (
    .clk(cclk), .din(ctrl[1:0]), .dout({pred_ack_c, new_data_c}));

  assign core_start = new_data_c && !data_ack && !core_busy;
  assign fb_valid   = pred_ack_c && !ack_seen && pred_valid;

  dknn_core #(.M(M), .K(K), .N(N), .FEAT_W(FEAT_W)) u_core (
    .clk(cclk), .rst_n(crst_n),
    .start(core_start), .test_vec, .busy(core_busy),
    .pred_valid, .pred_label, .pred_try, .pred_ideal, .no_fault,
    .fb_valid, .fb_found(ctrl[2]), .learn_en(!ctrl[4]), .done(core_done), .replaced, .replaced_idx,
    .latency, .stall_count,
    .train_we, .train_idx, .train_label, .train_feat(train_vec_regs)
  );

  // ---------------------------------------------------------------- AXI write
  logic wr_fire;
  logic [ADDR_W-1:0] waddr;
  logic train_pend;
  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && !train_pend;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = 2'b00;
  assign waddr         = s_axi_awaddr;

  // A TRAIN_CTRL write latches index and label and flips train_tgl. The
  // classifier domain sees the flip, writes the memory (unless busy) and
  // returns the flip; until then train_pend holds further bus writes off, so
  // the staged vector cannot change under the write.
  logic train_tgl, train_tgl_c, train_tgl_d, train_ack;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      train_tgl   <= 1'b0;
      train_idx   <= '0;
      train_label <= '0;
    end else if (wr_fire && waddr[ADDR_W-1:2] == (ADDR_W-2)'(8'h0C >> 2)) begin
      train_tgl   <= !train_tgl;
      train_idx   <= IDX_W'(s_axi_wdata[15:0]);
      train_label <= LABEL_W'(s_axi_wdata[23:16]);
    end
  end
  cdc_sync #(.WIDTH(1), .BYPASS(!ASYNC_CORE)) u_tgl_sync (.clk(cclk), .din(train_tgl), .dout(train_tgl_c));
  always_ff @(posedge cclk) begin
    if (!crst_n) train_tgl_d <= 1'b0;
    else         train_tgl_d <= train_tgl_c;
  end
  assign train_we = (train_tgl_c != train_tgl_d) && !core_busy;
  cdc_sync #(.WIDTH(1), .BYPASS(!ASYNC_CORE)) u_ack_sync (.clk(clk), .din(train_tgl_d), .dout(train_ack));
  assign train_pend = (train_tgl != train_ack);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl         <= '0;
      test_w       <= '0;
      train_w      <= '0;
      s_axi_bvalid <= 1'b0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        if (waddr[ADDR_W-1:2] == '0 && s_axi_wstrb[0]) ctrl <= s_axi_wdata[4:0];
        for (int w = 0; w < NW; w++) begin
          if (32'(waddr) == 32'h40 + 4 * w) test_w[w]  <= merge(test_w[w],  s_axi_wdata, s_axi_wstrb);
          if (32'(waddr) == 32'h80 + 4 * w) train_w[w] <= merge(train_w[w], s_axi_wdata, s_axi_wstrb);
        end
      end
    end
  end

  // ---------------------------------------------------------------- flags
  // Kept in the classifier domain, then registered and synchronized to the
  // bus as STATUS.
  always_ff @(posedge cclk) begin
    if (!crst_n) begin
      data_ack    <= 1'b0;
      ack_seen    <= 1'b0;
      done_sticky <= 1'b0;
      repl_sticky <= 1'b0;
    end else begin
      if (core_start)       data_ack <= 1'b1;
      else if (!new_data_c) data_ack <= 1'b0;
      if (fb_valid)         ack_seen <= 1'b1;
      else if (!pred_ack_c) ack_seen <= 1'b0;
      if (core_start) begin
        done_sticky <= 1'b0;
        repl_sticky <= 1'b0;
      end else begin
        if (core_done) done_sticky <= 1'b1;
        if (replaced)  repl_sticky <= 1'b1;
      end
    end
  end

  logic [6:0] stat_c, stat_q, stat_a;
  assign stat_c = {repl_sticky, done_sticky, no_fault, pred_ideal, core_busy,
                   pred_valid && !ack_seen, data_ack};
  if (ASYNC_CORE) begin : g_stat_reg
    always_ff @(posedge cclk) stat_q <= stat_c;
  end else begin : g_stat_wire
    assign stat_q = stat_c;
  end
  cdc_sync #(.WIDTH(7), .BYPASS(!ASYNC_CORE)) u_stat_sync (.clk(clk), .din(stat_q), .dout(stat_a));

  logic [31:0] status;
  assign status = {24'd0, stat_a[6:5], ext_vec_valid, stat_a[4:0]};
  assign irq = stat_a[1];

  // ---------------------------------------------------------------- AXI read
  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    unique case (32'(s_axi_araddr))
      32'h00:  rd_mux = {27'd0, ctrl};
      32'h04:  rd_mux = status;
      32'h08:  rd_mux = {16'(replaced_idx), 8'(pred_try), 8'(pred_label)};
      32'h10:  rd_mux = {stall_count, latency};
      default: begin
        for (int w = 0; w < NW; w++) begin
          if (32'(s_axi_araddr) == 32'h40 + 4 * w) rd_mux = test_w[w];
          if (32'(s_axi_araddr) == 32'h80 + 4 * w) rd_mux = train_w[w];
        end
      end
    endcase
  end

  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = 2'b00;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= rd_mux;
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rule: a response stays valid, unchanged, until it is taken.
  property p_b_hold;
    @(posedge clk) disable iff (!rst_n) (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid;
  endproperty
  assert property (p_b_hold);
  property p_r_hold;
    @(posedge clk) disable iff (!rst_n)
      (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata));
  endproperty
  assert property (p_r_hold);

endmodule
