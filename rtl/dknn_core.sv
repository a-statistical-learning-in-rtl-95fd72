// dknn_core: dynamic k-nearest-neighbour (DKNN) fault classifier.
//
// Input: a test vector of M fault counts, one per sub-circuit of the core under
// diagnosis. Output: a ranked list of sub-circuits, presented one at a time,
// most likely faulty first. The host retests after repairing each presented
// sub-circuit and reports whether it was the faulty one. If the first guess was
// wrong, the nearest neighbour that carried the wrong label is overwritten in
// the training set. The new entry is the test vector, labelled with the
// sub-circuit that turned out to be faulty. The classifier thus adapts to fault
// patterns it was not trained on.
//
// One classification runs through these phases:
//   IRC     Ideal resolution check, M cycles. Exactly one non-zero feature:
//           that sub-circuit is the only prediction and the search is skipped.
//           No non-zero feature: no_fault is reported.
//   STREAM  The training set is read, one vector per cycle, into a systolic
//           pipeline of M distance PEs (one per dimension, fed through
//           per-dimension skew FIFOs), followed by K distance-sort PEs. A
//           training vector whose label names a sub-circuit with a zero test
//           feature is skipped: the whole pipeline stalls for that cycle and
//           only the read pointer advances.
//   FLUSH   M+K bubble steps let the last vectors reach the sorter.
//   COUNT   K cycles: the counting PE reads one sorter cell per cycle and
//           increments the counter of its label.
//   LSORT   2M cycles: the M counters enter a chain of M label-sort PEs, which
//           order them by count, ties going to the label with the nearer
//           neighbour.
//   PRED    pred_valid is high with pred_label = rank pred_try of the list.
//           fb_valid with fb_found=1 ends the classification, after a
//           replacement (REPL, one write) if pred_try > 0 and learn_en is
//           high (learn_en low gives the static KNN classifier). fb_found=0 moves to
//           the next rank.
// Latency from start to the first pred_valid, for a vector that needs the
// search: N + 4M + 2K + 4 cycles, whatever the number of skipped training
// vectors (a skipped vector still takes its one read cycle; it only keeps the
// pipeline from advancing). latency holds that count for the last
// classification, stall_count the number of skipped vectors.
//
// What follows the document: the phases, the PE kinds and their rules, the
// masking rule and its stall, and the replacement rule. This design's own
// choices: the strictly sequential phases (the document overlaps them and
// quotes a shorter latency), the no_fault case, the host load port, and the
// end after M rejected predictions. The training set is loaded through
// train_* while the core is idle.
module dknn_core #(
  parameter int unsigned M      = dknn_pkg::DKNN_M,
  parameter int unsigned K      = dknn_pkg::DKNN_K,
  parameter int unsigned N      = dknn_pkg::DKNN_N,
  parameter int unsigned FEAT_W = dknn_pkg::DKNN_FEAT_W,
  localparam int unsigned LABEL_W = dknn_pkg::idx_width(M),
  localparam int unsigned IDX_W   = dknn_pkg::idx_width(N),
  localparam int unsigned DIST_W  = dknn_pkg::dist_width(FEAT_W, M),
  localparam int unsigned CW      = $clog2(K + 1),
  localparam int unsigned ENTRY_W = LABEL_W + M * FEAT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // classification request
  input  logic                     start,
  input  logic [M-1:0][FEAT_W-1:0] test_vec,
  output logic                     busy,
  // prediction and retest feedback
  output logic                     pred_valid,
  output logic [LABEL_W-1:0]       pred_label,
  output logic [LABEL_W-1:0]       pred_try,
  output logic                     pred_ideal,
  output logic                     no_fault,
  input  logic                     fb_valid,
  input  logic                     fb_found,
  input  logic                     learn_en,
  output logic                     done,
  output logic                     replaced,
  output logic [IDX_W-1:0]         replaced_idx,
  output logic [15:0]              latency,
  output logic [15:0]              stall_count,
  // training set load (idle only)
  input  logic                     train_we,
  input  logic [IDX_W-1:0]         train_idx,
  input  logic [LABEL_W-1:0]       train_label,
  input  logic [M-1:0][FEAT_W-1:0] train_feat
);

  typedef enum logic [3:0] {
    S_IDLE, S_IRC_GO, S_IRC, S_STREAM, S_FLUSH, S_COUNT, S_LSORT, S_PRED, S_REPL
  } state_t;
  state_t state;

  logic [M-1:0][FEAT_W-1:0] tv_q;
  logic [IDX_W:0]           rd_ptr;
  logic [7:0]               step;          // phase step counter
  logic [LABEL_W-1:0]       try_q;
  logic                     ideal_q, nofault_q, timing_q;
  logic [LABEL_W-1:0]       ideal_label_q;
  logic [15:0]              lat_cnt, latency_q;

  // ---------------------------------------------------------------- IRC
  logic                         irc_done;
  logic [$clog2(M+1)-1:0]       irc_cnt;
  logic [LABEL_W-1:0]           irc_idx;

  ideal_resolution #(.M(M), .FEAT_W(FEAT_W)) u_irc (
    .clk, .rst_n, .start(state == S_IRC_GO), .test_vec(tv_q),
    .done(irc_done), .nonzero_cnt(irc_cnt), .last_idx(irc_idx)
  );

  // ---------------------------------------------------------------- memory
  logic               mem_rd_en, mem_we;
  logic [IDX_W-1:0]   mem_wr_addr;
  logic [ENTRY_W-1:0] mem_rd_data, mem_wr_data;
  logic               rd_vld_q;
  logic [IDX_W-1:0]   rd_idx_q;

  assign mem_rd_en = (state == S_STREAM);

  training_memory #(.M(M), .N(N), .FEAT_W(FEAT_W)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(rd_ptr[IDX_W-1:0]), .rd_data(mem_rd_data),
    .we(mem_we), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_vld_q <= 1'b0;
      rd_idx_q <= '0;
    end else begin
      rd_vld_q <= mem_rd_en;
      rd_idx_q <= rd_ptr[IDX_W-1:0];
    end
  end

  logic [LABEL_W-1:0]       rd_label;
  logic [M-1:0][FEAT_W-1:0] rd_feat;
  logic                     rd_allowed, adv, in_valid;
  assign rd_label   = mem_rd_data[ENTRY_W-1 -: LABEL_W];
  assign rd_feat    = mem_rd_data[M*FEAT_W-1:0];
  // A training vector is usable only if the test vector reports faults in the
  // sub-circuit named by its label.
  assign rd_allowed = (32'(rd_label) < M) && (tv_q[rd_label] != '0);
  assign in_valid   = rd_vld_q && rd_allowed;
  // The pipeline advances on a usable vector or on a flush bubble; it stalls
  // on a skipped vector.
  assign adv        = in_valid || (state == S_FLUSH && !rd_vld_q);

  // ---------------------------------------------------------------- distance pipeline
  logic [M:0][DIST_W-1:0]  dp_d;
  logic [M:0][LABEL_W-1:0] dp_l;
  logic [M:0][IDX_W-1:0]   dp_i;
  logic [M:0]              dp_v;

  assign dp_d[0] = '0;
  assign dp_l[0] = rd_label;
  assign dp_i[0] = rd_idx_q;
  assign dp_v[0] = in_valid;

  for (genvar m = 0; m < M; m++) begin : g_dist
    logic [FEAT_W-1:0] x_skewed;
    skew_fifo #(.DEPTH(m), .WIDTH(FEAT_W)) u_fifo (
      .clk, .adv, .din(rd_feat[m]), .dout(x_skewed)
    );
    distance_pe #(.FEAT_W(FEAT_W), .DIST_W(DIST_W), .LABEL_W(LABEL_W), .IDX_W(IDX_W)) u_pe (
      .clk, .rst_n, .adv, .y(tv_q[m]), .x(x_skewed),
      .d_in(dp_d[m]), .label_in(dp_l[m]), .idx_in(dp_i[m]), .valid_in(dp_v[m]),
      .d_out(dp_d[m+1]), .label_out(dp_l[m+1]), .idx_out(dp_i[m+1]), .valid_out(dp_v[m+1])
    );
  end

  // ---------------------------------------------------------------- distance sorter
  logic [K:0][DIST_W-1:0]  ds_d;
  logic [K:0][LABEL_W-1:0] ds_l;
  logic [K:0][IDX_W-1:0]   ds_i;
  logic [K:0]              ds_v;
  logic [K-1:0][DIST_W-1:0]  nn_d;
  logic [K-1:0][LABEL_W-1:0] nn_label;
  logic [K-1:0][IDX_W-1:0]   nn_idx;
  logic [K-1:0]              nn_valid;
  logic                      clear_arrays;

  assign clear_arrays = (state == S_IRC_GO);
  assign ds_d[0] = dp_d[M];
  assign ds_l[0] = dp_l[M];
  assign ds_i[0] = dp_i[M];
  assign ds_v[0] = dp_v[M];

  for (genvar k = 0; k < K; k++) begin : g_dsort
    distance_sort_pe #(.DIST_W(DIST_W), .LABEL_W(LABEL_W), .IDX_W(IDX_W)) u_pe (
      .clk, .rst_n, .clear(clear_arrays), .en(adv),
      .d_in(ds_d[k]), .label_in(ds_l[k]), .idx_in(ds_i[k]), .valid_in(ds_v[k]),
      .d_out(ds_d[k+1]), .label_out(ds_l[k+1]), .idx_out(ds_i[k+1]), .valid_out(ds_v[k+1]),
      .saved_d(nn_d[k]), .saved_label(nn_label[k]), .saved_idx(nn_idx[k]), .saved_valid(nn_valid[k])
    );
  end

  // ---------------------------------------------------------------- label counting
  logic [M-1:0][CW-1:0] counts;

  label_counter #(.M(M), .K(K)) u_cnt (
    .clk, .rst_n, .clear(clear_arrays), .en(state == S_COUNT),
    .label(nn_label[(32'(step) < K) ? step : 0]), .label_valid(nn_valid[(32'(step) < K) ? step : 0]),
    .counts
  );

  // ---------------------------------------------------------------- label sorter
  logic [M:0][CW-1:0]      ls_c;
  logic [M:0][LABEL_W-1:0] ls_l;
  logic [M:0]              ls_v;
  logic [M-1:0][LABEL_W-1:0] rank_label;
  logic [M-1:0]              rank_valid;
  logic [M-1:0][CW-1:0]      rank_cnt;

  assign ls_v[0] = (state == S_LSORT) && (32'(step) < M);
  assign ls_l[0] = LABEL_W'(step);
  assign ls_c[0] = (32'(step) < M) ? counts[ls_l[0]] : '0;

  for (genvar i = 0; i < M; i++) begin : g_lsort
    label_sort_pe #(.M(M), .K(K)) u_pe (
      .clk, .rst_n, .clear(clear_arrays), .en(state == S_LSORT),
      .cnt_in(ls_c[i]), .label_in(ls_l[i]), .valid_in(ls_v[i]),
      .nn_labels(nn_label), .nn_valid(nn_valid),
      .cnt_out(ls_c[i+1]), .label_out(ls_l[i+1]), .valid_out(ls_v[i+1]),
      .saved_cnt(rank_cnt[i]), .saved_label(rank_label[i]), .saved_valid(rank_valid[i])
    );
  end

  // ---------------------------------------------------------------- replacement search
  // Nearest neighbour carrying the first (wrong) prediction.
  logic             repl_hit;
  logic [IDX_W-1:0] repl_idx;
  always_comb begin
    repl_hit = 1'b0;
    repl_idx = '0;
    for (int k = K - 1; k >= 0; k--) begin
      if (learn_en && nn_valid[k] && nn_label[k] == rank_label[0]) begin
        repl_hit = 1'b1;
        repl_idx = nn_idx[k];
      end
    end
  end

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      tv_q          <= '0;
      rd_ptr        <= '0;
      step          <= '0;
      try_q         <= '0;
      ideal_q       <= 1'b0;
      nofault_q     <= 1'b0;
      ideal_label_q <= '0;
      lat_cnt       <= '0;
      latency_q     <= '0;
      timing_q      <= 1'b0;
      stall_count   <= '0;
      replaced_idx  <= '0;
    end else begin
      if (timing_q) lat_cnt <= lat_cnt + 1'b1;
      if (rd_vld_q && !rd_allowed) stall_count <= stall_count + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          tv_q        <= test_vec;
          state       <= S_IRC_GO;
          lat_cnt     <= 16'd1;
          timing_q    <= 1'b1;
          stall_count <= '0;
          try_q       <= '0;
          ideal_q     <= 1'b0;
          nofault_q   <= 1'b0;
        end
        S_IRC_GO: state <= S_IRC;
        S_IRC: if (irc_done) begin
          if (irc_cnt == 0) begin
            nofault_q <= 1'b1;
            state     <= S_PRED;
          end else if (irc_cnt == 1) begin
            ideal_q       <= 1'b1;
            ideal_label_q <= irc_idx;
            state         <= S_PRED;
          end else begin
            rd_ptr <= '0;
            state  <= S_STREAM;
          end
        end
        S_STREAM: begin
          rd_ptr <= rd_ptr + 1'b1;
          if (32'(rd_ptr) == N - 1) begin
            step  <= '0;
            state <= S_FLUSH;
          end
        end
        S_FLUSH: if (!rd_vld_q) begin
          step <= step + 1'b1;
          if (32'(step) == M + K - 1) begin
            step  <= '0;
            state <= S_COUNT;
          end
        end
        S_COUNT: begin
          step <= step + 1'b1;
          if (32'(step) == K - 1) begin
            step  <= '0;
            state <= S_LSORT;
          end
        end
        S_LSORT: begin
          step <= step + 1'b1;
          if (32'(step) == 2 * M - 1) begin
            step  <= '0;
            state <= S_PRED;
          end
        end
        S_PRED: begin
          if (timing_q) begin
            latency_q <= lat_cnt;
            timing_q  <= 1'b0;
          end
          if (fb_valid) begin
            if (ideal_q || nofault_q) begin
              state <= S_IDLE;
            end else if (fb_found) begin
              state <= (try_q != 0 && repl_hit) ? S_REPL : S_IDLE;
            end else if (32'(try_q) == M - 1) begin
              state <= S_IDLE;
            end else begin
              try_q <= try_q + 1'b1;
            end
          end
        end
        S_REPL: begin
          replaced_idx <= repl_idx;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Replacement write: test vector with the label that proved faulty.
  assign mem_we      = (state == S_REPL) || (state == S_IDLE && train_we);
  assign mem_wr_addr = (state == S_REPL) ? repl_idx : train_idx;
  assign mem_wr_data = (state == S_REPL) ? {rank_label[try_q], tv_q} : {train_label, train_feat};

  // While the first prediction is presented for the first cycle, the count
  // is still running; afterwards it is held.
  assign latency    = timing_q ? lat_cnt : latency_q;
  assign busy       = (state != S_IDLE);
  assign pred_valid = (state == S_PRED);
  assign pred_label = ideal_q ? ideal_label_q : rank_label[try_q];
  assign pred_try   = try_q;
  assign pred_ideal = ideal_q;
  assign no_fault   = nofault_q;
  assign replaced   = (state == S_REPL);
  assign done       = (state == S_REPL) ||
                      (state == S_PRED && fb_valid &&
                       (ideal_q || nofault_q || (fb_found && !(try_q != 0 && repl_hit)) ||
                        (!fb_found && 32'(try_q) == M - 1)));

  // The prediction must not change while it is presented.
  property p_pred_stable;
    @(posedge clk) disable iff (!rst_n)
      (pred_valid && !fb_valid) |=> (pred_valid && $stable(pred_label));
  endproperty
  assert property (p_pred_stable);

endmodule
