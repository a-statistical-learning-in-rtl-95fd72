// dknn_workload_run: drives one classifier core through a complete
// diagnosis workload and checks it against the reference model.
//
// A synthetic fault-count data set is generated: a vector whose true faulty
// sub-circuit is l has a large count in dimension l and, with probability
// one third each, smaller counts in other dimensions (the ambiguity a fault
// dictionary leaves). N vectors are loaded as the training set and
// NTEST further vectors are classified one after the other. The retest answer
// is given from the true label, so the core iterates through its ranking and
// learns after every miss, as in the dynamic classifier. With NONSTAT = 1 the
// last two labels never appear in the training set, so the core can only
// predict them after it has learned them. With LEARN = 0 the core runs as a
// static KNN classifier. Instances with the same SEED see the same data.
//
// Every presented prediction, the skipped-vector count, the search latency
// (N + 4M + 2K + 4 cycles) and every replacement are checked against the
// reference model. At the end the module reports the first-prediction error
// rate, the average number of predictions per vector and the total cycle
// count of the core (start to idle, host handshakes not included).
//
// Interface: no inputs; `finished` rises when the workload is done, with
// `checks` and `failures` holding the totals. The data-set shape is this
// testbench's own; the real diagnosis data are not reproduced here.
module dknn_workload_run #(
  parameter int M       = 10,
  parameter int K       = 5,
  parameter int N       = 256,
  parameter int NTEST   = 741,
  parameter bit NONSTAT = 1'b0,
  parameter bit LEARN   = 1'b1,
  parameter int SEED    = 1,
  parameter string NAME = "workload"
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import dknn_ref_pkg::*;
  localparam int FW = 8;
  localparam int LW = dknn_pkg::idx_width(M);
  localparam int IW = dknn_pkg::idx_width(N);

  logic rst_n = 0, start = 0, busy;
  logic [M-1:0][FW-1:0] test_vec, train_feat;
  logic pred_valid, pred_ideal, no_fault, fb_valid = 0, fb_found = 0, done, replaced;
  logic [LW-1:0] pred_label, pred_try, train_label;
  logic [IW-1:0] train_idx, replaced_idx;
  logic [15:0] latency, stall_count;
  logic train_we = 0, learn_en = LEARN;
  dknn_ref ref_m;

  dknn_core #(.M(M), .K(K), .N(N), .FEAT_W(FW)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: %s", NAME, msg); end
  endtask

  // One synthetic diagnosis vector for true label l.
  function automatic void make_vec(int l, ref int v[]);
    int peak;
    v = new[M];
    peak = $urandom_range(4, 60);
    for (int m = 0; m < M; m++)
      v[m] = (m == l) ? peak : (($urandom_range(0, 2) == 0) ? $urandom_range(1, peak) : 0);
  endfunction

  initial begin
    int tv[], true_l, tries, first_wrong, n_pred, idx;
    longint cycles;
    string note;
    checks = 0; failures = 0; finished = 0;
    void'($urandom(SEED));
    first_wrong = 0; n_pred = 0; cycles = 0;
    ref_m = new(M, K, N);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      ref_m.label[n] = $urandom_range(0, NONSTAT ? M - 3 : M - 1);
      make_vec(ref_m.label[n], tv);
      for (int m = 0; m < M; m++) ref_m.feat[n][m] = tv[m];
      train_we <= 1; train_idx <= IW'(n); train_label <= LW'(ref_m.label[n]);
      for (int m = 0; m < M; m++) train_feat[m] <= FW'(tv[m]);
      @(posedge clk);
    end
    train_we <= 0;
    @(posedge clk);
    for (int t = 0; t < NTEST; t++) begin
      true_l = $urandom_range(0, M - 1);
      make_vec(true_l, tv);
      for (int m = 0; m < M; m++) test_vec[m] = FW'(tv[m]);
      ref_m.classify(tv);
      start <= 1; @(posedge clk); start <= 0;
      cycles += 1;
      tries = 0;
      forever begin
        automatic int guard = 0;
        while (!pred_valid && guard < 4 * N + 100) begin @(posedge clk); #1; guard++; cycles++; end
        chk(pred_valid, "prediction presented");
        n_pred++;
        if (ref_m.ideal) begin
          chk(pred_ideal && pred_label == LW'(ref_m.rank[0]), "ideal resolution");
        end else begin
          chk(pred_label == LW'(ref_m.rank[tries]),
              $sformatf("t%0d rank %0d label %0d exp %0d", t, tries, pred_label, ref_m.rank[tries]));
          if (tries == 0) begin
            chk(latency == 16'(N + 4 * M + 2 * K + 4), $sformatf("latency %0d", latency));
            chk(stall_count == 16'(ref_m.stalls), "skipped vectors");
          end
        end
        if (tries == 0 && pred_label != LW'(true_l)) first_wrong++;
        fb_valid <= 1; fb_found <= (pred_label == LW'(true_l));
        @(posedge clk);
        fb_valid <= 0;
        cycles++;
        #1;
        if (ref_m.ideal || ref_m.rank[tries] == true_l) break;
        tries++;
      end
      if (!LEARN) begin
        chk(!replaced && !busy, "static classifier leaves the training set alone");
      end else if (!ref_m.ideal && tries > 0) begin
        idx = ref_m.learn(tv, true_l);
        if (idx >= 0) begin
          @(posedge clk); #1; cycles++;
          chk(replaced_idx == IW'(idx), "replaced training vector");
        end
      end
      while (busy) begin @(posedge clk); cycles++; end
    end
    note = {NONSTAT ? ", two labels absent from training" : "", LEARN ? ", DKNN" : ", static KNN"};
    $display("%s (M=%0d K=%0d N=%0d, %0d tests%s): first-prediction error %0.1f %%, %0.2f predictions per vector, %0d cycles",
             NAME, M, K, N, NTEST, note,
             100.0 * first_wrong / NTEST, real'(n_pred) / NTEST, cycles);
    finished = 1;
  end
endmodule
