// tb_dknn_core: end-to-end test of the classifier core against the reference
// model. Loads a random training set, classifies random test vectors (with
// ideal-resolution and no-fault cases mixed in), answers each prediction with
// a randomly chosen true sub-circuit, and checks every presented prediction,
// the skipped-vector count, the replacement of the training set, and the
// latency of a full search (N + 4M + 2K + 4 cycles). Every sixth vector is
// classified with learning off (static KNN) and must not change the training
// set.
module tb_dknn_core;
  import dknn_ref_pkg::*;
  localparam int M = 4, K = 3, N = 16, FW = 8;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [M-1:0][FW-1:0] test_vec, train_feat;
  logic pred_valid, pred_ideal, no_fault, fb_valid = 0, fb_found = 0, done, replaced;
  logic [1:0] pred_label, pred_try, train_label;
  logic [3:0] train_idx, replaced_idx;
  logic [15:0] latency, stall_count;
  logic train_we = 0, learn_en = 1;
  int checks = 0, failures = 0;
  int n_ideal = 0, n_nofault = 0, n_search = 0, n_repl = 0, n_stall = 0, n_retry = 0, n_static = 0;
  dknn_ref ref_m;

  dknn_core #(.M(M), .K(K), .N(N), .FEAT_W(FW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    ref_m = new(M, K, N);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      ref_m.label[n] = $urandom_range(0, M - 1);
      for (int m = 0; m < M; m++) ref_m.feat[n][m] = $urandom_range(0, 7);
      train_we <= 1; train_idx <= 4'(n); train_label <= 2'(ref_m.label[n]);
      for (int m = 0; m < M; m++) train_feat[m] <= FW'(ref_m.feat[n][m]);
      @(posedge clk);
    end
    train_we <= 0;
    for (int r = 0; r < 60; r++) begin
      int tv[], true_l, tries, nz_l[$];
      tv = new[M];
      nz_l.delete();
      for (int m = 0; m < M; m++) begin
        case (r % 10)
          0: tv[m] = 0;
          1: tv[m] = (m == r % M) ? $urandom_range(1, 7) : 0;
          default: tv[m] = ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 7);
        endcase
        test_vec[m] = FW'(tv[m]);
        if (tv[m] != 0) nz_l.push_back(m);
      end
      ref_m.classify(tv);
      learn_en = (r % 6 != 4);
      true_l = (nz_l.size() > 0) ? nz_l[$urandom_range(0, nz_l.size() - 1)] : 0;
      start <= 1; @(posedge clk); start <= 0;
      tries = 0;
      forever begin
        automatic int guard = 0;
        while (!pred_valid && guard < 2000) begin @(posedge clk); #1; guard++; end
        chk(pred_valid, "prediction presented");
        if (ref_m.nofault) begin
          chk(no_fault, "no-fault flag"); n_nofault++;
        end else if (ref_m.ideal) begin
          chk(pred_ideal && pred_label == ref_m.rank[0], $sformatf("ideal label %0d exp %0d", pred_label, ref_m.rank[0]));
          n_ideal++;
        end else begin
          chk(!pred_ideal && pred_label == ref_m.rank[tries] && pred_try == tries,
              $sformatf("r%0d rank %0d label %0d exp %0d", r, tries, pred_label, ref_m.rank[tries]));
          if (tries == 0) begin
            n_search++;
            chk(latency == N + 4 * M + 2 * K + 4, $sformatf("latency %0d", latency));
            chk(stall_count == ref_m.stalls, $sformatf("stalls %0d exp %0d", stall_count, ref_m.stalls));
            if (ref_m.stalls > 0) n_stall++;
          end
        end
        fb_valid <= 1; fb_found <= (pred_label == true_l);
        @(posedge clk);
        fb_valid <= 0;
        #1;
        if (ref_m.nofault || ref_m.ideal || ref_m.rank[tries] == true_l) break;
        tries++; n_retry++;
      end
      if (!learn_en && !ref_m.nofault && !ref_m.ideal && tries > 0) begin
        chk(!replaced, "no replacement with learning off");
        n_static++;
      end else if (!ref_m.nofault && !ref_m.ideal && tries > 0) begin
        int idx;
        idx = ref_m.learn(tv, true_l);
        if (idx >= 0) begin
          chk(replaced, "replacement write");
          @(posedge clk); #1;
          chk(replaced_idx == idx, $sformatf("replaced idx %0d exp %0d", replaced_idx, idx));
          chk(dut.u_mem.mem[idx] == {2'(true_l), test_vec}, "replaced contents");
          n_repl++;
        end
      end
      while (busy) @(posedge clk);
      @(posedge clk);
    end
    $display("mechanisms: search=%0d ideal=%0d nofault=%0d stall=%0d retry=%0d replace=%0d static=%0d",
             n_search, n_ideal, n_nofault, n_stall, n_retry, n_repl, n_static);
    chk(n_search > 0 && n_ideal > 0 && n_nofault > 0 && n_stall > 0 && n_retry > 0 && n_repl > 0 && n_static > 0,
        "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
