// tb_label_sort_pe: a chain of M label-sort cells ranks random label counts;
// many equal counts exercise the tie rule (label owning the nearer neighbour
// first, then lower label). Compared with a model.
module tb_label_sort_pe;
  localparam int M = 6, K = 5, LW = 3, CW = 3;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [M:0][CW-1:0] c;
  logic [M:0][LW-1:0] l;
  logic [M:0]         v;
  logic [M-1:0][CW-1:0] sc;
  logic [M-1:0][LW-1:0] sl;
  logic [M-1:0]         svld;
  logic [K-1:0][LW-1:0] nn_labels;
  logic [K-1:0]         nn_valid;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < M; i++) begin : g
    label_sort_pe #(.M(M), .K(K)) u (
      .clk, .rst_n, .clear, .en,
      .cnt_in(c[i]), .label_in(l[i]), .valid_in(v[i]), .nn_labels, .nn_valid,
      .cnt_out(c[i+1]), .label_out(l[i+1]), .valid_out(v[i+1]),
      .saved_cnt(sc[i]), .saved_label(sl[i]), .saved_valid(svld[i])
    );
  end
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 60; r++) begin
      int cnt[M], hit[M], rank[$];
      // K random neighbour labels (some empty); counts follow from them
      foreach (cnt[m]) begin cnt[m] = 0; hit[m] = 0; end
      for (int k = 0; k < K; k++) begin
        nn_labels[k] = LW'($urandom_range(0, M - 1));
        nn_valid[k]  = ($urandom_range(0, 5) != 0);
        if (nn_valid[k]) begin cnt[nn_labels[k]]++; hit[nn_labels[k]] += 1 << (K - 1 - k); end
      end
      rank.delete();
      for (int m = 0; m < M; m++) begin
        automatic int pos = rank.size();
        for (int j = 0; j < rank.size(); j++)
          if (cnt[m] > cnt[rank[j]] || (cnt[m] == cnt[rank[j]] && hit[m] > hit[rank[j]])) begin pos = j; break; end
        rank.insert(pos, m);
      end
      clear <= 1; @(posedge clk); clear <= 0;
      for (int s = 0; s < 2 * M; s++) begin
        en <= 1;
        v[0] <= (s < M); l[0] <= LW'(s); c[0] <= (s < M) ? CW'(cnt[s]) : '0;
        @(posedge clk);
      end
      en <= 0; #1;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (!svld[m] || sl[m] != rank[m] || sc[m] != cnt[rank[m]]) begin
          failures++; $display("r%0d rank %0d: label %0d exp %0d", r, m, sl[m], rank[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
