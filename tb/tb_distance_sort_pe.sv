// tb_distance_sort_pe: a chain of K sort cells is fed random distances (with
// bubbles, stalls and many equal distances), then flushed; the saved triples
// must be the K smallest in ascending order, equal distances in arrival order.
module tb_distance_sort_pe;
  localparam int K = 4, DW = 13, LW = 4, IW = 8;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [K:0][DW-1:0] d;
  logic [K:0][LW-1:0] l;
  logic [K:0][IW-1:0] ix;
  logic [K:0]         v;
  logic [K-1:0][DW-1:0] sd;
  logic [K-1:0][LW-1:0] sl;
  logic [K-1:0][IW-1:0] si;
  logic [K-1:0]         sv;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < K; k++) begin : g
    distance_sort_pe #(.DIST_W(DW), .LABEL_W(LW), .IDX_W(IW)) u (
      .clk, .rst_n, .clear, .en,
      .d_in(d[k]), .label_in(l[k]), .idx_in(ix[k]), .valid_in(v[k]),
      .d_out(d[k+1]), .label_out(l[k+1]), .idx_out(ix[k+1]), .valid_out(v[k+1]),
      .saved_d(sd[k]), .saved_label(sl[k]), .saved_idx(si[k]), .saved_valid(sv[k])
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
    for (int r = 0; r < 30; r++) begin
      int dq[$], idx[$], nin;
      dq.delete(); idx.delete();
      clear <= 1; @(posedge clk); clear <= 0;
      nin = (r % 5 == 0) ? 2 : $urandom_range(5, 40);   // sometimes fewer than K
      for (int i = 0; i < nin; i++) begin
        int dd;
        dd = $urandom_range(0, 12);
        // random stall cycles: input present but en low
        while ($urandom_range(0, 3) == 0) begin
          en <= 0; v[0] <= 1; d[0] <= DW'($urandom_range(0, 3)); @(posedge clk);
        end
        en <= 1; v[0] <= 1; d[0] <= DW'(dd); l[0] <= LW'(dd % 7); ix[0] <= IW'(i);
        @(posedge clk);
        begin
          automatic int pos = dq.size();
          for (int j = 0; j < dq.size(); j++) if (dd < dq[j]) begin pos = j; break; end
          dq.insert(pos, dd); idx.insert(pos, i);
        end
      end
      for (int i = 0; i < K; i++) begin en <= 1; v[0] <= 0; @(posedge clk); end
      en <= 0; #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (k < dq.size()) begin
          if (!sv[k] || sd[k] != dq[k] || si[k] != idx[k]) begin
            failures++; $display("r%0d cell %0d: %0d/%0d exp %0d/%0d", r, k, sd[k], si[k], dq[k], idx[k]);
          end
        end else if (sv[k]) begin
          failures++; $display("r%0d cell %0d should be empty", r, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
