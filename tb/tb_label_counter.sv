// tb_label_counter: random neighbour labels, some marked empty; the counters
// vector must match a model after each run of K counts.
module tb_label_counter;
  localparam int M = 10, K = 5;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, label_valid = 0;
  logic [3:0] label = '0;
  logic [M-1:0][2:0] counts;
  int checks = 0, failures = 0;

  label_counter #(.M(M), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 50; r++) begin
      int exp_c[M];
      clear <= 1; @(posedge clk); clear <= 0;
      foreach (exp_c[m]) exp_c[m] = 0;
      for (int k = 0; k < K; k++) begin
        int lb; logic vv;
        lb = (r % 4 == 0) ? 3 : $urandom_range(0, M - 1);
        vv = ($urandom_range(0, 4) != 0);
        en <= 1; label <= 4'(lb); label_valid <= vv;
        if (vv) exp_c[lb]++;
        @(posedge clk);
        // an idle cycle must not count
        en <= 0; label_valid <= 1; @(posedge clk);
      end
      en <= 0; #1;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (counts[m] != exp_c[m]) begin failures++; $display("r%0d counts[%0d]=%0d exp %0d", r, m, counts[m], exp_c[m]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
