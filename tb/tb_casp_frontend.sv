// tb_casp_frontend: runs random pass/fail vectors against a random fault
// dictionary and checks the per-sub-circuit fault counts against a model, and
// the front end latency of NUM_TESTS + NUM_FAULTS cycles.
module tb_casp_frontend;
  localparam int M = 4, T = 8, F = 16, CW = 8;
  localparam int FI_W = $clog2(F + 1);
  logic clk = 0, rst_n = 0, pf_load = 0, mir_we = 0, counts_valid, busy;
  logic [T-1:0] pf_vector;
  logic [2:0] dict_test_idx;
  logic [F-1:0] dict_data;
  logic [1:0] mir_idx = '0;
  logic [FI_W-1:0] mir_value = '0;
  logic [M-1:0][CW-1:0] counts;
  logic [F-1:0] dict [T];
  int checks = 0, failures = 0;

  casp_frontend #(.M(M), .NUM_TESTS(T), .NUM_FAULTS(F), .CNT_W(CW)) dut (.*);
  assign dict_data = dict[dict_test_idx];
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
    for (int r = 0; r < 15; r++) begin
      logic [F-1:0] acc;
      int exp_c[M], lat;
      foreach (dict[t]) dict[t] = F'($urandom) & F'($urandom);
      pf_vector = T'($urandom);
      acc = '0;
      for (int t = 0; t < T; t++) if (pf_vector[t]) acc |= dict[t];
      // default boundaries: sub-circuit j owns faults [j*F/M, (j+1)*F/M)
      foreach (exp_c[j]) begin
        exp_c[j] = 0;
        for (int f = j * F / M; f < (j + 1) * F / M; f++) exp_c[j] += acc[f];
      end
      pf_load <= 1; @(posedge clk); pf_load <= 0; #1;
      lat = 0;
      while (!counts_valid) begin @(posedge clk); lat++; #1; end
      checks++;
      if (lat != T + F) begin failures++; $display("latency %0d", lat); end
      for (int j = 0; j < M; j++) begin
        checks++;
        if (counts[j] != exp_c[j]) begin failures++; $display("r%0d c[%0d]=%0d exp %0d", r, j, counts[j], exp_c[j]); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
