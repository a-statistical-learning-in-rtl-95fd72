// tb_fmic: programs random module boundaries, streams random fault bits and
// compares each sub-circuit counter with a model.
module tb_fmic;
  localparam int M = 5, F = 32, CW = 8;
  localparam int FI_W = $clog2(F + 1);
  logic clk = 0, rst_n = 0, clear = 0, en = 0, fault_bit = 0, mir_we = 0;
  logic [1:0] mir_idx;
  logic [FI_W-1:0] mir_value;
  logic [M-1:0][CW-1:0] count;
  int checks = 0, failures = 0;
  int bnd[M+1];
  int ref_c[M];

  fmic #(.M(M), .NUM_FAULTS(F), .CNT_W(CW)) dut (.*);
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
    @(posedge clk);
    // reset boundaries: even split
    for (int j = 0; j < M - 1; j++) begin
      checks++;
      if (dut.mir[j] != ((j + 1) * F) / M) failures++;
    end
    for (int r = 0; r < 20; r++) begin
      // random increasing boundaries
      bnd[0] = 0; bnd[M] = F;
      for (int j = 1; j < M; j++) bnd[j] = bnd[j-1] + $urandom_range(0, (F - bnd[j-1]) / (M - j + 1) + 2);
      for (int j = 1; j < M; j++) if (bnd[j] > F) bnd[j] = F;
      for (int j = 1; j < M; j++) begin
        mir_we <= 1; mir_idx <= 2'(j - 1); mir_value <= FI_W'(bnd[j]);
        @(posedge clk);
      end
      mir_we <= 0;
      clear <= 1; @(posedge clk); clear <= 0;
      foreach (ref_c[j]) ref_c[j] = 0;
      for (int i = 0; i < F; i++) begin
        logic b;
        b = $urandom_range(0, 1);
        fault_bit <= b; en <= 1;
        for (int j = 0; j < M; j++) if (b && i >= bnd[j] && i < bnd[j+1]) ref_c[j]++;
        @(posedge clk);
      end
      en <= 0;
      @(posedge clk); #1;
      for (int j = 0; j < M; j++) begin
        checks++;
        if (count[j] != ref_c[j]) begin failures++; $display("r%0d count[%0d]=%0d exp %0d", r, j, count[j], ref_c[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
