// tb_ideal_resolution: vectors with zero, one and several non-zero features;
// checks the non-zero count, the last non-zero index and the M+1 cycle timing.
module tb_ideal_resolution;
  localparam int M = 10, FW = 8;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [M-1:0][FW-1:0] test_vec;
  logic [3:0] nonzero_cnt, last_idx;
  int checks = 0, failures = 0;

  ideal_resolution #(.M(M), .FEAT_W(FW)) dut (.*);
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
    for (int r = 0; r < 60; r++) begin
      int nz, last, lat, mode;
      mode = r % 3;
      nz = 0; last = 0;
      for (int m = 0; m < M; m++) begin
        case (mode)
          0: test_vec[m] = '0;
          1: test_vec[m] = (m == r % M) ? FW'($urandom_range(1, 255)) : '0;
          default: test_vec[m] = ($urandom_range(0, 1) == 1) ? FW'($urandom_range(1, 255)) : '0;
        endcase
        if (test_vec[m] != 0) begin nz++; last = m; end
      end
      start <= 1; @(posedge clk); start <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; #1; end while (!done && lat < 100);
      checks += 3;
      if (lat != M) begin failures++; $display("lat %0d", lat); end
      if (nonzero_cnt != nz) begin failures++; $display("cnt %0d exp %0d", nonzero_cnt, nz); end
      if (nz > 0 && last_idx != last) begin failures++; $display("idx %0d exp %0d", last_idx, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
