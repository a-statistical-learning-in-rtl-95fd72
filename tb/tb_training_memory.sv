// tb_training_memory: writes random entries, reads them back with one cycle of
// read latency, and checks that a read of an address written in the same
// cycle returns the old contents.
module tb_training_memory;
  localparam int M = 3, N = 16, FW = 8;
  localparam int EW = 2 + M * FW;
  logic clk = 0, rd_en = 0, we = 0;
  logic [3:0] rd_addr, wr_addr;
  logic [EW-1:0] rd_data, wr_data;
  logic [EW-1:0] model [N];
  int checks = 0, failures = 0;

  training_memory #(.M(M), .N(N), .FEAT_W(FW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      model[i] = EW'({$urandom, $urandom});
      we <= 1; wr_addr <= 4'(i); wr_data <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int r = 0; r < 200; r++) begin
      int a, w;
      logic [EW-1:0] nv, expv;
      a = $urandom_range(0, N - 1);
      w = $urandom_range(0, N - 1);
      nv = EW'({$urandom, $urandom});
      rd_en <= 1; rd_addr <= 4'(a);
      we <= ($urandom_range(0, 1) == 1); wr_addr <= 4'(w); wr_data <= nv;
      expv = model[a];
      @(posedge clk);
      if (we) model[w] = nv;
      rd_en <= 0; we <= 0;
      #1; checks++;
      if (rd_data !== expv) begin failures++; $display("addr %0d got %h exp %h", a, rd_data, expv); end
      // read data must hold while rd_en is low
      @(posedge clk); #1; checks++;
      if (rd_data !== expv) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
