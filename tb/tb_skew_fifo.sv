// tb_skew_fifo: random data with random advance enables; the output must be
// the value written DEPTH advances earlier.
module tb_skew_fifo;
  localparam int D = 3, W = 8;
  logic clk = 0, adv = 0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist[$];
  int checks = 0, failures = 0;

  skew_fifo #(.DEPTH(D), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      adv <= ($urandom_range(0, 2) != 0);
      din <= W'($urandom);
      @(posedge clk);
      if (adv) hist.push_back(din);
      #1;
      if (hist.size() >= D) begin
        checks++;
        if (dout !== hist[hist.size() - D]) begin failures++; $display("got %h exp %h", dout, hist[hist.size() - D]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
