// tb_distance_pe: random features and partial distances; checks
// d_out = d_in + |y - x|, the pass-through of label, index and valid, and that
// a stalled stage holds its output.
module tb_distance_pe;
  localparam int FW = 8, DW = 13, LW = 4, IW = 8;
  logic clk = 0, rst_n = 0, adv = 0, valid_in = 0, valid_out;
  logic [FW-1:0] y = '0, x = '0;
  logic [DW-1:0] d_in = '0, d_out;
  logic [LW-1:0] label_in = '0, label_out;
  logic [IW-1:0] idx_in = '0, idx_out;
  int checks = 0, failures = 0;

  distance_pe #(.FEAT_W(FW), .DIST_W(DW), .LABEL_W(LW), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_d, exp_l, exp_i, exp_v;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    exp_d = 0; exp_l = 0; exp_i = 0; exp_v = 0;
    for (int i = 0; i < 400; i++) begin
      logic a;
      a = ($urandom_range(0, 3) != 0);
      adv <= a;
      y <= FW'($urandom); x <= FW'($urandom); d_in <= DW'($urandom_range(0, 2000));
      label_in <= LW'($urandom); idx_in <= IW'($urandom); valid_in <= 1'($urandom);
      #1;
      if (a) begin
        exp_d = d_in + ((y > x) ? y - x : x - y);
        exp_l = label_in; exp_i = idx_in; exp_v = valid_in;
      end
      @(posedge clk); #1;
      checks++;
      if (d_out != exp_d || label_out != exp_l || idx_out != exp_i || valid_out != exp_v) begin
        failures++;
        $display("got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", d_out, label_out, idx_out, valid_out, exp_d, exp_l, exp_i, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
