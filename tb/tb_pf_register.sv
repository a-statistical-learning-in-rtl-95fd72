// tb_pf_register: loads random pass/fail vectors, rotates them and checks that
// the bits leave in test order and that the register is whole again after a
// full turn.
module tb_pf_register;
  localparam int T = 16;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, pf_out;
  logic [T-1:0] pf_in, pf_q, ref_v;
  int checks = 0, failures = 0;

  pf_register #(.NUM_TESTS(T)) dut (.*);
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
    for (int r = 0; r < 20; r++) begin
      ref_v = T'($urandom);
      pf_in <= ref_v; load <= 1;
      @(posedge clk); load <= 0;
      for (int i = 0; i < T; i++) begin
        // random idle cycles: no shift, value must hold
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #1;
          checks++; if (pf_out !== ref_v[i]) failures++;
        end
        #1; checks++;
        if (pf_out !== ref_v[i]) begin failures++; $display("bit %0d got %b", i, pf_out); end
        shift <= 1; @(posedge clk); shift <= 0;
      end
      #1; checks++;
      if (pf_q !== ref_v) begin failures++; $display("circular: %h vs %h", pf_q, ref_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
