// tb_fault_accumulator: applies random test results with random dictionary
// data, compares the accumulated faults with a model, then shifts them out and
// checks the serial order (fault 0 first).
module tb_fault_accumulator;
  localparam int F = 24;
  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0, fail = 0, shift_en = 0, fault_bit;
  logic [F-1:0] dict_data, faults, ref_f;
  int checks = 0, failures = 0;

  fault_accumulator #(.NUM_FAULTS(F)) dut (.*);
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
      clear <= 1; @(posedge clk); clear <= 0;
      ref_f = '0;
      for (int t = 0; t < 12; t++) begin
        logic f; logic [F-1:0] dd;
        f = ($urandom_range(0, 2) == 0);
        dd = F'($urandom) & F'($urandom);
        fail <= f; dict_data <= dd; acc_en <= ($urandom_range(0, 4) != 0);
        @(posedge clk); #1;
        if (acc_en && f) ref_f |= dd;
        checks++;
        if (faults !== ref_f) begin failures++; $display("acc %h vs %h", faults, ref_f); end
      end
      acc_en <= 0;
      for (int i = 0; i < F; i++) begin
        #1; checks++;
        if (fault_bit !== ref_f[i]) failures++;
        shift_en <= 1; @(posedge clk); shift_en <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
