// tb_dknn_workloads: runs the classifier core on the workloads of the
// evaluation, each in its own core instance, and checks them all against the
// reference model.
//
//   base     M=10 K=5  N=256, 741 test vectors (the timing run)
//   nonstat  M=10 K=5  N=256, 740 test vectors, two labels absent from the
//            training set, so the dynamic learning has to supply them; run
//            twice on identical data, with learning (DKNN) and without
//            (static KNN), as in the error comparison of the evaluation
//   wide     M=20 K=5  N=256 (the doubled-dimension build), 150 test vectors
//   deep     M=10 K=10 N=256 (the doubled-neighbour build), 150 test vectors
//   n300, n50, k1  the largest and a small training set, and the smallest
//            neighbourhood, of the parameter sweeps (100 test vectors each)
//
// The two larger builds are run on fewer vectors to keep the simulation
// short; their logic is the same and the sizes are what matters there. The
// data are synthetic (see dknn_workload_run). A watchdog ends the run.
module tb_dknn_workloads;
  logic clk = 0;
  localparam int NR = 8;
  int c[NR], f[NR];
  logic fin[NR];
  int checks, failures;

  always #5 clk = ~clk;

  dknn_workload_run #(.M(10), .K(5),  .N(256), .NTEST(741), .NONSTAT(1'b0), .NAME("base"))
    u_base    (.clk, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  dknn_workload_run #(.M(10), .K(5),  .N(256), .NTEST(740), .NONSTAT(1'b1), .SEED(7), .NAME("nonstat"))
    u_nonstat (.clk, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  dknn_workload_run #(.M(10), .K(5),  .N(256), .NTEST(740), .NONSTAT(1'b1), .SEED(7), .LEARN(1'b0),
                      .NAME("nonstat"))
    u_nonstat_knn (.clk, .checks(c[4]), .failures(f[4]), .finished(fin[4]));
  dknn_workload_run #(.M(20), .K(5),  .N(256), .NTEST(150), .NONSTAT(1'b0), .NAME("wide"))
    u_wide    (.clk, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  dknn_workload_run #(.M(10), .K(10), .N(256), .NTEST(150), .NONSTAT(1'b0), .NAME("deep"))
    u_deep    (.clk, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  // Ends of the training-set and neighbourhood sweeps.
  dknn_workload_run #(.M(10), .K(5),  .N(300), .NTEST(100), .NONSTAT(1'b0), .NAME("n300"))
    u_n300    (.clk, .checks(c[5]), .failures(f[5]), .finished(fin[5]));
  dknn_workload_run #(.M(10), .K(5),  .N(50),  .NTEST(100), .NONSTAT(1'b0), .NAME("n50"))
    u_n50     (.clk, .checks(c[6]), .failures(f[6]), .finished(fin[6]));
  dknn_workload_run #(.M(10), .K(1),  .N(256), .NTEST(100), .NONSTAT(1'b0), .NAME("k1"))
    u_k1      (.clk, .checks(c[7]), .failures(f[7]), .finished(fin[7]));

  function automatic int sum(int v[NR]);
    int t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    checks = sum(c);
    failures = sum(f) + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (fin.and() == 1'b1);
    checks = sum(c);
    failures = sum(f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
