// tb_dknn_axi_slave_async: the host-protocol test of tb_dknn_axi_slave, run
// with the classifier on its own clock (ASYNC_CORE = 1). The core clock has a
// period of 6 time units against 16 for the bus, a ratio of about 2.7 that
// keeps the edges of the two clocks drifting against each other. All checks
// are the same: every prediction, the flags, the training load through the
// toggle crossing, and the latency register (counted in core cycles).
module tb_dknn_axi_slave_async;
  import dknn_ref_pkg::*;
  localparam int M = 6, K = 3, N = 16, FW = 8;
  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '1;
  logic [1:0]  bresp, rresp;
  logic [M-1:0][FW-1:0] ext_vec;
  logic ext_vec_valid = 0, irq;
  int checks = 0, failures = 0;
  int repl_i;
  int n_repl = 0, n_retry = 0, n_ext = 0, n_ideal = 0, n_stall = 0;
  dknn_ref ref_m;

  logic cclk = 0;
  dknn_axi_slave #(.M(M), .K(K), .N(N), .FEAT_W(FW), .ASYNC_CORE(1'b1)) dut (
    .s_axi_aclk(clk), .s_axi_aresetn(rst_n), .core_clk(cclk),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ext_vec, .ext_vec_valid, .irq
  );
  always #8 clk = ~clk;
  always #3 cclk = ~cclk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    awaddr <= a; wdata <= d; awvalid <= 1; wvalid <= 1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0; bready <= 1;
    do @(posedge clk); while (!bvalid);
    bready <= 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready);
    arvalid <= 0;
    @(posedge clk);
    while (!rvalid) @(posedge clk);
    d = rdata;
    // hold rready low for a cycle: data must stay
    @(posedge clk);
    chk(rvalid && rdata == d, "read data held until taken");
    rready <= 1; @(posedge clk); rready <= 0;
  endtask

  task automatic poll(input logic [7:0] a, input int bit_i, input logic val);
    logic [31:0] d;
    int n = 0;
    do begin axi_read(a, d); n++; end while (d[bit_i] !== val && n < 500);
    chk(d[bit_i] === val, $sformatf("poll bit %0d", bit_i));
  endtask

  task automatic write_vec(input logic [7:0] base, input int v[]);
    for (int w = 0; w < (M + 3) / 4; w++) begin
      logic [31:0] d = '0;
      for (int i = 0; i < 4; i++) if (4 * w + i < M) d[8*i +: 8] = 8'(v[4*w+i]);
      axi_write(base + 8'(4 * w), d);
    end
  endtask

  initial begin
    logic [31:0] d;
    ref_m = new(M, K, N);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // training set
    for (int n = 0; n < N; n++) begin
      int f[];
      f = new[M];
      ref_m.label[n] = $urandom_range(0, M - 1);
      for (int m = 0; m < M; m++) begin f[m] = $urandom_range(0, 9); ref_m.feat[n][m] = f[m]; end
      write_vec(8'h80, f);
      axi_write(8'h0C, {8'd0, 8'(ref_m.label[n]), 16'(n)});
    end
    for (int r = 0; r < 24; r++) begin
      int tv[], true_l, tries, nzl[$];
      bit use_ext;
      tv = new[M];
      nzl.delete();
      use_ext = (r % 4 == 3);
      for (int m = 0; m < M; m++) begin
        tv[m] = (r % 8 == 5) ? ((m == 2) ? 4 : 0) : (($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 9));
        if (tv[m] != 0) nzl.push_back(m);
      end
      if (nzl.size() == 0) begin tv[0] = 1; tv[1] = 2; nzl.push_back(0); nzl.push_back(1); end
      ref_m.classify(tv);
      true_l = nzl[$urandom_range(0, nzl.size() - 1)];
      if (use_ext) begin
        for (int m = 0; m < M; m++) ext_vec[m] = FW'(tv[m]);
        ext_vec_valid = 1;
        n_ext++;
      end else begin
        write_vec(8'h40, tv);
        axi_read(8'h40, d);
        chk(d[7:0] == 8'(tv[0]) && d[15:8] == 8'(tv[1]), "test word read-back");
      end
      axi_write(8'h00, {28'd0, use_ext, 3'b001});
      poll(8'h04, 0, 1'b1);                       // DATA_ACK
      axi_write(8'h00, {28'd0, use_ext, 3'b000});
      poll(8'h04, 0, 1'b0);
      tries = 0;
      forever begin
        poll(8'h04, 1, 1'b1);                     // PRED_VALID
        chk(irq, "interrupt with pending prediction");
        axi_read(8'h08, d);
        chk(d[7:0] == 8'(ref_m.rank[tries]) && d[15:8] == 8'(tries),
            $sformatf("r%0d try %0d got %0d exp %0d", r, tries, d[7:0], ref_m.rank[tries]));
        if (tries == 0 && !ref_m.ideal) begin
          logic [31:0] lat;
          axi_read(8'h10, lat);
          chk(lat[15:0] == 16'(N + 4 * M + 2 * K + 4) && lat[31:16] == 16'(ref_m.stalls),
              $sformatf("latency %0d stalls %0d exp %0d", lat[15:0], lat[31:16], ref_m.stalls));
          if (ref_m.stalls > 0) n_stall++;
        end
        if (ref_m.ideal) n_ideal++;
        axi_write(8'h00, {28'd0, use_ext, (d[7:0] == 8'(true_l)), 2'b10});
        poll(8'h04, 1, 1'b0);
        axi_write(8'h00, {28'd0, use_ext, 3'b000});
        if (ref_m.ideal || ref_m.rank[tries] == true_l) break;
        tries++; n_retry++;
      end
      poll(8'h04, 6, 1'b1);                       // DONE
      axi_read(8'h04, d);
      if (!ref_m.ideal && tries > 0) repl_i = ref_m.learn(tv, true_l);
      else repl_i = -1;
      if (repl_i >= 0) begin
        logic [31:0] pr;
        chk(d[7], "REPLACED flag"); n_repl++;
        axi_read(8'h08, pr);
        chk(pr[31:16] == 16'(repl_i), $sformatf("replaced index %0d exp %0d", pr[31:16], repl_i));
      end else begin
        chk(!d[7], "no replacement");
      end
      ext_vec_valid = 0;
    end
    $display("mechanisms: ext=%0d ideal=%0d stall=%0d retry=%0d replace=%0d", n_ext, n_ideal, n_stall, n_retry, n_repl);
    chk(n_ext > 0 && n_ideal > 0 && n_stall > 0 && n_retry > 0 && n_repl > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
