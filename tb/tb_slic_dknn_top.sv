// tb_slic_dknn_top: end-to-end test of the diagnosis system at its default
// size (M = 10 sub-circuits, K = 5, N = 256 training vectors, 64 tests,
// 64 faults).
// The host loads the full training set over AXI4-Lite. Then it classifies
// test vectors from two sources: its own registers, and the fault counts the
// front end derives from a pass/fail vector and a random fault dictionary. It
// answers every prediction with a retest result and checks each step against
// reference models: fault counts, the ranked predictions, skipped training
// vectors, latency, and the learning replacements. Each mechanism of the design
// is counted and must occur: front-end diagnosis, boundary reprogramming,
// ideal resolution, no-fault, stalls on masked vectors, retries, replacement,
// and a miss with learning switched off (CTRL.NO_LEARN), which must leave the
// training set unchanged.
module tb_slic_dknn_top;
  import dknn_ref_pkg::*;
  localparam int M = 10, K = 5, N = 256, FW = 8, T = 64, F = 64;
  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '1;
  logic [1:0]  bresp, rresp;
  logic        irq, pf_load = 0, mir_we = 0, counts_valid, frontend_busy;
  logic [T-1:0] pf_vector = '0;
  logic [5:0]  dict_test_idx;
  logic [F-1:0] dict_data;
  logic [3:0]  mir_idx = '0;
  logic [6:0]  mir_value = '0;
  logic [F-1:0] dict [T];
  int bnd[M+1];
  int checks = 0, failures = 0;
  int n_fe = 0, n_mir = 0, n_ideal = 0, n_nofault = 0, n_stall = 0, n_retry = 0, n_repl = 0, n_reg = 0, n_static = 0;
  bit no_learn = 0;
  dknn_ref ref_m;

  slic_dknn_top dut (
    .clk, .rst_n, .core_clk(clk),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq, .pf_load, .pf_vector, .dict_test_idx, .dict_data,
    .mir_we, .mir_idx, .mir_value, .counts_valid, .frontend_busy
  );
  assign dict_data = dict[dict_test_idx];
  always #10 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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
    arvalid <= 0; rready <= 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    rready <= 0;
  endtask

  task automatic poll(input int bit_i, input logic val);
    logic [31:0] d;
    int n = 0;
    do begin axi_read(8'h04, d); n++; end while (d[bit_i] !== val && n < 2000);
    chk(d[bit_i] === val, $sformatf("poll STATUS bit %0d", bit_i));
  endtask

  task automatic write_vec(input logic [7:0] base, input int v[]);
    for (int w = 0; w < (M + 3) / 4; w++) begin
      logic [31:0] d = '0;
      for (int i = 0; i < 4; i++) if (4 * w + i < M) d[8*i +: 8] = 8'(v[4*w+i]);
      axi_write(base + 8'(4 * w), d);
    end
  endtask

  // One classification, the host answering with true_l.
  task automatic classify(input int tv[], input bit use_fe, input int true_l);
    int tries;
    logic [31:0] d;
    ref_m.classify(tv);
    if (!use_fe) write_vec(8'h40, tv);
    axi_write(8'h00, {27'd0, no_learn, use_fe, 3'b001});
    poll(0, 1'b1);
    axi_write(8'h00, {27'd0, no_learn, use_fe, 3'b000});
    tries = 0;
    forever begin
      poll(1, 1'b1);
      axi_read(8'h04, d);
      if (ref_m.nofault) begin
        chk(d[4], "NO_FAULT flag"); n_nofault++;
      end else begin
        logic [31:0] p;
        axi_read(8'h08, p);
        chk(p[7:0] == 8'(ref_m.rank[tries]),
            $sformatf("try %0d predicted %0d expected %0d", tries, p[7:0], ref_m.rank[tries]));
        chk(d[3] == ref_m.ideal, "IDEAL flag");
        if (ref_m.ideal) n_ideal++;
        if (tries == 0 && !ref_m.ideal) begin
          axi_read(8'h10, p);
          chk(p[15:0] == 16'(N + 4 * M + 2 * K + 4), $sformatf("latency %0d", p[15:0]));
          chk(p[31:16] == 16'(ref_m.stalls), $sformatf("stalls %0d exp %0d", p[31:16], ref_m.stalls));
          if (ref_m.stalls > 0) n_stall++;
        end
      end
      axi_write(8'h00, {27'd0, no_learn, use_fe, (!ref_m.nofault && ref_m.rank[tries] == true_l), 2'b10});
      poll(1, 1'b0);
      axi_write(8'h00, {27'd0, no_learn, use_fe, 3'b000});
      if (ref_m.nofault || ref_m.ideal || ref_m.rank[tries] == true_l) break;
      tries++; n_retry++;
    end
    poll(6, 1'b1);
    axi_read(8'h04, d);
    if (no_learn && !ref_m.nofault && !ref_m.ideal && tries > 0) begin
      chk(!d[7], "no replacement with learning off"); n_static++;
    end else if (!ref_m.nofault && !ref_m.ideal && tries > 0 && ref_m.learn(tv, true_l) >= 0) begin
      chk(d[7], "REPLACED flag"); n_repl++;
    end else begin
      chk(!d[7], "no replacement");
    end
  endtask

  function automatic int pick_nonzero(int tv[]);
    int nz[$];
    foreach (tv[m]) if (tv[m] != 0) nz.push_back(m);
    return (nz.size() == 0) ? 0 : nz[$urandom_range(0, nz.size() - 1)];
  endfunction

  initial begin
    ref_m = new(M, K, N);
    for (int j = 0; j <= M; j++) bnd[j] = (j * F) / M;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Training set: each vector has its own label's feature large and a few
    // smaller counts elsewhere, as an ambiguous dictionary would give.
    for (int n = 0; n < N; n++) begin
      int f[];
      f = new[M];
      ref_m.label[n] = $urandom_range(0, M - 1);
      for (int m = 0; m < M; m++) begin
        f[m] = (m == ref_m.label[n]) ? $urandom_range(2, 8) : (($urandom_range(0, 2) == 0) ? $urandom_range(1, 4) : 0);
        ref_m.feat[n][m] = f[m];
      end
      write_vec(8'h80, f);
      axi_write(8'h0C, {8'd0, 8'(ref_m.label[n]), 16'(n)});
    end
    for (int r = 0; r < 40; r++) begin
      int tv[];
      tv = new[M];
      no_learn = (r % 8 == 3);
      if (r % 2 == 0) begin
        // diagnosis through the front end
        logic [F-1:0] acc;
        if (r == 10) begin
          // move the boundary between sub-circuits 3 and 4
          bnd[4] = bnd[4] + 3;
          mir_we <= 1; mir_idx <= 4'd3; mir_value <= 7'(bnd[4]);
          @(posedge clk); mir_we <= 0;
          n_mir++;
        end
        foreach (dict[t]) dict[t] = F'({$urandom, $urandom}) & F'({$urandom, $urandom}) & F'({$urandom, $urandom});
        pf_vector = '0;
        for (int i = 0; i < 3; i++) pf_vector[$urandom_range(0, T - 1)] = 1'b1;
        if (r == 4) pf_vector = '0;                 // nothing failed
        acc = '0;
        for (int t = 0; t < T; t++) if (pf_vector[t]) acc |= dict[t];
        for (int m = 0; m < M; m++) begin
          tv[m] = 0;
          for (int f = bnd[m]; f < bnd[m+1]; f++) tv[m] += acc[f];
        end
        pf_load <= 1; @(posedge clk); pf_load <= 0; #1;
        while (!counts_valid) @(posedge clk);
        for (int m = 0; m < M; m++)
          chk(dut.u_frontend.counts[m] == 8'(tv[m]), $sformatf("front end count %0d", m));
        n_fe++;
        classify(tv, 1'b1, pick_nonzero(tv));
      end else begin
        // vector written by the host
        for (int m = 0; m < M; m++) tv[m] = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 6) : 0;
        if (r == 7) foreach (tv[m]) tv[m] = (m == 5) ? 3 : 0;   // a single sub-circuit
        if (pick_nonzero(tv) == 0 && tv[0] == 0) begin tv[1] = 2; tv[2] = 1; end
        n_reg++;
        classify(tv, 1'b0, pick_nonzero(tv));
      end
    end
    $display("mechanisms: frontend=%0d registers=%0d mir_write=%0d ideal=%0d nofault=%0d stall=%0d retry=%0d replace=%0d static=%0d",
             n_fe, n_reg, n_mir, n_ideal, n_nofault, n_stall, n_retry, n_repl, n_static);
    chk(n_fe > 0, "front-end diagnosis happened");
    chk(n_reg > 0, "register-sourced classification happened");
    chk(n_mir > 0, "module index register write happened");
    chk(n_ideal > 0, "ideal resolution happened");
    chk(n_nofault > 0, "no-fault case happened");
    chk(n_stall > 0, "masked-vector stall happened");
    chk(n_retry > 0, "retry after a wrong prediction happened");
    chk(n_repl > 0, "training-set replacement happened");
    chk(n_static > 0, "static (no-learning) miss happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
