// tb_brownian_bridge: self-checking testbench of brownian_bridge.
// Supplies random Gaussian-like vectors, first with random gaps on z_valid,
// then with z_valid held high. Results leave the fixed-latency pipelines in
// issue order, so the k-th result belongs to the k-th consumed Z vector.
// For each result the testbench checks that both ends of its interval were
// already known, recomputes W(p) = (W(l) + W(r))/2 + sqrt(h/2 * dt) * Z
// (h = lowest set bit of p; endpoint W(T) = sqrt(T) * Z) and compares, and
// at the end that every point 1..NT came out exactly once, the endpoint first
// and the midpoint second. Without gaps a path of NT points must take at
// most NT + 80 cycles: the endpoint, about log2(10) generations of 10-cycle
// pipeline fill and a drain, then one point per cycle.
module tb_brownian_bridge;
  import qmc_pkg::*;
  localparam int NA = 3, NT = 64;
  localparam int PB = $clog2(NT + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic z_valid = 1'b0, z_ready, out_valid;
  fp64_t z [NA], out_w [NA];
  logic [PB-1:0] out_pos;
  logic [$clog2(NT/2+1)-1:0] queue_count;
  int checks = 0, failures = 0, cyc = 0, nres, maxq, zgaps;
  real zq [$];
  real wref [NT+1][NA];
  bit  known [NT+1];
  bit  gaps;

  brownian_bridge #(.NA(NA), .NT(NT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Z source
  always @(negedge clk) begin
    z_valid <= !gaps || ($urandom % 3 != 0);
    for (int k = 0; k < NA; k++) begin
      automatic int r = int'($urandom % 2000000) - 1000000;
      z[k] <= $realtobits(r / 300000.0);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (z_valid && z_ready) begin
      for (int k = 0; k < NA; k++) zq.push_back($bitstoreal(z[k]));
    end
    if (busy && !z_valid) zgaps++;
    if (int'(queue_count) > maxq) maxq = int'(queue_count);
  end

  // result checker
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int p = int'(out_pos);
    automatic int h = p & -p;
    real zv [NA];
    for (int k = 0; k < NA; k++) zv[k] = zq.pop_front();
    checks++;
    if (nres == 0 && p != NT) failures++;
    if (nres == 1 && p != NT / 2) failures++;
    if (known[p]) failures++;
    if (p != NT && !(known[p - h] && known[p + h])) begin
      failures++;
      $display("point %0d before its interval ends", p);
    end
    for (int k = 0; k < NA; k++) begin
      real e;
      if (p == NT) e = $sqrt(1.0) * zv[k];
      else e = (0.5 * wref[p - h][k] + 0.5 * wref[p + h][k]) + $sqrt(real'(h) * real'(h) / (2.0 * h) * (1.0 / NT)) * zv[k];
      checks++;
      if ($bitstoreal(out_w[k]) - e > 1e-14 || e - $bitstoreal(out_w[k]) > 1e-14) begin
        failures++;
        $display("p=%0d k=%0d got %g exp %g", p, k, $bitstoreal(out_w[k]), e);
      end
      wref[p][k] = $bitstoreal(out_w[k]);
    end
    known[p] = 1'b1;
    nres++;
  end

  task automatic run_path(output int cycles);
    int t0;
    foreach (known[i]) known[i] = 1'b0;
    known[0] = 1'b1;
    for (int k = 0; k < NA; k++) wref[0][k] = 0.0;
    nres = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    checks++;
    if (nres != NT) failures++;
    for (int p = 1; p <= NT; p++) if (!known[p]) failures++;
  endtask

  initial begin
    int cy;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gaps = 1'b1;
    run_path(cy);
    run_path(cy);
    gaps = 1'b0;
    repeat (3) @(negedge clk);
    run_path(cy);
    checks++;
    if (cy > NT + 80) failures++;
    checks += 2;
    if (maxq == 0) failures++;
    if (zgaps == 0) failures++;
    $display("path of %0d points in %0d cycles, max queue %0d, Z gaps %0d", NT, cy, maxq, zgaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
