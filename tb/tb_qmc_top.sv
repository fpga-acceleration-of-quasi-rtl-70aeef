// tb_qmc_top: end-to-end self-checking testbench of qmc_top at reduced size
// (NA = 2 assets, NT = 32 steps).
// Loads Sobol direction vectors (v_0 = 1/2 in every dimension, as in any
// Sobol sequence, so the first vector hits the exact-0.5 case; in dimension 1
// the other vectors are tiny, so some vectors reach the ICDF tail region;
// elsewhere random) and runs 60 paths. The testbench regenerates every
// Sobol value itself (x_n = x_(n-1) XOR v_k, k = trailing zeros of n).
// For each reported point it checks that both ends of its interval were
// already reported, recovers the Gaussian draw the bridge used,
// Z = (W(p) - (W(l) + W(r))/2) / b, and checks Phi(Z) against the uniform of
// the Sobol dimension that draw must come from (implied error in Z below
// 2e-9*|Z| + 1e-10, Phi an independent numerical integral). Each path must
// report every point once and pulse path_done. It counts the mechanisms of
// the design and fails if one never happened: ICDF tail evaluations, merge
// waits on a tail result, ICDF back-pressure on the Sobol generator, the
// 0.5 special case, bridge queue use, and the bridge waiting for draws.
module tb_qmc_top;
  import qmc_pkg::*;
  import tb_normal_pkg::*;
  localparam int NA = 2, NT = 32;
  localparam int S = NA * NT, C = NT, W = 32;
  localparam int PB = $clog2(NT + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  logic rom_we = 1'b0;
  logic [$clog2(NT*W)-1:0] rom_addr = '0;
  logic [NA*W-1:0] rom_wdata = '0;
  logic start = 1'b0, busy, path_done, out_valid;
  logic [31:0] num_paths = '0;
  logic [PB-1:0] out_pos;
  fp64_t out_w [NA];
  logic icdf_tail_issue, icdf_tail_wait, icdf_stall, bb_starved;
  logic [$clog2(NT/2+1)-1:0] bb_queue_count;
  int checks = 0, failures = 0, cyc = 0, t_first = 0, t_start = 0;
  int n_tail = 0, n_wait = 0, n_stall = 0, n_starve = 0, n_half = 0, n_queue = 0, n_done = 0;
  logic [31:0] v [S][W];
  logic [31:0] x [S];
  real wref [NT+1][NA];
  bit  known [NT+1];
  int  path_n = 0, k_in_path = 0;
  real maxrel = 0.0;

  qmc_top #(.NA(NA), .NT(NT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ctz(input int n);
    int k = 0;
    while (((n >> k) & 1) == 0) k++;
    return k;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (icdf_tail_issue) n_tail++;
    if (icdf_tail_wait) n_wait++;
    if (icdf_stall) n_stall++;
    if (bb_starved) n_starve++;
    if (bb_queue_count != 0) n_queue++;
    if (path_done) begin
      n_done++;
      if (n_done == 1) t_first = cyc;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int p = int'(out_pos);
    automatic int h = p & -p;
    if (k_in_path == 0) begin
      path_n++;
      for (int d = 0; d < S; d++) x[d] = x[d] ^ v[d][ctz(path_n)];
      foreach (known[i]) known[i] = 1'b0;
      known[0] = 1'b1;
      for (int a = 0; a < NA; a++) wref[0][a] = 0.0;
    end
    checks++;
    if (known[p] || (p != NT && !(known[p - h] && known[p + h]))) begin
      failures++;
      $display("path %0d: point %0d out of order", path_n, p);
    end
    for (int a = 0; a < NA; a++) begin
      real wv, zv, b, u, e;
      logic [31:0] u32;
      wv = $bitstoreal(out_w[a]);
      if (p == NT) begin
        b = 1.0; zv = wv;
      end else begin
        b = $sqrt(real'(h) / 2.0 / NT);
        zv = (wv - (0.5 * wref[p - h][a] + 0.5 * wref[p + h][a])) / b;
      end
      u32 = x[k_in_path * NA + a];
      if (u32 == 32'h8000_0000) n_half++;
      u = (u32 == 0 ? 1.0 : real'(u32)) / 4294967296.0;
      e = icdf_err(u, zv);
      checks++;
      if (rabs(e) > 2e-9 * rabs(zv) + 1e-10) begin
        failures++;
        if (failures < 10) $display("path %0d point %0d asset %0d: u=%h Z=%.15g err=%g", path_n, p, a, u32, zv, e);
      end
      if (rabs(zv) > 1e-3 && rabs(e / zv) > maxrel) maxrel = rabs(e / zv);
      wref[p][a] = wv;
    end
    known[p] = 1'b1;
    k_in_path = (k_in_path == NT - 1) ? 0 : k_in_path + 1;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < S; d++) begin
      x[d] = '0;
      for (int k = 0; k < W; k++)
        v[d][k] = (k == 0) ? 32'h8000_0000 : (d == 1) ? 32'($urandom % (1 << 19)) : $urandom;
    end
    for (int c = 0; c < C; c++) for (int k = 0; k < W; k++) begin
      @(negedge clk);
      rom_we = 1'b1;
      rom_addr = ($clog2(NT*W))'(c * W + k);
      for (int l = 0; l < NA; l++) rom_wdata[l*W +: W] = v[c*NA + l][k];
    end
    @(negedge clk) rom_we = 1'b0;
    num_paths = 60;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    t_start = cyc;
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (path_n != 60 || k_in_path != 0 || n_done != 60) failures++;
    checks += 6;
    if (n_tail == 0) failures++;
    if (n_wait == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_half == 0) failures++;
    if (n_queue == 0) failures++;
    if (n_starve == 0) failures++;
    // the first path uses Sobol point 1 (every value 0.5, no tail input): it
    // must finish within the 6.7 us at 110 MHz (737 cycles) reported for a
    // set of 8 paths of 512 steps (the same start-up allowance at other NT),
    // measured from start to its path_done
    checks++;
    if (t_first - t_start > 737 - 512 + NT) begin
      failures++;
      $display("first path took %0d cycles", t_first - t_start);
    end
    $display("first path (no tail input) %0d cycles", t_first - t_start);
    $display("%0d paths of %0d steps x %0d assets in %0d cycles (%0d per path)",
             60, NT, NA, cyc - t0, (cyc - t0) / 60);
    $display("tail evaluations %0d, merge-wait cycles %0d, Sobol stall cycles %0d, 0.5 inputs %0d,",
             n_tail, n_wait, n_stall, n_half);
    $display("cycles with queued intervals %0d, bridge starved cycles %0d, max rel err %g",
             n_queue, n_starve, maxrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
