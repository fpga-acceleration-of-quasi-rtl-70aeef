// tb_bb_fp_pipe: self-checking testbench of bb_fp_pipe.
// Streams random (a, wl, wr, z, b) with c = 1 - a and random gaps, and
// compares each result bit-exactly with (a*wl + c*wr) + b*z evaluated in
// the simulator's IEEE double arithmetic, arriving exactly 9 cycles after
// its inputs.
module tb_bb_fp_pipe;
  import qmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  fp64_t a = '0, c = '0, b = '0, wl = '0, wr = '0, z = '0, w;
  int checks = 0, failures = 0, cyc = 0;
  fp64_t exp_q [$];
  int    t_q [$];

  bb_fp_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic fp64_t e = exp_q.pop_front();
    automatic int t0 = t_q.pop_front();
    checks++;
    if (w !== e || cyc - t0 != 9) begin
      failures++;
      if (failures < 10) $display("got %h exp %h lat %0d", w, e, cyc - t0);
    end
  end

  function automatic real rr(input int scale);
    int r;
    r = int'($urandom % 2000001) - 1000000;
    return r / real'(scale);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      real ra;
      @(negedge clk);
      ra = ($urandom % 1000) / 1000.0;
      a = $realtobits(ra); c = $realtobits(1.0 - ra);
      b = $realtobits(rr(1000000) + 1.0);
      wl = $realtobits(rr(300000)); wr = $realtobits(rr(300000)); z = $realtobits(rr(250000));
      in_valid = ($urandom % 4 != 0);
      if (in_valid) begin
        exp_q.push_back($realtobits(($bitstoreal(a) * $bitstoreal(wl) + $bitstoreal(c) * $bitstoreal(wr))
                                    + $bitstoreal(b) * $bitstoreal(z)));
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (15) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
