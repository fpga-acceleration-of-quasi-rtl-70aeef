// tb_fp64_add: self-checking testbench of fp64_add.
// Drives random doubles (random signs, exponents within +-60 of 1.0, and some
// equal-magnitude pairs) one per cycle and compares every result bit-exactly
// with the simulator's own IEEE double arithmetic (round to nearest even).
// Also checks that each result appears exactly FP_ADD_LAT cycles after its operands.
module tb_fp64_add;
  import qmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, out_valid;
  fp64_t a = '0, b = '0, y;
  int checks = 0, failures = 0;
  localparam int N = 4000;
  localparam int LAT = int'(FP_ADD_LAT);
  fp64_t exp_q[$];
  int    t_q[$];
  int    cyc = 0;

  fp64_add dut (.clk, .rst_n, .en, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp64_t rnd_fp();
    logic [10:0] e;
    e = 11'(1023 - 60 + ($urandom % 121));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    fp64_t e; int t;
    e = exp_q.pop_front(); t = t_q.pop_front();
    checks++;
    if (y !== e || cyc - t != LAT) begin
      failures++;
      if (failures < 10) $display("mismatch got %h exp %h lat %0d", y, e, cyc - t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a = rnd_fp();
      b = rnd_fp();
      if (i % 7 == 0) b = {~a[63], a[62:0]};
      if (i % 11 == 0) b = {~a[63], a[62:1], ~a[0]};
      in_valid = 1'b1;
      exp_q.push_back($realtobits($bitstoreal(a) + $bitstoreal(b)));
      t_q.push_back(cyc);
      if (i % 5 == 0) begin
        @(negedge clk) in_valid = 1'b0;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
