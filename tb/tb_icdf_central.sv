// tb_icdf_central: self-checking testbench of icdf_central.
// Streams random coefficient sets and t in [0,1) with random gaps and random
// enable stalls, and compares each result bit-exactly with the same Horner
// evaluation done in the simulator's IEEE double arithmetic; the side bits
// must arrive with their result, and with the enable held high a result must
// leave exactly KC*6 = 18 cycles after its inputs.
module tb_icdf_central;
  import qmc_pkg::*;
  localparam int KC = 3, SW = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, out_valid;
  fp64_t c [KC+1], t = '0, y;
  logic [SW-1:0] side_in = '0, side_out;
  int checks = 0, failures = 0, cyc = 0;
  fp64_t exp_q [$];
  int    side_q [$];
  int    t_q [$];
  bit    stalls;

  icdf_central #(.KC(KC), .SW(SW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en && out_valid) begin
    automatic fp64_t e = exp_q.pop_front();
    automatic int sd = side_q.pop_front();
    automatic int t0 = t_q.pop_front();
    checks++;
    if (y !== e || side_out !== SW'(sd) || (!stalls && cyc - t0 != KC * 6)) begin
      failures++;
      if (failures < 10) $display("got %h exp %h side %0d/%0d lat %0d", y, e, side_out, sd, cyc - t0);
    end
  end

  function automatic fp64_t rc();
    int r;
    r = int'($urandom % 2000001) - 1000000;
    return $realtobits(r / 250000.0);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      real acc;
      stalls = (n >= 1500);
      @(negedge clk);
      en = !stalls || ($urandom % 3 != 0);
      for (int k = 0; k <= KC; k++) c[k] = rc();
      t = $realtobits(($urandom % 1000000) / 1000000.0);
      side_in = SW'($urandom);
      in_valid = ($urandom % 4 != 0);
      if (in_valid && en) begin
        acc = $bitstoreal(c[KC]);
        for (int k = KC - 1; k >= 0; k--) acc = acc * $bitstoreal(t) + $bitstoreal(c[k]);
        exp_q.push_back($realtobits(acc));
        side_q.push_back(int'(side_in));
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 1'b0; en = 1'b1;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
