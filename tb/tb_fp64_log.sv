// tb_fp64_log: self-checking testbench of fp64_log.
// Takes logarithms of random positive doubles over a wide exponent range
// (and of values near 1, 2, the tail unit's range 2^-32..2^-12 and 8..23)
// and compares with the simulator's $ln: the absolute error must stay below
// 4e-16 * max(1, |ln x|). Also checks the fixed 89-cycle latency (done high 89 cycles after the start edge) and that
// `ready` is low while busy.
module tb_fp64_log;
  import qmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready, done;
  fp64_t x = FP_ONE, y;
  int checks = 0, failures = 0;

  fp64_log dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      real xr, er, err, tol;
      int lat;
      case (i % 4)
        0: x = {1'b0, 11'(1023 - 200 + $urandom % 401), 20'($urandom), 32'($urandom)};
        1: x = {1'b0, 11'(1023 - 32 + $urandom % 21), 20'($urandom), 32'($urandom)};
        2: x = {1'b0, 11'(1023 + 3 + $urandom % 2), 20'($urandom), 32'($urandom)};
        default: x = {1'b0, 11'(1022 + $urandom % 2), 20'(($urandom % 2) ? 20'hFFFFF : 20'h0), 32'($urandom)};
      endcase
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      checks++;
      if (ready) failures++;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      xr = $bitstoreal(x);
      er = $ln(xr);
      err = $bitstoreal(y) - er;
      if (err < 0.0) err = -err;
      tol = 4e-16 * ((er > 1.0 || er < -1.0) ? ((er < 0.0) ? -er : er) : 1.0);
      checks += 2;
      if (err > tol) begin
        failures++;
        $display("ln(%g) got %.17g exp %.17g", xr, $bitstoreal(y), er);
      end
      if (lat != 89) begin
        failures++;
        $display("latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
