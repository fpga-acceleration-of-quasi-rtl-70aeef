// tb_bb_coeff_rom: self-checking testbench of bb_coeff_rom.
// Reads every entry and checks it against the bridge formulas worked out
// here from the interval of each point: l and r are found by searching for
// the largest power-of-two spacing that places p in the middle, then
// a = (r-p)/(r-l), b = sqrt((r-p)(p-l)/(r-l) * T/NT); the endpoint entry NT
// must give a = 1-a = 0 and b = sqrt(T). Checks the one-cycle read latency.
module tb_bb_coeff_rom;
  import qmc_pkg::*;
  localparam int NT = 64;
  logic clk = 1'b0;
  logic [$clog2(NT+1)-1:0] addr = '0;
  fp64_t a, c, b;
  int checks = 0, failures = 0;

  bb_coeff_rom #(.NT(NT), .T_HORIZON(2.0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(input fp64_t x, input real e);
    real d;
    d = $bitstoreal(x) - e;
    return (d < 1e-15 && d > -1e-15);
  endfunction

  initial begin
    @(negedge clk);
    for (int p = NT; p >= 1; p--) begin
      real ea, eb;
      int l, r;
      addr = ($clog2(NT+1))'(p);
      @(negedge clk);
      addr = '0;
      if (p == NT) begin
        ea = 0.0; eb = $sqrt(2.0);
        checks++;
        if (!close(a, 0.0) || !close(c, 0.0) || !close(b, eb)) failures++;
      end else begin
        int h;
        h = NT;
        while (p % h != 0) h = h / 2;    // p is an odd multiple of h
        l = p - h; r = p + h;
        ea = real'(r - p) / real'(r - l);
        eb = $sqrt(real'(r - p) * real'(p - l) / real'(r - l) * 2.0 / NT);
        checks++;
        if (!close(a, ea) || !close(c, 1.0 - ea) || !close(b, eb)) begin
          failures++;
          $display("p=%0d a=%g c=%g b=%g exp %g %g", p, $bitstoreal(a), $bitstoreal(c), $bitstoreal(b), ea, eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
