// tb_bb_queue: self-checking testbench of bb_queue.
// Random single pushes, double pushes and pops, never beyond the capacity,
// checked against a reference queue: the head (rdata), `empty` and `count`
// must match every cycle, and double pushes must keep push0 ahead of push1.
// Runs the queue to full and back to empty at least once.
module tb_bb_queue;
  localparam int WIDTH = 20, DEPTH = 12;
  logic clk = 1'b0, rst_n = 1'b0, push0 = 1'b0, push1 = 1'b0, pop = 1'b0, empty;
  logic [WIDTH-1:0] wdata0 = '0, wdata1 = '0, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, nfull = 0;
  logic [WIDTH-1:0] ref_q [$];

  bb_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

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
    for (int n = 0; n < 5000; n++) begin
      int room, bias;
      @(negedge clk);
      checks++;
      if (int'(count) != ref_q.size() || empty != (ref_q.size() == 0) ||
          (ref_q.size() > 0 && rdata != ref_q[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d count %0d/%0d head %h/%h", n, count, ref_q.size(), rdata,
                                    ref_q.size() > 0 ? ref_q[0] : '0);
      end
      if (ref_q.size() == DEPTH) nfull++;
      bias = ((n / 500) % 2 == 0) ? 2 : 5;    // filling and draining phases
      pop = ($urandom % bias == 0) && ref_q.size() > 0;
      room = DEPTH - ref_q.size() + (pop ? 1 : 0);
      push0 = ($urandom % 2 == 0) && room >= 1;
      push1 = push0 && ($urandom % 2 == 0) && room >= 2;
      wdata0 = WIDTH'($urandom); wdata1 = WIDTH'($urandom);
      if (pop) void'(ref_q.pop_front());
      if (push0) ref_q.push_back(wdata0);
      if (push1) ref_q.push_back(wdata1);
    end
    checks++;
    if (nfull == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
