// bb_queue: queue of Brownian-bridge intervals not yet computed.
// A circular buffer of DEPTH entries of WIDTH bits (an interval: its end
// positions and the path values at both ends for every asset). Up to two
// entries can be written per cycle (push0 before push1: a new right
// sub-interval, or both sub-intervals when no Gaussian vector is ready) and
// one read (pop, first-word fall-through on rdata). An overflow is a design
// error and is flagged by an assertion.
module bb_queue #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push0,
  input  logic [WIDTH-1:0] wdata0,
  input  logic             push1,
  input  logic [WIDTH-1:0] wdata1,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic do_pop;
  logic [1:0] npush;

  function automatic logic [PW-1:0] adv(input logic [PW-1:0] p, input int n);
    return PW'((int'(p) + n) % int'(DEPTH));
  endfunction

  assign empty  = (count == '0);
  assign do_pop = pop && !empty;
  assign rdata  = mem[rp];
  assign npush  = 2'(push0) + 2'(push1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      wp <= adv(wp, int'(npush));
      if (do_pop) rp <= adv(rp, 1);
      count <= count + CW'(npush) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push0) mem[wp] <= wdata0;
    if (push1) mem[push0 ? adv(wp, 1) : wp] <= wdata1;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(npush) - int'(do_pop) <= int'(DEPTH))
    else $error("bb_queue overflow");
endmodule
