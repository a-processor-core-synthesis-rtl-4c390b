// hwip_ipipe: the instruction pipeline of a hardware IP, the queue that
// holds hardware-IP-instructions the IP has accepted but not yet executed.
//
// The architecture names this queue; its form is this design's choice: a
// first-in first-out buffer of DEPTH entries (default 4) with a registered
// head. push writes din at the rising edge unless full; pop removes the head
// shown on dout unless empty; both may happen in the same cycle. count is
// the number of entries held.
module hwip_ipipe
  import hwip_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  ipipe_entry_t               din,
  input  logic                       pop,
  output ipipe_entry_t               dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  ipipe_entry_t            mem [DEPTH];
  logic [PW-1:0]           rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic                    do_push, do_pop;

  assign full    = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (cnt == '0);
  assign count   = cnt;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      cnt <= cnt + $bits(cnt)'(do_push) - $bits(cnt)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) full |-> !do_push);

endmodule
