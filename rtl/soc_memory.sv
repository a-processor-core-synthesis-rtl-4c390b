// soc_memory: the system memory on the shared bus, a single-port RAM of
// WORDS words of XLEN bits. A write (valid & we) stores wdata at the rising
// edge; a read (valid & !we) returns the word on rdata after that edge, so
// reads take one cycle. rdata keeps its value until the next read. The
// architecture places one memory on the bus but gives neither its size nor
// its timing: 64 Ki words and the one-cycle read are this design's choices.
// Contents are not reset.
module soc_memory
  import hwip_pkg::*;
#(
  parameter int unsigned WORDS = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              valid,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [XLEN-1:0]   wdata,
  output logic [XLEN-1:0]   rdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   a;

  assign a = AW'(addr);

  always_ff @(posedge clk) begin
    if (valid) begin
      if (we) mem[a] <= wdata;
      else    rdata  <= mem[a];
    end
  end

endmodule
