// dp_model: a stand-in for a hardware IP's datapath, used by the testbenches.
// It is behavioural and not part of the design: the real datapath (a 2-D
// DCT, a transform-and-lighting engine) is the IP's own function.
// On start with operation op it reads registers 0..7 through the IP's
// register port, one per cycle, and at RESP-1 cycles after start writes
// register 8 with (sum of the eight) + op; it raises done RESP cycles after
// start. RESP is therefore the IP's response time in cycles (at least 10).
module dp_model
  import hwip_pkg::*;
#(
  parameter int unsigned RESP = 20
) (
  input  logic    clk,
  input  logic    rst_n,
  input  dp_req_t req,
  output dp_rsp_t rsp,
  output int      ops_done
);
  int unsigned     c;
  logic            run;
  logic [XLEN-1:0] sum;
  logic [OPN_W-1:0] op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; c <= 0; sum <= '0; op <= '0; ops_done <= 0;
    end else if (req.start) begin
      run <= 1'b1; c <= 1; sum <= '0; op <= req.op;
    end else if (run) begin
      if (c >= 1 && c <= 8) sum <= sum + req.rdata;
      if (c == RESP) begin
        run <= 1'b0;
        ops_done <= ops_done + 1;
      end
      c <= c + 1;
    end
  end

  always_comb begin
    rsp.raddr = (run && c >= 1 && c <= 8) ? REG_W'(c - 1) : '0;
    rsp.we    = run && (c == RESP - 1);
    rsp.waddr = REG_W'(8);
    rsp.wdata = sum + XLEN'(op);
    rsp.done  = run && (c == RESP);
  end
endmodule
