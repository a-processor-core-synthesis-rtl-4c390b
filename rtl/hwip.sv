// hwip: a hardware IP as the architecture models it: an instruction decoder,
// an instruction pipeline, a register file and a datapath. The datapath is
// the IP's own function (a 2-D DCT, a transform-and-lighting engine, ...)
// and sits outside this module behind the dp_req/dp_rsp port.
//
// Decoder: while nCPI is low the IP looks at the broadcast instruction. It
// claims it (CPA low) when HW# equals HW_ID and, for CDP, OP# is below
// NUM_OPS. It answers CPB high (busy) when it cannot take it now:
//   CDP, LDC, STC, MCR : the instruction pipeline is full
//   MRC                : the pipeline is not empty or an instruction is
//                        still executing, so the register is not final
// An instruction it takes at a rising edge (claimed and not busy) enters the
// pipeline; MRC is answered from the register file in that same cycle. The
// core is therefore free to go on while the IP works, and waits only when it
// needs a result or the queue is full.
// Executor: takes the pipeline head when idle.
//   MCR: writes the register in one cycle.
//   CDP: pulses dp_req.start with OP# and waits for dp_rsp.done; meanwhile
//        the datapath reads registers through raddr/rdata and writes them
//        through we/waddr/wdata. The cycles until done are the IP's
//        response time.
//   LDC: N reads over the shared bus from addr, addr+1, ... into Rd, Rd+1, ...
//   STC: N writes of Rd, Rd+1, ... to addr, addr+1, ...
// Register indices wrap modulo 16. One bus transfer is in flight at a time.
// The decoder, pipeline, registers, datapath and the instruction kinds follow
// the architecture; the busy rules, the in-order executor, the pipeline
// depth, register count and the datapath port are this design's choices.
module hwip
  import hwip_pkg::*;
#(
  parameter int unsigned HW_ID      = 0,
  parameter int unsigned NUM_OPS    = 1 << OPN_W,
  parameter int unsigned PIPE_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cp_req_t  cp_req,
  output cp_rsp_t  cp_rsp,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp,
  output dp_req_t  dp_req,
  input  dp_rsp_t  dp_rsp,
  output logic     busy      // pipeline not empty or an instruction running
);

  typedef enum logic [2:0] {EX_IDLE, EX_DP, EX_LD_REQ, EX_LD_WAIT, EX_ST} ex_state_e;

  logic [XLEN-1:0] regs [IP_REGS];

  ex_state_e       ex_q;
  ipipe_entry_t    cur_q;      // instruction being executed
  logic [N_W-1:0]  left_q;     // LDC/STC words still to move
  logic            start_q;

  // ---------------------------------------------------------------- decoder
  logic         addressed, cant_now, take;
  logic         pipe_full, pipe_empty, pop;
  ipipe_entry_t head, new_entry;

  assign addressed = !cp_req.ncpi
                  && (cp_req.instr.hw == HW_W'(HW_ID))
                  && (cp_req.instr.op inside {HWI_CDP, HWI_LDC, HWI_STC, HWI_MCR, HWI_MRC})
                  && (cp_req.instr.op != HWI_CDP || 32'(cp_req.instr.opn) < NUM_OPS);
  assign busy      = !pipe_empty || (ex_q != EX_IDLE);
  assign cant_now  = (cp_req.instr.op == HWI_MRC) ? busy : pipe_full;
  assign take      = addressed && !cant_now;

  always_comb begin
    cp_rsp.cpa   = !addressed;
    cp_rsp.cpb   = !addressed || cant_now;
    cp_rsp.rdata = (addressed && cp_req.instr.op == HWI_MRC) ? regs[cp_req.instr.rd] : '0;
  end

  always_comb begin
    new_entry.op   = cp_req.instr.op;
    new_entry.opn  = cp_req.instr.opn;
    new_entry.rd   = cp_req.instr.rd;
    new_entry.n    = cp_req.instr.n;
    new_entry.addr = cp_req.addr;
    new_entry.data = cp_req.wdata;
  end

  // -------------------------------------------------- instruction pipeline
  hwip_ipipe #(.DEPTH(PIPE_DEPTH)) u_ipipe (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (take && cp_req.instr.op != HWI_MRC),
    .din   (new_entry),
    .pop   (pop),
    .dout  (head),
    .full  (pipe_full),
    .empty (pipe_empty),
    .count ()
  );

  assign pop = (ex_q == EX_IDLE) && !pipe_empty;

  // --------------------------------------------------------------- executor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q    <= EX_IDLE;
      cur_q   <= '0;
      left_q  <= '0;
      start_q <= 1'b0;
    end else begin
      start_q <= 1'b0;
      unique case (ex_q)
        EX_IDLE: if (pop) begin
          cur_q  <= head;
          left_q <= head.n;
          unique case (head.op)
            HWI_CDP: begin
              start_q <= 1'b1;
              ex_q    <= EX_DP;
            end
            HWI_LDC: ex_q <= (head.n == '0) ? EX_IDLE : EX_LD_REQ;
            HWI_STC: ex_q <= (head.n == '0) ? EX_IDLE : EX_ST;
            default: ex_q <= EX_IDLE;   // MCR is done in the register file
          endcase
        end
        EX_DP: if (dp_rsp.done && !start_q) ex_q <= EX_IDLE;
        EX_LD_REQ: if (bus_rsp.gnt) ex_q <= EX_LD_WAIT;
        EX_LD_WAIT: if (bus_rsp.rvalid) begin
          cur_q.addr <= cur_q.addr + 1'b1;
          cur_q.rd   <= cur_q.rd + 1'b1;
          left_q     <= left_q - 1'b1;
          ex_q       <= (left_q == N_W'(1)) ? EX_IDLE : EX_LD_REQ;
        end
        EX_ST: if (bus_rsp.gnt) begin
          cur_q.addr <= cur_q.addr + 1'b1;
          cur_q.rd   <= cur_q.rd + 1'b1;
          left_q     <= left_q - 1'b1;
          if (left_q == N_W'(1)) ex_q <= EX_IDLE;
        end
        default: ex_q <= EX_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- register file
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IP_REGS; i++) regs[i] <= '0;
    end else begin
      if (pop && head.op == HWI_MCR)
        regs[head.rd] <= head.data;
      if (ex_q == EX_LD_WAIT && bus_rsp.rvalid)
        regs[cur_q.rd] <= bus_rsp.rdata;
      if (ex_q == EX_DP && dp_rsp.we)
        regs[dp_rsp.waddr] <= dp_rsp.wdata;
    end
  end

  // ------------------------------------------------------------ bus, datapath
  always_comb begin
    bus_req.valid = (ex_q == EX_LD_REQ) || (ex_q == EX_ST);
    bus_req.we    = (ex_q == EX_ST);
    bus_req.addr  = cur_q.addr;
    bus_req.wdata = regs[cur_q.rd];
  end

  always_comb begin
    dp_req.start = start_q;
    dp_req.op    = cur_q.opn;
    dp_req.rdata = regs[dp_rsp.raddr];
  end

  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req.valid && !bus_rsp.gnt |=> bus_req.valid && $stable(bus_req.addr));

endmodule
