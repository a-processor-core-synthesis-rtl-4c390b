// hwip_cp_if: the processor core's side of the hardware-IP interface.
//
// The kernel hands over one hardware-IP-instruction at a time (k_valid,
// k_req). The unit broadcasts it to every IP and pulls nCPI low. Each IP
// answers with CPA/CPB, combined so that cpa means "no IP takes this
// instruction" and cpb means "the IP that takes it is busy". The unit
// samples the pair at each rising edge while nCPI is low:
//   cpa          -> the instruction is refused: k_undef for one cycle
//   !cpa &  cpb  -> busy-wait: nCPI stays low and k_wait is high
//   !cpa & !cpb  -> the IP took it: k_done for one cycle; for MRC,
//                   k_rdata holds the IP register read in the same cycle
// The three signals and their meaning follow the architecture, which bases
// the interface on the ARM coprocessor interface. The registered three-state
// sequence (IDLE, ISSUE, RESP) is this design's choice: an instruction the
// IP takes at once costs three cycles from k_valid to the end of k_done.
// For LDC/STC the unit adds the immediate offset to Rn and passes the word
// address on; the IP then moves the words over the shared bus on its own.
// Kernel rule: hold k_valid and k_req until k_done or k_undef, and present
// the next instruction no earlier than the cycle after.
module hwip_cp_if
  import hwip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // processor kernel
  input  logic              k_valid,
  input  k_req_t            k_req,
  output logic              k_done,
  output logic              k_undef,
  output logic              k_wait,
  output logic [XLEN-1:0]   k_rdata,
  // hardware IPs
  output cp_req_t           cp_req,
  input  logic              cpa,
  input  logic              cpb,
  input  logic [XLEN-1:0]   cp_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_RESP} state_e;

  state_e            state_q;
  hwi_instr_t        instr_q;
  logic [ADDR_W-1:0] addr_q;
  logic [XLEN-1:0]   wdata_q;
  logic              done_q, undef_q;
  logic [XLEN-1:0]   rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      instr_q <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
      done_q  <= 1'b0;
      undef_q <= 1'b0;
      rdata_q <= '0;
    end else begin
      done_q  <= 1'b0;
      undef_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (k_valid) begin
          instr_q <= k_req.instr;
          addr_q  <= k_req.base + k_req.offset;
          wdata_q <= k_req.wdata;
          state_q <= S_ISSUE;
        end
        S_ISSUE: begin
          if (cpa) begin
            undef_q <= 1'b1;
            state_q <= S_RESP;
          end else if (!cpb) begin
            done_q  <= 1'b1;
            if (instr_q.op == HWI_MRC) rdata_q <= cp_rdata;
            state_q <= S_RESP;
          end
        end
        S_RESP:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cp_req.ncpi  = (state_q != S_ISSUE);
    cp_req.instr = instr_q;
    cp_req.addr  = addr_q;
    cp_req.wdata = wdata_q;
  end

  assign k_done  = done_q;
  assign k_undef = undef_q;
  assign k_rdata = rdata_q;
  assign k_wait  = (state_q == S_ISSUE) && !cpa && cpb;

  // Kernel handshake: the request stays up until it is answered.
  a_k_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_ISSUE) |-> k_valid)
    else $error("hwip_cp_if: k_valid dropped before the instruction was answered");

endmodule
