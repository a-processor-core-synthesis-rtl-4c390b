// shared_bus: the bus the processor core, the hardware IPs and the memory
// share. Masters are the core's load/store port (index 0 in the SoC) and one
// port per hardware IP (LDC/STC transfers); the single slave is the memory.
//
// Each cycle at most one master gets the bus. A master raises valid with
// we/addr/wdata and holds them until it sees gnt; gnt is combinational in the
// same cycle, and that rising edge presents the access to the memory. Read
// data come back one cycle later with rvalid to the master that was granted;
// rdata itself is broadcast to all masters. Arbitration is round robin: the
// search starts one past the last master granted, so a master waits at most
// NM-1 grants. rdata is one word wired to every master's port, so most bits
// of m_rsp are a straight copy of s_rdata by design. That the parts share
// one bus follows the architecture; the handshake, the round-robin order and
// the one-cycle read are this design's choices.
module shared_bus
  import hwip_pkg::*;
#(
  parameter int unsigned NM = MAX_HWIP + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          m_req [NM],
  output bus_rsp_t          m_rsp [NM],
  // memory side
  output logic              s_valid,
  output logic              s_we,
  output logic [ADDR_W-1:0] s_addr,
  output logic [XLEN-1:0]   s_wdata,
  input  logic [XLEN-1:0]   s_rdata
);

  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  logic [IW-1:0] last_q;      // master granted most recently
  logic [IW-1:0] sel;
  logic          any;
  logic          rd_pend_q;   // a read was granted last cycle
  logic [IW-1:0] rd_id_q;

  // Round robin: first valid master after last_q, wrapping around.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int k = 1; k <= NM; k++) begin
      int unsigned idx;
      idx = (32'(last_q) + k) % NM;
      if (!any && m_req[idx].valid) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  always_comb begin
    s_valid = any;
    s_we    = any && m_req[sel].we;
    s_addr  = m_req[sel].addr;
    s_wdata = m_req[sel].wdata;
    for (int i = 0; i < NM; i++) begin
      m_rsp[i].gnt    = any && (sel == IW'(i));
      m_rsp[i].rvalid = rd_pend_q && (rd_id_q == IW'(i));
      m_rsp[i].rdata  = s_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= IW'(NM - 1);
      rd_pend_q <= 1'b0;
      rd_id_q   <= '0;
    end else begin
      rd_pend_q <= any && !m_req[sel].we;
      if (any) begin
        last_q  <= sel;
        rd_id_q <= sel;
      end
    end
  end

  logic [NM-1:0] gnt_vec;
  always_comb for (int i = 0; i < NM; i++) gnt_vec[i] = m_rsp[i].gnt;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_vec));
  a_req_hold:  assert property (@(posedge clk) disable iff (!rst_n)
    s_valid |-> m_req[sel].valid);

endmodule
