// ipsoc_top: the IP-based SoC. A processor core, a memory and up to 16
// hardware IPs share one bus; the core hands work to the IPs with
// hardware-IP-instructions over a separate handshake (nCPI, CPA, CPB).
//
// Inside: the core's hardware-IP interface unit (hwip_cp_if), the joining of
// the IPs' CPA/CPB answers (cp_resp_combine), NUM_HWIP hardware IP shells
// numbered 0..NUM_HWIP-1 (hwip), the shared bus (shared_bus) and the memory
// (soc_memory). The processor kernel, which is generated per application,
// is outside: its hardware-IP-instruction port (k_*) and its load/store
// port (lsu_*, bus master 0) are the top's ports. Each IP's datapath is the
// IP's own function and is outside too, on dp_req[i]/dp_rsp[i]. IP i is
// bus master i+1.
// Timing: see hwip_cp_if for the instruction handshake, shared_bus for the
// bus. Reset is asynchronous, active low.
module ipsoc_top
  import hwip_pkg::*;
#(
  parameter int unsigned NUM_HWIP   = MAX_HWIP,
  parameter int unsigned PIPE_DEPTH = 4,
  parameter int unsigned MEM_WORDS  = 1 << ADDR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  // kernel: hardware-IP-instructions
  input  logic            k_valid,
  input  k_req_t          k_req,
  output logic            k_done,
  output logic            k_undef,
  output logic            k_wait,
  output logic [XLEN-1:0] k_rdata,
  // kernel: load/store on the shared bus
  input  bus_req_t        lsu_req,
  output bus_rsp_t        lsu_rsp,
  // hardware IP datapaths
  output dp_req_t         dp_req  [NUM_HWIP],
  input  dp_rsp_t         dp_rsp  [NUM_HWIP],
  output logic [NUM_HWIP-1:0] ip_busy
);

  localparam int unsigned NM = NUM_HWIP + 1;

  cp_req_t         cp_req;
  cp_rsp_t         cp_rsp [NUM_HWIP];
  logic            cpa, cpb;
  logic [XLEN-1:0] cp_rdata;

  bus_req_t        m_req [NM];
  bus_rsp_t        m_rsp [NM];
  logic              s_valid, s_we;
  logic [ADDR_W-1:0] s_addr;
  logic [XLEN-1:0]   s_wdata, s_rdata;

  hwip_cp_if u_cp_if (
    .clk      (clk),
    .rst_n    (rst_n),
    .k_valid  (k_valid),
    .k_req    (k_req),
    .k_done   (k_done),
    .k_undef  (k_undef),
    .k_wait   (k_wait),
    .k_rdata  (k_rdata),
    .cp_req   (cp_req),
    .cpa      (cpa),
    .cpb      (cpb),
    .cp_rdata (cp_rdata)
  );

  cp_resp_combine #(.N(NUM_HWIP)) u_combine (
    .rsp   (cp_rsp),
    .cpa   (cpa),
    .cpb   (cpb),
    .rdata (cp_rdata)
  );

  for (genvar i = 0; i < NUM_HWIP; i++) begin : g_ip
    hwip #(.HW_ID(i), .PIPE_DEPTH(PIPE_DEPTH)) u_ip (
      .clk     (clk),
      .rst_n   (rst_n),
      .cp_req  (cp_req),
      .cp_rsp  (cp_rsp[i]),
      .bus_req (m_req[i+1]),
      .bus_rsp (m_rsp[i+1]),
      .dp_req  (dp_req[i]),
      .dp_rsp  (dp_rsp[i]),
      .busy    (ip_busy[i])
    );
  end

  assign m_req[0] = lsu_req;
  assign lsu_rsp  = m_rsp[0];

  shared_bus #(.NM(NM)) u_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .m_req   (m_req),
    .m_rsp   (m_rsp),
    .s_valid (s_valid),
    .s_we    (s_we),
    .s_addr  (s_addr),
    .s_wdata (s_wdata),
    .s_rdata (s_rdata)
  );

  soc_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk   (clk),
    .valid (s_valid),
    .we    (s_we),
    .addr  (s_addr),
    .wdata (s_wdata),
    .rdata (s_rdata)
  );

  // At most one IP claims an instruction.
  logic [NUM_HWIP-1:0] claim;
  always_comb for (int i = 0; i < NUM_HWIP; i++) claim[i] = !cp_rsp[i].cpa;
  a_one_claim: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(claim));

endmodule
