// hwip_pkg: types and constants shared by the processor-core side of the
// hardware-IP interface, the hardware IPs, the shared bus and the memory.
//
// A hardware-IP-instruction is one of CDP (data operation inside the IP),
// LDC/STC (move words between memory and IP registers), MCR (core register
// to IP register) or MRC (IP register to core register). It names the IP by
// its number HW# (up to 16 IPs, so 4 bits) and, for CDP, the operation OP#.
// The instruction kinds, HW#, OP#, the IP register Rd and the word count N
// come from the instruction formats of the architecture; the field widths,
// the 32-bit data word and the 16-bit word address are this design's choice.
package hwip_pkg;

  localparam int XLEN     = 32;  // data word
  localparam int ADDR_W   = 16;  // word address on the shared bus
  localparam int MAX_HWIP = 16;  // the core connects up to 16 hardware IPs
  localparam int HW_W     = 4;   // HW# field
  localparam int OPN_W    = 4;   // OP# field
  localparam int REG_W    = 4;   // IP register index: 16 registers per IP
  localparam int N_W      = 5;   // LDC/STC word count, 0..16
  localparam int IP_REGS  = 1 << REG_W;

  typedef enum logic [2:0] {
    HWI_CDP = 3'd0,
    HWI_LDC = 3'd1,
    HWI_STC = 3'd2,
    HWI_MCR = 3'd3,
    HWI_MRC = 3'd4
  } hwi_op_e;

  // The IP-visible part of a hardware-IP-instruction.
  typedef struct packed {
    hwi_op_e            op;
    logic [HW_W-1:0]    hw;   // HW#: which IP
    logic [OPN_W-1:0]   opn;  // OP#: which operation of the IP (CDP)
    logic [REG_W-1:0]   rd;   // IP register (LDC/STC first register, MCR/MRC Rd2)
    logic [N_W-1:0]     n;    // LDC/STC word count
  } hwi_instr_t;

  // What the processor kernel hands the interface unit: the instruction plus
  // the values it read from its own registers (Rn for LDC/STC, Rd1 for MCR).
  typedef struct packed {
    hwi_instr_t         instr;
    logic [ADDR_W-1:0]  base;    // contents of Rn
    logic [ADDR_W-1:0]  offset;  // immediate offset
    logic [XLEN-1:0]    wdata;   // contents of Rd1 (MCR)
  } k_req_t;

  // Core -> all IPs. ncpi is active low: the core wants an IP to take instr.
  typedef struct packed {
    logic               ncpi;
    hwi_instr_t         instr;
    logic [ADDR_W-1:0]  addr;   // Rn + offset (LDC/STC)
    logic [XLEN-1:0]    wdata;  // MCR data
  } cp_req_t;

  // One IP -> core. cpa: this IP does not take the instruction ("absent").
  // cpb: it takes it but cannot now ("busy"). rdata: MRC data, 0 unless
  // this IP is the one addressed.
  typedef struct packed {
    logic               cpa;
    logic               cpb;
    logic [XLEN-1:0]    rdata;
  } cp_rsp_t;

  // One entry of an IP's instruction pipeline.
  typedef struct packed {
    hwi_op_e            op;
    logic [OPN_W-1:0]   opn;
    logic [REG_W-1:0]   rd;
    logic [N_W-1:0]     n;
    logic [ADDR_W-1:0]  addr;
    logic [XLEN-1:0]    data;
  } ipipe_entry_t;

  // Shared bus master port. A master holds valid (and the rest) until gnt.
  typedef struct packed {
    logic               valid;
    logic               we;
    logic [ADDR_W-1:0]  addr;
    logic [XLEN-1:0]    wdata;
  } bus_req_t;

  // rvalid/rdata arrive the cycle after the read was granted.
  typedef struct packed {
    logic               gnt;
    logic               rvalid;
    logic [XLEN-1:0]    rdata;
  } bus_rsp_t;

  // IP shell -> its datapath: start a CDP with operation op; rdata is the
  // register selected by dp_rsp_t.raddr (combinational read).
  typedef struct packed {
    logic               start;
    logic [OPN_W-1:0]   op;
    logic [XLEN-1:0]    rdata;
  } dp_req_t;

  // Datapath -> IP shell: register read address, one register write per
  // cycle, and done to end the operation.
  typedef struct packed {
    logic               done;
    logic [REG_W-1:0]   raddr;
    logic               we;
    logic [REG_W-1:0]   waddr;
    logic [XLEN-1:0]    wdata;
  } dp_rsp_t;

endpackage
