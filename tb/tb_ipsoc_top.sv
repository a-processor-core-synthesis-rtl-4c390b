// tb_ipsoc_top: the whole SoC at its default size (16 hardware IPs, 64 Ki
// word memory). The testbench plays the processor kernel: it issues
// hardware-IP-instructions and does its own loads and stores on the shared
// bus. Each IP gets a stand-in datapath (dp_model); IP 0 has a response time
// of 285 cycles (a 2-D DCT block), IP 1 of 98 cycles (a transform-and-
// lighting IP), the others 20 + i.
// Flow: the kernel stores sixteen 8-word blocks, sends every IP an LDC of
// its block and a CDP, keeps loading from memory while the IPs work, then
// collects each result with MRC, has each IP STC its result to memory and
// loads it back. It also floods one IP with CDPs, offers an instruction no
// IP knows and moves values with MCR/MRC. Every result is compared with a
// value computed here. Counted mechanisms, each of which must occur: CPA
// refusal, CPB wait on a full pipeline, CPB wait for a result (MRC), bus
// contention, IPs working in parallel with each other and with the kernel,
// and each instruction kind.
module tb_ipsoc_top;
  import hwip_pkg::*;
  localparam int N = MAX_HWIP;
  logic clk = 0, rst_n = 0;
  logic k_valid = 0;
  k_req_t k_req;
  logic k_done, k_undef, k_wait;
  logic [XLEN-1:0] k_rdata;
  bus_req_t lsu_req;
  bus_rsp_t lsu_rsp;
  dp_req_t dp_req [N];
  dp_rsp_t dp_rsp [N];
  logic [N-1:0] ip_busy;
  int dp_ops [N];

  int checks = 0, failures = 0;
  int n_undef = 0, n_full_wait = 0, n_result_wait = 0, n_contention = 0;
  int max_parallel = 0, n_kernel_overlap = 0;
  int n_cdp = 0, n_ldc = 0, n_stc = 0, n_mcr = 0, n_mrc = 0;

  ipsoc_top dut (.clk, .rst_n, .k_valid, .k_req, .k_done, .k_undef, .k_wait, .k_rdata,
                 .lsu_req, .lsu_rsp, .dp_req, .dp_rsp, .ip_busy);

  for (genvar i = 0; i < N; i++) begin : g_dp
    localparam int unsigned R = (i == 0) ? 285 : (i == 1) ? 98 : 20 + i;
    dp_model #(.RESP(R)) u_dp (.clk, .rst_n, .req(dp_req[i]), .rsp(dp_rsp[i]), .ops_done(dp_ops[i]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if ($countones(ip_busy) > max_parallel) max_parallel = $countones(ip_busy);
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // kernel: one hardware-IP-instruction
  task automatic kissue(input hwi_op_e op, input int hw, input int opn, input int rd,
                        input int n, input int base, input int offset, input logic [XLEN-1:0] wdata,
                        output logic [XLEN-1:0] rdata, output bit undef, output int waits);
    @(negedge clk);
    k_valid = 1'b1;
    k_req.instr = '{op: op, hw: HW_W'(hw), opn: OPN_W'(opn), rd: REG_W'(rd), n: N_W'(n)};
    k_req.base = ADDR_W'(base);
    k_req.offset = ADDR_W'(offset);
    k_req.wdata = wdata;
    waits = 0;
    do begin
      @(posedge clk); #1;
      if (k_wait) waits++;
    end while (!k_done && !k_undef);
    undef = k_undef;
    rdata = k_rdata;
    @(negedge clk);
    k_valid = 1'b0;
    if (!undef) case (op)
      HWI_CDP: n_cdp++;
      HWI_LDC: n_ldc++;
      HWI_STC: n_stc++;
      HWI_MCR: n_mcr++;
      HWI_MRC: n_mrc++;
      default: ;
    endcase
  endtask

  // kernel: one load or store on the shared bus
  task automatic lsu(input bit we, input int addr, input logic [XLEN-1:0] wdata,
                     output logic [XLEN-1:0] rdata);
    bit waited = 0;
    @(negedge clk);
    lsu_req = '{valid: 1'b1, we: we, addr: ADDR_W'(addr), wdata: wdata};
    forever begin
      #4;
      if (lsu_rsp.gnt) break;
      waited = 1;
      @(negedge clk);
    end
    if (waited) n_contention++;
    if (ip_busy != '0) n_kernel_overlap++;
    @(negedge clk);
    lsu_req = '0;
    if (!we) begin
      #4;
      check(lsu_rsp.rvalid, "load data one cycle after grant");
      rdata = lsu_rsp.rdata;
    end
  endtask

  logic [XLEN-1:0] blk [N][8];

  function automatic logic [XLEN-1:0] expect_sum(int i, int op);
    logic [XLEN-1:0] s = '0;
    for (int k = 0; k < 8; k++) s += blk[i][k];
    return s + XLEN'(op);
  endfunction

  initial begin
    logic [XLEN-1:0] d;
    bit u;
    int w;
    time t_cdp0;
    k_req = '0; lsu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // kernel stores one 8-word block per IP at 0x100 + 16*i
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 8; k++) begin
        blk[i][k] = $urandom;
        lsu(1'b1, 'h100 + 16 * i + k, blk[i][k], d);
      end

    // every IP: LDC its block (base register 0x100, offset 16*i), then CDP op i
    for (int i = 0; i < N; i++) begin
      kissue(HWI_LDC, i, 0, 0, 8, 'h100, 16 * i, '0, d, u, w);
      check(!u, "LDC taken");
      kissue(HWI_CDP, i, i, 0, 0, 0, 0, '0, d, u, w);
      check(!u, "CDP taken");
      if (i == 0) t_cdp0 = $time;
    end

    // the kernel keeps working on the bus while the IPs run
    for (int k = 0; k < 24; k++) begin
      lsu(1'b0, 'h100 + 16 * (k / 8) + k % 8, '0, d);
      check(d == blk[k / 8][k % 8], "kernel load while IPs run");
    end

    // collect results: MRC r8 of each IP
    for (int i = 0; i < N; i++) begin
      kissue(HWI_MRC, i, 0, 8, 0, 0, 0, '0, d, u, w);
      check(!u, "MRC taken");
      check(d == expect_sum(i, i), $sformatf("IP %0d result", i));
      if (w > 0) n_result_wait++;
      if (i == 0) check(int'(($time - t_cdp0) / 10) >= 285, "IP 0 response time respected");
    end

    // each IP stores its result to 0x800 + i; the kernel loads it back
    for (int i = 0; i < N; i++) begin
      kissue(HWI_STC, i, 0, 8, 1, 'h800, i, '0, d, u, w);
      check(!u, "STC taken");
    end
    for (int i = N - 1; i >= 0; i--) begin
      kissue(HWI_MRC, i, 0, 0, 0, 0, 0, '0, d, u, w);   // wait until IP i is done
      check(d == blk[i][0], "register 0 kept");
    end
    for (int i = 0; i < N; i++) begin
      lsu(1'b0, 'h800 + i, '0, d);
      check(d == expect_sum(i, i), "STC result in memory");
    end

    // flood IP 2 with CDPs: the instruction pipeline fills
    for (int k = 0; k < 8; k++) begin
      kissue(HWI_CDP, 2, 7, 0, 0, 0, 0, '0, d, u, w);
      if (w > 0) n_full_wait++;
    end
    kissue(HWI_MRC, 2, 0, 8, 0, 0, 0, '0, d, u, w);
    check(d == expect_sum(2, 7), "IP 2 after flood");
    check(dp_ops[2] == 9, "IP 2 ran nine operations");

    // an instruction no IP takes
    kissue(hwi_op_e'(3'd6), 5, 0, 0, 0, 0, 0, '0, d, u, w);
    check(u, "unknown instruction refused");
    if (u) n_undef++;

    // MCR then MRC on IP 15
    kissue(HWI_MCR, 15, 0, 12, 0, 0, 0, 32'hCAFE_0015, d, u, w);
    kissue(HWI_MRC, 15, 0, 12, 0, 0, 0, '0, d, u, w);
    check(d == 32'hCAFE_0015, "MCR/MRC");

    $display("undef=%0d full_wait=%0d result_wait=%0d contention=%0d parallel=%0d overlap=%0d",
             n_undef, n_full_wait, n_result_wait, n_contention, max_parallel, n_kernel_overlap);
    $display("cdp=%0d ldc=%0d stc=%0d mcr=%0d mrc=%0d", n_cdp, n_ldc, n_stc, n_mcr, n_mrc);
    check(n_undef > 0, "CPA refusal happened");
    check(n_full_wait > 0, "CPB wait on full pipeline happened");
    check(n_result_wait > 0, "CPB wait for a result happened");
    check(n_contention > 0, "bus contention happened");
    check(max_parallel > 1, "IPs ran in parallel");
    check(n_kernel_overlap > 0, "kernel ran in parallel with the IPs");
    check(n_cdp > 0 && n_ldc > 0 && n_stc > 0 && n_mcr > 0 && n_mrc > 0, "every instruction kind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
