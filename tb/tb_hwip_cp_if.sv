// tb_hwip_cp_if: the testbench plays the kernel and the IPs. It issues
// hardware-IP-instructions and answers the handshake: ready at once, busy
// for a number of cycles, or absent. It checks the broadcast instruction,
// the LDC/STC address Rn + offset, the MCR data, the MRC result, that nCPI
// is low exactly while the instruction is offered, and the cycle counts:
// k_done or k_undef comes 2 + (busy cycles) edges after k_valid is raised.
module tb_hwip_cp_if;
  import hwip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic k_valid = 0;
  k_req_t k_req;
  logic k_done, k_undef, k_wait;
  logic [XLEN-1:0] k_rdata;
  cp_req_t cp_req;
  logic cpa, cpb;
  logic [XLEN-1:0] cp_rdata;
  int checks = 0, failures = 0;
  int busy_left = 0;
  bit absent = 0;
  logic [XLEN-1:0] ip_reg = '0;
  int ncpi_low = 0;

  hwip_cp_if dut (.clk, .rst_n, .k_valid, .k_req, .k_done, .k_undef, .k_wait, .k_rdata,
                  .cp_req, .cpa, .cpb, .cp_rdata);

  always #5 clk = ~clk;

  // the IPs as one responder
  assign cpa      = cp_req.ncpi ? 1'b1 : absent;
  assign cpb      = cp_req.ncpi ? 1'b1 : (absent || busy_left > 0);
  assign cp_rdata = (!cp_req.ncpi && !absent && cp_req.instr.op == HWI_MRC) ? ip_reg : '0;
  always @(posedge clk) begin
    if (!cp_req.ncpi) begin
      ncpi_low++;
      if (busy_left > 0) busy_left--;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Issue one instruction; return edges until the answer and which answer.
  task automatic issue(input k_req_t r, input int busy, input bit abs,
                       output int edges, output bit undef, output int waits);
    @(negedge clk);
    k_req = r; k_valid = 1; busy_left = busy; absent = abs;
    ncpi_low = 0; edges = 0; waits = 0;
    do begin
      @(posedge clk); edges++;
      #1;
      if (k_wait) waits++;
      if (!cp_req.ncpi) begin
        check(cp_req.instr == r.instr, "broadcast instruction");
        check(cp_req.addr == r.base + r.offset, "address Rn+offset");
        check(cp_req.wdata == r.wdata, "MCR data");
      end
    end while (!k_done && !k_undef && edges < 100);
    undef = k_undef;
    check(k_done != k_undef, "exactly one answer");
    @(negedge clk); k_valid = 0;
    check(ncpi_low == busy + 1, "nCPI low cycles");
    @(posedge clk); #1;
    check(!k_done && !k_undef, "answer lasts one cycle");
  endtask

  function automatic k_req_t mk(hwi_op_e op);
    k_req_t r;
    r.instr.op = op;
    r.instr.hw = HW_W'($urandom);
    r.instr.opn = OPN_W'($urandom);
    r.instr.rd = REG_W'($urandom);
    r.instr.n = N_W'($urandom);
    r.base = ADDR_W'($urandom);
    r.offset = ADDR_W'($urandom);
    r.wdata = $urandom;
    return r;
  endfunction

  initial begin
    int edges, waits, busy;
    bit undef;
    k_req_t r;
    hwi_op_e ops [5] = '{HWI_CDP, HWI_LDC, HWI_STC, HWI_MCR, HWI_MRC};
    k_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      r = mk(ops[t % 5]);
      busy = (t % 3 == 0) ? int'($urandom % 12) : 0;
      ip_reg = $urandom;
      if (t % 7 == 6) begin
        issue(r, 0, 1'b1, edges, undef, waits);
        check(undef, "absent gives k_undef");
        check(edges == 2, "absent answer cycles");
      end else begin
        issue(r, busy, 1'b0, edges, undef, waits);
        check(!undef, "taken gives k_done");
        check(edges == 2 + busy, "accept cycles");
        check(waits == busy, "k_wait cycles");
        if (r.instr.op == HWI_MRC) check(k_rdata == ip_reg, "MRC data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
