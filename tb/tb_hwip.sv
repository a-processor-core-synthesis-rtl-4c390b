// tb_hwip: one hardware IP (number 3, two-entry instruction pipeline) with a
// stand-in datapath whose response time is 30 cycles, and a bus model that
// grants after a random delay. The testbench offers instructions the way
// the core does and checks: other HW# and unknown operation codes are
// refused (CPA); MCR/MRC move register values; MRC waits (CPB) until earlier
// work is finished; CDP runs the datapath and MRC of its result waits at
// least the response time; a fourth CDP waits while the pipeline is full;
// LDC/STC move N words between memory and consecutive registers, wrapping
// at register 15; N = 0 moves nothing.
module tb_hwip;
  import hwip_pkg::*;
  localparam int RESP = 30;
  localparam logic [HW_W-1:0] ME = 4'd3;
  logic clk = 0, rst_n = 0;
  cp_req_t cp_req;
  cp_rsp_t cp_rsp;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  dp_req_t dp_req;
  dp_rsp_t dp_rsp;
  logic busy;
  int dp_ops;
  int checks = 0, failures = 0;
  int full_waits = 0, mrc_waits = 0, refused = 0;
  logic [XLEN-1:0] mem [256];
  logic [XLEN-1:0] regs_model [IP_REGS];

  hwip #(.HW_ID(3), .PIPE_DEPTH(2)) dut (.clk, .rst_n, .cp_req, .cp_rsp, .bus_req, .bus_rsp,
                                         .dp_req, .dp_rsp, .busy);
  dp_model #(.RESP(RESP)) u_dp (.clk, .rst_n, .req(dp_req), .rsp(dp_rsp), .ops_done(dp_ops));

  always #5 clk = ~clk;

  // bus model: random grant delay, one-cycle read data
  int gnt_delay = 0;
  logic rv_q = 0;
  logic [XLEN-1:0] rd_q = '0;
  always_comb begin
    bus_rsp.gnt    = bus_req.valid && gnt_delay == 0;
    bus_rsp.rvalid = rv_q;
    bus_rsp.rdata  = rd_q;
  end
  always @(posedge clk) begin
    rv_q <= 1'b0;
    if (bus_req.valid) begin
      if (gnt_delay == 0) begin
        if (bus_req.we) mem[bus_req.addr[7:0]] <= bus_req.wdata;
        else begin rv_q <= 1'b1; rd_q <= mem[bus_req.addr[7:0]]; end
        gnt_delay <= $urandom % 3;
      end else gnt_delay <= gnt_delay - 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Offer one instruction as the core does; returns cycles waited on CPB.
  task automatic offer(input hwi_op_e op, input logic [HW_W-1:0] hw, input int opn, input int rd,
                       input int n, input int addr, input logic [XLEN-1:0] wdata,
                       output bit absent, output int waits, output logic [XLEN-1:0] rdata);
    @(negedge clk);
    cp_req.ncpi = 1'b0;
    cp_req.instr = '{op: op, hw: hw, opn: OPN_W'(opn), rd: REG_W'(rd), n: N_W'(n)};
    cp_req.addr = ADDR_W'(addr);
    cp_req.wdata = wdata;
    waits = 0;
    forever begin
      #4;
      if (cp_rsp.cpa || !cp_rsp.cpb) break;
      waits++;
      @(negedge clk);
    end
    absent = cp_rsp.cpa;
    rdata = cp_rsp.rdata;
    if (absent) check(cp_rsp.rdata == '0, "absent IP drives no data");
    @(posedge clk);
    @(negedge clk);
    cp_req.ncpi = 1'b1;
  endtask

  task automatic mcr(int rd, logic [XLEN-1:0] v);
    bit a; int w; logic [XLEN-1:0] d;
    offer(HWI_MCR, ME, 0, rd, 0, 0, v, a, w, d);
    check(!a, "MCR taken");
    if (w > 0) full_waits++;
    regs_model[rd % IP_REGS] = v;
  endtask

  task automatic mrc(int rd, output logic [XLEN-1:0] d, output int w);
    bit a;
    offer(HWI_MRC, ME, 0, rd, 0, 0, '0, a, w, d);
    check(!a, "MRC taken");
    if (w > 0) mrc_waits++;
  endtask

  function automatic logic [XLEN-1:0] dp_expect(int op);
    logic [XLEN-1:0] s = '0;
    for (int i = 0; i < 8; i++) s += regs_model[i];
    return s + XLEN'(op);
  endfunction

  initial begin
    bit a; int w; logic [XLEN-1:0] d;
    time t0;
    cp_req = '0; cp_req.ncpi = 1'b1;
    for (int i = 0; i < 256; i++) mem[i] = $urandom;
    for (int i = 0; i < IP_REGS; i++) regs_model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // refused: other IP number, unknown operation code
    offer(HWI_CDP, 4'd5, 0, 0, 0, 0, '0, a, w, d); check(a, "other HW# refused"); refused++;
    offer(hwi_op_e'(3'd7), ME, 0, 0, 0, 0, '0, a, w, d); check(a, "bad opcode refused"); refused++;

    // MCR eight registers (the pipeline fills), then MRC each back
    for (int i = 0; i < 8; i++) mcr(i, $urandom);
    for (int i = 0; i < 8; i++) begin
      mrc(i, d, w);
      check(d == regs_model[i], "MCR/MRC round trip");
    end

    // CDP, then MRC of the result: waits at least the response time
    offer(HWI_CDP, ME, 5, 0, 0, 0, '0, a, w, d); check(!a, "CDP taken");
    t0 = $time;
    mrc(8, d, w);
    check(d == dp_expect(5), "CDP result");
    check(int'(($time - t0) / 10) >= RESP, "MRC waited for the response time");
    regs_model[8] = d;

    // four CDPs back to back: one runs, two wait in the pipeline, the fourth
    // finds it full
    begin
      int w3 = 0;
      for (int k = 0; k < 4; k++) begin
        offer(HWI_CDP, ME, k, 0, 0, 0, '0, a, w, d);
        if (k == 3) w3 = w;
      end
      check(w3 > 0, "pipeline full makes CDP wait");
      if (w3 > 0) full_waits++;
      mrc(8, d, w);
      check(d == dp_expect(3), "last of four CDPs");
      check(dp_ops == 5, "datapath ran five times");
    end

    // LDC eight words into r0..r7, CDP, check
    offer(HWI_LDC, ME, 0, 0, 8, 'h40, '0, a, w, d); check(!a, "LDC taken");
    for (int i = 0; i < 8; i++) regs_model[i] = mem['h40 + i];
    offer(HWI_CDP, ME, 1, 0, 0, 0, '0, a, w, d);
    for (int i = 0; i < 8; i++) begin
      mrc(i, d, w);
      check(d == regs_model[i], "LDC data");
    end
    mrc(8, d, w);
    check(d == dp_expect(1), "CDP on loaded data");
    regs_model[8] = d;

    // LDC wrapping at register 15, N = 0 does nothing
    offer(HWI_LDC, ME, 0, 14, 3, 'h10, '0, a, w, d);
    regs_model[14] = mem['h10]; regs_model[15] = mem['h11]; regs_model[0] = mem['h12];
    offer(HWI_LDC, ME, 0, 1, 0, 'h20, '0, a, w, d);
    for (int i = 0; i < IP_REGS; i++) begin
      mrc(i, d, w);
      check(d == regs_model[i], "registers after LDC wrap");
    end

    // STC nine registers to memory
    offer(HWI_STC, ME, 0, 0, 9, 'h80, '0, a, w, d); check(!a, "STC taken");
    mrc(0, d, w);   // waits until the store is done
    for (int i = 0; i < 9; i++) check(mem['h80 + i] == regs_model[i], "STC data");

    check(full_waits > 0 && mrc_waits > 0 && refused == 2, "mechanisms seen");
    $display("refused=%0d full_waits=%0d mrc_waits=%0d", refused, full_waits, mrc_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
