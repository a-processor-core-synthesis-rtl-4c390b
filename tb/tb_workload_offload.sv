// tb_workload_offload: the hardware/software overlap the SoC is built for,
// run on IPs with the response times of known IPs: a 2-D DCT (285 cycles,
// as in a JPEG encoder) on IP 0, and six transform-and-lighting IPs A..F
// (98, 50, 38, 37, 34, 29 cycles, as in a 3D-animation pipeline) on IPs 1..6.
// The IP datapaths are behavioural stand-ins (dp_model), so only the timing
// and data movement are real.
// For each IP the kernel runs ITER rounds of: LDC an 8-word block, CDP,
// SW_LOADS loads of its own from memory (the software part), MRC of the
// result, STC of the result to memory. Checked: every result, every stored
// word, that a round is never shorter than the response time, that the
// kernel's own work is hidden under the IP's run (the
// same rounds without the kernel work take at most 4 cycles less), and
// that a faster IP never makes a round slower. Cycles per round are printed.
module tb_workload_offload;
  import hwip_pkg::*;
  localparam int N = MAX_HWIP;
  localparam int ITER = 6;
  localparam int SW_LOADS = 12;
  localparam int NW = 7;
  localparam int RESP_OF [NW] = '{285, 98, 50, 38, 37, 34, 29};

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
  longint cyc = 0;

  ipsoc_top dut (.clk, .rst_n, .k_valid, .k_req, .k_done, .k_undef, .k_wait, .k_rdata,
                 .lsu_req, .lsu_rsp, .dp_req, .dp_rsp, .ip_busy);

  for (genvar i = 0; i < N; i++) begin : g_dp
    localparam int unsigned R = (i < NW) ? RESP_OF[i] : 20;
    dp_model #(.RESP(R)) u_dp (.clk, .rst_n, .req(dp_req[i]), .rsp(dp_rsp[i]), .ops_done(dp_ops[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic kissue(input hwi_op_e op, input int hw, input int opn, input int rd,
                        input int n, input int base, input int offset, input logic [XLEN-1:0] wdata,
                        output logic [XLEN-1:0] rdata);
    @(negedge clk);
    k_valid = 1'b1;
    k_req.instr = '{op: op, hw: HW_W'(hw), opn: OPN_W'(opn), rd: REG_W'(rd), n: N_W'(n)};
    k_req.base = ADDR_W'(base);
    k_req.offset = ADDR_W'(offset);
    k_req.wdata = wdata;
    do begin
      @(posedge clk); #1;
    end while (!k_done && !k_undef);
    check(k_done, "instruction taken");
    rdata = k_rdata;
    @(negedge clk);
    k_valid = 1'b0;
  endtask

  task automatic lsu(input bit we, input int addr, input logic [XLEN-1:0] wdata,
                     output logic [XLEN-1:0] rdata);
    @(negedge clk);
    lsu_req = '{valid: 1'b1, we: we, addr: ADDR_W'(addr), wdata: wdata};
    forever begin
      #4;
      if (lsu_rsp.gnt) break;
      @(negedge clk);
    end
    @(negedge clk);
    lsu_req = '0;
    if (!we) begin #4; rdata = lsu_rsp.rdata; end
  endtask

  logic [XLEN-1:0] img [logic [ADDR_W-1:0]];

  task automatic sw_part(int it);
    logic [XLEN-1:0] d;
    for (int k = 0; k < SW_LOADS; k++) begin
      lsu(1'b0, 'h2000 + k, '0, d);
      check(d == img[ADDR_W'('h2000 + k)], "kernel load");
    end
  endtask

  initial begin
    logic [XLEN-1:0] d, s;
    longint t0, sw_alone, round [NW], bare [NW];
    k_req = '0; lsu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // input blocks at 0x1000 + 8*round, kernel data at 0x2000
    for (int a = 0; a < 8 * ITER; a++) begin
      img[ADDR_W'('h1000 + a)] = $urandom;
      lsu(1'b1, 'h1000 + a, img[ADDR_W'('h1000 + a)], d);
    end
    for (int a = 0; a < SW_LOADS; a++) begin
      img[ADDR_W'('h2000 + a)] = $urandom;
      lsu(1'b1, 'h2000 + a, img[ADDR_W'('h2000 + a)], d);
    end
    t0 = cyc; sw_part(0); sw_alone = cyc - t0;

    for (int w = 0; w < NW; w++) begin
      // pass 0 with the kernel's own work between CDP and MRC, pass 1 without
      for (int pass = 0; pass < 2; pass++) begin
        t0 = cyc;
        for (int it = 0; it < ITER; it++) begin
          kissue(HWI_LDC, w, 0, 0, 8, 'h1000, 8 * it, '0, d);
          kissue(HWI_CDP, w, it, 0, 0, 0, 0, '0, d);
          if (pass == 0) sw_part(it);
          kissue(HWI_MRC, w, 0, 8, 0, 0, 0, '0, d);
          s = XLEN'(it);
          for (int k = 0; k < 8; k++) s += img[ADDR_W'('h1000 + 8 * it + k)];
          check(d == s, "IP result");
          kissue(HWI_STC, w, 0, 8, 1, 'h3000 + 16 * w, it, '0, d);
        end
        kissue(HWI_MRC, w, 0, 0, 0, 0, 0, '0, d);   // drain the last STC
        if (pass == 0) round[w] = (cyc - t0) / longint'(ITER);
        else bare[w] = (cyc - t0) / longint'(ITER);
      end
      $display("IP %0d response %0d cycles: %0d cycles per round, %0d without kernel work (kernel work alone %0d)",
               w, RESP_OF[w], round[w], bare[w], sw_alone);
      check(round[w] >= longint'(RESP_OF[w]), "round not shorter than the response time");
      check(round[w] - bare[w] <= 4, "kernel work hidden under the IP run");
      if (w > 0) check(round[w] <= round[w - 1], "faster IP is not slower");
      for (int it = 0; it < ITER; it++) begin
        s = XLEN'(it);
        for (int k = 0; k < 8; k++) s += img[ADDR_W'('h1000 + 8 * it + k)];
        lsu(1'b0, 'h3000 + 16 * w + it, '0, d);
        check(d == s, "stored result");
      end
      check(dp_ops[w] == 2 * ITER, "datapath runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
