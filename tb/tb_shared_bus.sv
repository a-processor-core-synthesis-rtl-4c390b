// tb_shared_bus: four masters issue random reads and writes to a 256-word
// memory through the bus. Each cycle the testbench predicts the round-robin
// grant (first requesting master after the last one granted), checks that
// exactly that master is granted, that read data return one cycle later to
// the right master and equal a reference memory, and that no master waits
// longer than three grants of others.
module tb_shared_bus;
  import hwip_pkg::*;
  localparam int NM = 4;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  logic s_valid, s_we;
  logic [ADDR_W-1:0] s_addr;
  logic [XLEN-1:0] s_wdata, s_rdata;
  logic [XLEN-1:0] ref_mem [256];
  int checks = 0, failures = 0, contended = 0;

  shared_bus #(.NM(NM)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_valid, .s_we, .s_addr, .s_wdata, .s_rdata);
  soc_memory #(.WORDS(256)) mem (.clk, .valid(s_valid), .we(s_we), .addr(s_addr), .wdata(s_wdata), .rdata(s_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int last, exp_sel, nvalid, waited [NM];
    bit rd_pend; int rd_id;
    logic [XLEN-1:0] rd_exp;
    for (int i = 0; i < NM; i++) begin m_req[i] = '0; waited[i] = 0; end
    // memory contents start known: write every word first through master 0
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = NM - 1; rd_pend = 0; rd_id = 0; rd_exp = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      m_req[0] = '{valid: 1'b1, we: 1'b1, addr: ADDR_W'(a), wdata: $urandom};
      ref_mem[a] = m_req[0].wdata;
      @(posedge clk);
    end
    @(negedge clk); m_req[0] = '0;
    @(posedge clk);
    last = 0;
    exp_sel = -1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (exp_sel >= 0) m_req[exp_sel].valid = 1'b0;  // last grant consumed
      for (int i = 0; i < NM; i++)
        if (!m_req[i].valid && ($urandom % 100) < 40) begin
          m_req[i].valid = 1'b1;
          m_req[i].we    = 1'($urandom);
          m_req[i].addr  = ADDR_W'($urandom % 256);
          m_req[i].wdata = $urandom;
        end
      #4;  // just before the rising edge: everything combinational has settled
      // read data of last cycle's grant
      for (int i = 0; i < NM; i++)
        check(m_rsp[i].rvalid == (rd_pend && rd_id == i), "rvalid routing");
      if (rd_pend) check(m_rsp[rd_id].rdata == rd_exp, "read data");
      // predicted grant
      exp_sel = -1; nvalid = 0;
      for (int k = 1; k <= NM; k++)
        if (exp_sel < 0 && m_req[(last + k) % NM].valid) exp_sel = (last + k) % NM;
      for (int i = 0; i < NM; i++) begin
        if (m_req[i].valid) nvalid++;
        check(m_rsp[i].gnt == (i == exp_sel), "grant");
      end
      if (nvalid > 1) contended++;
      rd_pend = 0;
      if (exp_sel >= 0) begin
        if (m_req[exp_sel].we) ref_mem[m_req[exp_sel].addr[7:0]] = m_req[exp_sel].wdata;
        else begin
          rd_pend = 1; rd_id = exp_sel; rd_exp = ref_mem[m_req[exp_sel].addr[7:0]];
        end
        last = exp_sel;
      end
      for (int i = 0; i < NM; i++) begin
        if (m_req[i].valid && i != exp_sel) waited[i]++;
        if (i == exp_sel) waited[i] = 0;
        check(waited[i] <= NM - 1, "round-robin bound");
      end
      @(posedge clk);
    end
    check(contended > 100, "contention exercised");
    $display("contended cycles: %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
