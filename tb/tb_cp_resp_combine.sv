// tb_cp_resp_combine: random per-IP answers; the joined CPA must be high only
// when every IP is absent, CPB only when every IP reports busy or absent,
// and the data word must be the OR of the per-IP words.
module tb_cp_resp_combine;
  import hwip_pkg::*;
  localparam int N = MAX_HWIP;
  cp_rsp_t rsp [N];
  logic cpa, cpb;
  logic [XLEN-1:0] rdata;
  int checks = 0, failures = 0;

  cp_resp_combine #(.N(N)) dut (.rsp, .cpa, .cpb, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit exp_a, exp_b;
      logic [XLEN-1:0] exp_d;
      int who;
      // usually one IP claims (the normal case), sometimes none
      who = (t % 5 == 0) ? -1 : int'($urandom % N);
      exp_a = 1; exp_b = 1; exp_d = '0;
      for (int i = 0; i < N; i++) begin
        rsp[i].cpa   = (i != who);
        rsp[i].cpb   = (i != who) ? 1'b1 : 1'($urandom);
        rsp[i].rdata = (i == who) ? $urandom : '0;
        if (t % 7 == 3) begin   // arbitrary patterns as well
          rsp[i].cpa = 1'($urandom); rsp[i].cpb = 1'($urandom); rsp[i].rdata = $urandom;
        end
        exp_a = exp_a && rsp[i].cpa;
        exp_b = exp_b && rsp[i].cpb;
        exp_d = exp_d | rsp[i].rdata;
      end
      #1;
      checks++;
      if (cpa !== exp_a || cpb !== exp_b || rdata !== exp_d) begin
        failures++;
        $display("FAIL t=%0d cpa %b/%b cpb %b/%b", t, cpa, exp_a, cpb, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
