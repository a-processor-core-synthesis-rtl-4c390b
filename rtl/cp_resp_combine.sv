// cp_resp_combine: joins the handshake answers of all hardware IPs into the
// single CPA/CPB pair and MRC data word the processor core samples.
//
// Every IP drives its own CPA and CPB. An IP that is not addressed drives
// both high, so the core sees CPA high only if every IP reports absent, and
// CPB high only if no IP that takes the instruction is ready (the AND of the
// per-IP bits). The MRC data is the OR of the per-IP words, since an IP
// drives zero unless it is the one addressed. The per-IP lines CPA1..CPAn
// and CPB1..CPBn joined by one gate each follow the connection drawing of
// the architecture; the polarity convention is this design's choice, taken
// from the interface the architecture is based on. Purely combinational.
module cp_resp_combine
  import hwip_pkg::*;
#(
  parameter int unsigned N = MAX_HWIP
) (
  input  cp_rsp_t          rsp [N],
  output logic             cpa,
  output logic             cpb,
  output logic [XLEN-1:0]  rdata
);

  always_comb begin
    cpa   = 1'b1;
    cpb   = 1'b1;
    rdata = '0;
    for (int i = 0; i < N; i++) begin
      cpa   = cpa & rsp[i].cpa;
      cpb   = cpb & rsp[i].cpb;
      rdata = rdata | rsp[i].rdata;
    end
  end

endmodule
