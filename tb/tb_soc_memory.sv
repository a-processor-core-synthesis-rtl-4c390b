// tb_soc_memory: writes random words to random addresses of the memory,
// then reads them back and compares with a reference array; also checks
// that a read's data appear exactly one cycle after the access.
module tb_soc_memory;
  import hwip_pkg::*;
  logic clk = 0, valid = 0, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [XLEN-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [XLEN-1:0] ref_mem [logic [ADDR_W-1:0]];

  soc_memory dut (.clk, .valid, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] a;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      a = ADDR_W'($urandom);
      if (i < 4) a = (i == 0) ? '0 : (i == 1) ? '1 : ADDR_W'(i);
      @(negedge clk); valid = 1; we = 1; addr = a; wdata = $urandom;
      ref_mem[a] = wdata;
      @(posedge clk);
    end
    @(negedge clk); valid = 0; we = 0;
    foreach (ref_mem[k]) begin
      @(negedge clk); valid = 1; we = 0; addr = k;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[k]) begin
        failures++;
        $display("mismatch at %h: %h vs %h", k, rdata, ref_mem[k]);
      end
      // a cycle without access keeps the last read value
      @(negedge clk); valid = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
