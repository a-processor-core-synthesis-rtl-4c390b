// tb_hwip_ipipe: random pushes and pops against a queue model; checks the
// head entry, full, empty and count every cycle, and that pushes into a full
// pipeline and pops from an empty one are ignored.
module tb_hwip_ipipe;
  import hwip_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  ipipe_entry_t din, dout;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  ipipe_entry_t q[$];
  int checks = 0, failures = 0, saw_full = 0, saw_empty_pop = 0;

  hwip_ipipe #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(full == (q.size() == DEPTH), "full");
      check(empty == (q.size() == 0), "empty");
      if (q.size() > 0) check(dout == q[0], "head");
      // bias the traffic so both full and empty are reached often
      push = ($urandom % 100) < ((i / 200) % 2 ? 75 : 35);
      pop  = ($urandom % 100) < ((i / 200) % 2 ? 35 : 75);
      din  = ipipe_entry_t'({$urandom, $urandom, $urandom});
      if (push && q.size() == DEPTH) saw_full++;
      if (pop && q.size() == 0) saw_empty_pop++;
      @(posedge clk);
      begin
        bit do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < DEPTH;
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(din);
      end
    end
    check(saw_full > 0, "pipeline full reached");
    check(saw_empty_pop > 0, "pop on empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
