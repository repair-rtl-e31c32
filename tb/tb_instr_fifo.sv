// tb_instr_fifo: random push/pop traffic against a queue model, checking
// order, full/empty/count, simultaneous push and pop, and flush.
module tb_instr_fifo;
  import repair_pkg::*;
  localparam int D = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, flush, push, pop, full, empty;
  instr_t din, dout;
  logic [5:0] count;
  int checks = 0, failures = 0;
  instr_t q [$];

  instr_fifo dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    rst = 1; flush = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      chk(count == 6'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      chk(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) chk(dout == q[0], "head");
      flush = ($urandom_range(0, 199) == 0);
      push  = (t % 600 < 300) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      push  = push && !full;
      pop   = $urandom_range(0, 1) && !empty;
      din   = {$urandom, $urandom, $urandom};
      @(negedge clk);
      if (flush) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
