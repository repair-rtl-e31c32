// tb_activation_unit: random and edge-case accumulator values through all
// three functions and several shifts, compared with a reference written with
// real-number sigmoid segments (PLAN: 0.25x+0.5, 0.125x+0.625,
// 0.03125x+0.84375, 1) and integer saturation; one-cycle latency checked.
module tb_activation_unit;
  import repair_pkg::*;
  localparam int N = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  logic [1:0] func;
  logic [4:0] shift;
  logic signed [31:0] in_vec [N];
  logic signed [7:0]  out_vec [N];
  int checks = 0, failures = 0;

  activation_unit #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int ref_act(input int f, input int sh, input int v);
    int  q;
    real x, y;
    q = v >>> sh;
    if (f == 1) return (q < 0) ? 0 : (q > 127 ? 127 : q);
    if (f == 2) begin
      x = (q < 0 ? -q : q) / 16.0;
      if (x >= 5.0)        y = 1.0;
      else if (x >= 2.375) y = 0.03125 * x + 0.84375;
      else if (x >= 1.0)   y = 0.125 * x + 0.625;
      else                 y = 0.25 * x + 0.5;
      if (q < 0) y = 1.0 - y;
      q = int'($floor(y * 128.0 + 1e-9));
      return (q > 127) ? 127 : q;
    end
    return (q > 127) ? 127 : ((q < -128) ? -128 : q);
  endfunction

  initial begin
    int vals [N];
    int f, sh;
    rst = 1; in_valid = 0; func = 0; shift = 0;
    for (int j = 0; j < N; j++) in_vec[j] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 300; r++) begin
      f  = r % 3;
      sh = (r / 3) % 9;
      for (int j = 0; j < N; j++) begin
        if (r < 30) vals[j] = (j - 7) * 16 * (1 << sh) + r;   // sweep segment edges
        else        vals[j] = int'($urandom_range(0, 4000)) - 2000;
        in_vec[j] = vals[j];
      end
      func = 2'(f); shift = 5'(sh); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid after one cycle");
      for (int j = 0; j < N; j++)
        chk(int'(out_vec[j]) == ref_act(f, sh, vals[j]) ||
            (f == 2 && int'(out_vec[j]) - ref_act(f, sh, vals[j]) inside {-1, 1}),
            $sformatf("f=%0d sh=%0d x=%0d got %0d exp %0d", f, sh, vals[j], out_vec[j],
                      ref_act(f, sh, vals[j])));
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
