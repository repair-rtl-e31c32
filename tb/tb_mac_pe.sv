// tb_mac_pe: random signed operands; checks psum_out = psum_in + a*w and
// a_out = a_in one cycle later, that the shadow weight only becomes active
// on w_activate, and that the shadow shifts out.
module tb_mac_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, w_shift_en, w_activate;
  logic signed [7:0]  a_in, a_out;
  logic signed [31:0] psum_in, psum_out;
  logic [7:0] w_shift_in, w_shift_out;
  int checks = 0, failures = 0;

  mac_pe dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic signed [7:0] w, wold, a;
    logic signed [31:0] p;
    rst = 1; w_shift_en = 0; w_activate = 0; a_in = 0; psum_in = 0; w_shift_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wold = 0;
    for (int t = 0; t < 200; t++) begin
      w = 8'($urandom);
      @(negedge clk);
      w_shift_in = w; w_shift_en = 1;
      @(negedge clk);
      w_shift_en = 0;
      chk(w_shift_out == w, "shadow shift");
      // before activation the old weight is still used
      a = 8'($urandom); p = $urandom;
      a_in = a; psum_in = p;
      @(negedge clk);
      chk(psum_out == p + 32'(a * wold), $sformatf("old weight in use %0d", t));
      w_activate = 1;
      @(negedge clk);
      w_activate = 0;
      a = 8'($urandom); p = $urandom;
      a_in = a; psum_in = p;
      @(negedge clk);
      chk(psum_out == p + 32'(32'(a) * 32'(w)), $sformatf("mac t=%0d", t));
      chk(a_out == a, "a passes right");
      wold = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
