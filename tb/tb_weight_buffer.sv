// tb_weight_buffer: writes random rows at random addresses of the full
// default-size buffer, reads them back (one-cycle latency) and compares with
// a copy kept in the testbench. It then flips stored code-word bits directly
// in the memory array: a single flip at every position of the 13-bit code
// word must be corrected and raise ecc_single; two flips in one byte must
// raise ecc_double. Clean reads must raise neither flag.
module tb_weight_buffer;
  localparam int N  = 14;
  localparam int D  = 32768;
  localparam int CW = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  logic wr_en, rd_en;
  logic [14:0] wr_addr, rd_addr;
  logic [7:0] wr_row [N], rd_row [N];
  logic ecc_single, ecc_double;
  int checks = 0, failures = 0;

  weight_buffer dut (.*);

  logic [7:0] shadow [int][N];
  int addrs [200];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0;
    for (int j = 0; j < N; j++) wr_row[j] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      addrs[k] = (k < 2) ? k * (D - 1) : $urandom_range(0, D - 1);
      wr_en = 1; wr_addr = 15'(addrs[k]);
      for (int j = 0; j < N; j++) begin
        wr_row[j] = 8'($urandom);
        shadow[addrs[k]][j] = wr_row[j];
      end
    end
    @(negedge clk) wr_en = 0;
    for (int k = 0; k < 200; k++) begin
      rd_en = 1; rd_addr = 15'(addrs[k]);
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < N; j++)
        chk(rd_row[j] === shadow[addrs[k]][j], $sformatf("addr %0d lane %0d", addrs[k], j));
      chk(!ecc_single && !ecc_double, $sformatf("no ECC flag at addr %0d", addrs[k]));
    end
    // single upsets at every code-word position, in varying lanes
    for (int p = 0; p < CW; p++) begin
      int a, lane;
      a = addrs[p + 2];
      lane = (p * 5) % N;
      dut.mem[a][lane * CW + p] = ~dut.mem[a][lane * CW + p];
      rd_en = 1; rd_addr = 15'(a);
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < N; j++)
        chk(rd_row[j] === shadow[a][j], $sformatf("single upset bit %0d lane %0d corrected", p, j));
      chk(ecc_single && !ecc_double, $sformatf("ecc_single for bit %0d", p));
      @(negedge clk);
      chk(!ecc_single, "flag lasts one cycle");
    end
    // double upset in one byte
    dut.mem[addrs[30]][6 * CW + 3] = ~dut.mem[addrs[30]][6 * CW + 3];
    dut.mem[addrs[30]][6 * CW + 11] = ~dut.mem[addrs[30]][6 * CW + 11];
    rd_en = 1; rd_addr = 15'(addrs[30]);
    @(negedge clk);
    rd_en = 0;
    chk(ecc_double, "double upset detected");
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
