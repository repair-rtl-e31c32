// tb_unified_buffer: writes random rows through both ports, reads them back
// through the other port, then flips one stored bit (corrected, ecc_single)
// and two bits of one byte (ecc_double) directly in the memory array and
// checks data and flags. Every one of the 13 code-word positions is tried.
module tb_unified_buffer;
  localparam int N  = 14;
  localparam int CW = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, a_en, a_we, b_en, b_we, ecc_single, ecc_double;
  logic [11:0] a_addr, b_addr;
  logic [7:0] a_wdata [N], a_rdata [N], b_wdata [N], b_rdata [N];
  int checks = 0, failures = 0;

  unified_buffer dut (.*);

  logic [7:0] ref_row [64][N];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    rst = 1; a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0;
    for (int j = 0; j < N; j++) begin a_wdata[j] = 0; b_wdata[j] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) ref_row[k][j] = 8'($urandom);
      if (k % 2 == 0) begin
        a_en = 1; a_we = 1; a_addr = 12'(k); b_en = 0;
        for (int j = 0; j < N; j++) a_wdata[j] = ref_row[k][j];
      end else begin
        b_en = 1; b_we = 1; b_addr = 12'(k); a_en = 0;
        for (int j = 0; j < N; j++) b_wdata[j] = ref_row[k][j];
      end
    end
    @(negedge clk); a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    // clean reads, crossing the ports
    for (int k = 0; k < 64; k++) begin
      a_en = 1; a_addr = 12'(k); b_en = 1; b_addr = 12'(63 - k);
      @(negedge clk);
      a_en = 0; b_en = 0;
      for (int j = 0; j < N; j++) begin
        chk(a_rdata[j] == ref_row[k][j], $sformatf("A row %0d", k));
        chk(b_rdata[j] == ref_row[63 - k][j], $sformatf("B row %0d", 63 - k));
      end
      chk(!ecc_single && !ecc_double, "no ECC flag on clean data");
    end
    // single-bit upsets at every code-word position
    for (int p = 0; p < CW; p++) begin
      int k, lane;
      k = p;
      lane = p % N;
      dut.mem[k][lane * CW + p] = ~dut.mem[k][lane * CW + p];
      b_en = 1; b_addr = 12'(k);
      @(negedge clk);
      b_en = 0;
      chk(b_rdata[lane] == ref_row[k][lane], $sformatf("single upset at bit %0d corrected", p));
      chk(ecc_single && !ecc_double, $sformatf("ecc_single for bit %0d", p));
    end
    // double upset in one byte
    dut.mem[40][3 * CW + 2] = ~dut.mem[40][3 * CW + 2];
    dut.mem[40][3 * CW + 9] = ~dut.mem[40][3 * CW + 9];
    a_en = 1; a_addr = 12'd40;
    @(negedge clk);
    a_en = 0;
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
