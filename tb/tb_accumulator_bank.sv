// tb_accumulator_bank: checks overwrite and accumulate writes and the read
// port; builds the weight checksum C_A in the SIMD lane while data results
// are accumulated in the same cycles; commits R0 = -C_A, R1 = C_A; then
// feeds the three test results (correct, and with a deviation) and checks
// the snapshot a = C_SA - C_A, a* = not(C_SA) + C_A handed to the detector.
module tb_accumulator_bank;
  import repair_pkg::*;
  localparam int N = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, res_valid, res_accum, ck_clear, ck_valid, ck_commit, rd_en, chk_valid;
  vkind_e res_kind;
  logic signed [31:0] res_vec [N];
  logic [8:0] res_addr, rd_addr;
  logic [7:0] ck_row [N];
  logic signed [31:0] rd_vec [N];
  logic [31:0] chk_a [N], chk_an [N], chk_csa [N], chk_ncsa [N], chk_z [N];
  int checks = 0, failures = 0;

  accumulator_bank #(.N(N)) dut (.*);

  logic signed [31:0] ref_mem [8][N];
  logic signed [7:0]  W [N][N];
  int                 ca [N];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic idle_in();
    res_valid = 0; ck_valid = 0; ck_clear = 0; ck_commit = 0; rd_en = 0; res_accum = 0;
    res_kind = VK_DATA;
  endtask

  task automatic run_test(input int delta);
    // test results: C_SA (+delta on column 1), not(C_SA), zero
    @(negedge clk);
    idle_in();
    res_valid = 1; res_kind = VK_ONES;
    for (int j = 0; j < N; j++) res_vec[j] = ca[j] + ((j == 1) ? delta : 0);
    @(negedge clk);
    res_kind = VK_MONES;
    for (int j = 0; j < N; j++) res_vec[j] = -ca[j] - 1 - ((j == 1) ? delta : 0);
    @(negedge clk);
    res_kind = VK_ZERO;
    for (int j = 0; j < N; j++) res_vec[j] = 0;
    @(negedge clk);
    idle_in();
    chk(chk_valid, "snapshot valid");
    for (int j = 0; j < N; j++) begin
      int d = (j == 1) ? delta : 0;
      chk(chk_a[j] == 32'(d), $sformatf("a[%0d]=%0d exp %0d", j, $signed(chk_a[j]), d));
      chk(chk_an[j] == ~32'(d), $sformatf("a*[%0d]", j));
      chk(chk_csa[j] == 32'(ca[j] + d), $sformatf("csa[%0d]", j));
      chk(chk_ncsa[j] == 32'(-ca[j] - 1 - d), $sformatf("ncsa[%0d]", j));
      chk(chk_z[j] == 0, "zero");
    end
  endtask

  initial begin
    rst = 1; idle_in(); res_addr = 0; rd_addr = 0;
    for (int j = 0; j < N; j++) begin res_vec[j] = 0; ck_row[j] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) W[i][j] = 8'($urandom);
    for (int j = 0; j < N; j++) begin
      ca[j] = 0;
      for (int i = 0; i < N; i++) ca[j] += W[i][j];
    end
    // overwrite rows 0..7
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      res_valid = 1; res_kind = VK_DATA; res_accum = 0; res_addr = 9'(a);
      for (int j = 0; j < N; j++) begin res_vec[j] = $urandom; ref_mem[a][j] = res_vec[j]; end
    end
    // accumulate rows 0..7 while the weight checksum is built (SIMD)
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      res_valid = 1; res_kind = VK_DATA; res_accum = 1; res_addr = 9'(a);
      for (int j = 0; j < N; j++) begin
        res_vec[j] = $urandom;
        ref_mem[a][j] = ref_mem[a][j] + res_vec[j];
      end
      if (a < N) begin
        ck_valid = 1; ck_clear = (a == 0);
        for (int j = 0; j < N; j++) ck_row[j] = W[a][j];
      end
    end
    for (int a = 8; a < N; a++) begin
      @(negedge clk);
      idle_in();
      ck_valid = 1;
      for (int j = 0; j < N; j++) ck_row[j] = W[a][j];
    end
    @(negedge clk);
    idle_in();
    ck_commit = 1;
    @(negedge clk);
    idle_in();
    for (int a = 0; a < 8; a++) begin
      rd_en = 1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < N; j++)
        chk(rd_vec[j] == ref_mem[a][j], $sformatf("row %0d col %0d", a, j));
    end
    run_test(0);
    // the test results overwrote R0/R1: reload the checksum before the next test
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      idle_in(); ck_valid = 1; ck_clear = (a == 0);
      for (int j = 0; j < N; j++) ck_row[j] = W[a][j];
    end
    @(negedge clk); idle_in(); ck_commit = 1;
    run_test(5);
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
