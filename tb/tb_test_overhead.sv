// tb_test_overhead: cost of the testing mode on one tiled layer.
//
// The full-size platform (14 x 14 array, no parameter overrides) runs a
// fully connected layer with KB*N = 42 inputs and MB*N = 28 outputs on a
// batch of L = 30 vectors. The weight matrix is cut into KB x MB = 3 x 2
// tiles of 14 x 14. Each output block is an accumulation chain of KB
// read_weights / matrix_multiply pairs, the first overwriting the
// accumulators and the others adding to them, followed by a ReLU activate:
// 14 instructions, 6 of them multiplications. The layer runs three ways:
//   plain      - no multiplication tested;
//   full       - every multiplication tested;
//   first/last - only the first and last multiplication of the layer tested.
// The architecture charges 3 clock cycles for each tested multiplication,
// so the run times must differ by exactly 3 x 6 and 3 x 2 cycles. Every run
// must pass all its checks and match an integer reference of the layer. The
// layer shape is this testbench's own choice.
module tb_test_overhead;
  import repair_pkg::*;

  localparam int N   = 14;
  localparam int KB  = 3;
  localparam int MB  = 2;
  localparam int L   = 30;
  localparam int S   = 7;      // requantization shift
  localparam int OUT = 2000;   // unified-buffer row of the results

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst;
  logic              rp_reset, dpr_req, dpr_done, full_reboot_req;
  logic              wb_wr_en;
  logic [14:0]       wb_wr_addr;
  logic [7:0]        wb_wr_row [N];
  logic              ub_a_en, ub_a_we;
  logic [11:0]       ub_a_addr;
  logic [7:0]        ub_a_wdata [N], ub_a_rdata [N];
  logic              prog_we;
  logic [9:0]        prog_addr;
  instr_t            prog_instr;
  logic              prog_layer_start;
  logic [10:0]       prog_len;
  logic              full_test, start;
  logic              done, tpu_irq, tpu_alive;
  tpu_status_t       tpu_status;
  logic [10:0]       resume_pc;
  logic [7:0]        err_cnt;
  logic [15:0]       n_soft, n_dpr;
  logic              ecc_single, ecc_double;
  logic              wb_ecc_single, wb_ecc_double;

  repair_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic instr_t mk(input logic [7:0] op, input int len, input int acc, input int buf_a);
    instr_t t;
    t.op = op; t.calc_len = 32'(len); t.acc_addr = 16'(acc); t.buf_addr = 24'(buf_a);
    return t;
  endfunction

  task automatic do_reset();
    rst = 1; rp_reset = 0; dpr_done = 0; start = 0;
    wb_wr_en = 0; ub_a_en = 0; ub_a_we = 0; prog_we = 0;
    wb_wr_addr = '0; ub_a_addr = '0; prog_addr = '0; prog_instr = '0;
    prog_layer_start = 0; prog_len = '0;
    for (int j = 0; j < N; j++) begin wb_wr_row[j] = '0; ub_a_wdata[j] = '0; end
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
  endtask

  logic signed [7:0] X [KB][L][N];      // input block k, vector v
  logic signed [7:0] W [KB][MB][N][N];  // tile (k, m)
  logic signed [7:0] Y [MB][L][N];

  task automatic make_data();
    for (int k = 0; k < KB; k++)
      for (int v = 0; v < L; v++)
        for (int i = 0; i < N; i++) X[k][v][i] = 8'($urandom_range(0, 255));
    for (int k = 0; k < KB; k++)
      for (int m = 0; m < MB; m++)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) W[k][m][i][j] = 8'($urandom_range(0, 255));
    for (int m = 0; m < MB; m++)
      for (int v = 0; v < L; v++)
        for (int j = 0; j < N; j++) begin
          longint s;
          s = 0;
          for (int k = 0; k < KB; k++)
            for (int i = 0; i < N; i++) s += longint'(X[k][v][i]) * longint'(W[k][m][i][j]);
          s = s >>> S;
          Y[m][v][j] = (s < 0) ? 8'sd0 : (s > 127) ? 8'sd127 : 8'(s);
        end
  endtask

  // mode 0 plain, 1 every multiplication tested, 2 first and last tested
  task automatic load(input int mode);
    instr_t p [MB * (2 * KB + 1)];
    int n, mm, t;
    for (int k = 0; k < KB; k++)
      for (int m = 0; m < MB; m++)
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          wb_wr_en = 1; wb_wr_addr = 15'((k * MB + m) * N + i);
          for (int j = 0; j < N; j++) wb_wr_row[j] = W[k][m][i][j];
        end
    @(negedge clk) wb_wr_en = 0;
    for (int k = 0; k < KB; k++)
      for (int v = 0; v < L; v++) begin
        @(negedge clk);
        ub_a_en = 1; ub_a_we = 1; ub_a_addr = 12'(k * L + v);
        for (int i = 0; i < N; i++) ub_a_wdata[i] = X[k][v][i];
      end
    @(negedge clk) begin ub_a_en = 0; ub_a_we = 0; end
    n = 0;
    mm = 0;
    for (int m = 0; m < MB; m++) begin
      for (int k = 0; k < KB; k++) begin
        t = (mode == 1) || (mode == 2 && (mm == 0 || mm == KB * MB - 1));
        p[n] = mk(t ? OP_T_READ_W : OP_READ_W, N, 0, (k * MB + m) * N);
        n++;
        if (k == 0) p[n] = mk(t ? OP_T_MATMUL : OP_MATMUL, L, m * L, 0);
        else        p[n] = mk(t ? OP_T_MATMUL_ACC : OP_MATMUL_ACC, L, m * L, k * L);
        n++;
        mm++;
      end
      p[n] = mk(8'h80 | 8'(S << 2) | 8'(ACT_RELU), L, m * L, OUT + m * L);
      n++;
    end
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(k); prog_instr = p[k]; prog_layer_start = (k == 0);
    end
    @(negedge clk) prog_we = 0;
    prog_len = 11'(n);
  endtask

  int run_cycles;

  task automatic run_prog(output bit finished);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    run_cycles = 1;
    while (!done && !full_reboot_req && run_cycles < 20000) begin
      @(negedge clk);
      run_cycles++;
    end
    finished = done;
  endtask

  task automatic count_bad(output int bad);
    bad = 0;
    for (int m = 0; m < MB; m++)
      for (int v = 0; v < L; v++) begin
        @(negedge clk);
        ub_a_en = 1; ub_a_we = 0; ub_a_addr = 12'(OUT + m * L + v);
        @(negedge clk);
        ub_a_en = 0;
        #1;
        for (int j = 0; j < N; j++) if (ub_a_rdata[j] !== Y[m][v][j]) bad++;
      end
  endtask

  int n_pass;
  always @(posedge clk) if (!rst && dut.u_tpu.chk_pass) n_pass++;

  // no reconfiguration is expected; answer a request anyway so that a
  // failure shows up as a wrong count rather than a hang
  initial begin
    forever begin
      @(posedge clk);
      if (dpr_req && !rst) begin
        repeat (5) @(negedge clk);
        dpr_done = 1;
        @(negedge clk) dpr_done = 0;
      end
    end
  end

  bit fin;
  int bad;
  int cyc [3];
  int exp_pass [3] = '{0, KB * MB, 2};
  string name [3] = '{"plain", "full", "first/last"};

  initial begin
    full_test = 0;
    make_data();
    for (int mode = 0; mode < 3; mode++) begin
      do_reset();
      load(mode);
      n_pass = 0;
      run_prog(fin);
      cyc[mode] = run_cycles;
      check(fin && n_dpr == 0 && n_soft == 0,
            $sformatf("%s: finished without recovery (dpr %0d soft %0d)", name[mode], n_dpr, n_soft));
      check(n_pass == exp_pass[mode],
            $sformatf("%s: %0d passing checks, expected %0d", name[mode], n_pass, exp_pass[mode]));
      count_bad(bad);
      check(bad == 0, $sformatf("%s: %0d wrong output bytes", name[mode], bad));
      $display("%s: %0d cycles, %0d checks passed", name[mode], cyc[mode], n_pass);
    end
    check(cyc[1] - cyc[0] == 3 * KB * MB,
          $sformatf("full testing costs %0d cycles, expected %0d", cyc[1] - cyc[0], 3 * KB * MB));
    check(cyc[2] - cyc[0] == 3 * 2,
          $sformatf("first/last testing costs %0d cycles, expected 6", cyc[2] - cyc[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
