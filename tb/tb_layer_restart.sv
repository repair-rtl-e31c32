// tb_layer_restart: cost of a fault in each layer of a small network when
// only the first and last multiplication of every layer is tested.
//
// The full-size platform (14 x 14 array, no parameter overrides) runs a
// three-layer fully connected network on L = 20 vectors: 14 -> 42 -> 42 -> 14
// features, i.e. 3, 9 and 3 tile multiplications, so the middle layer is the
// most expensive one. Each layer's output blocks are accumulation chains
// over its input blocks followed by a ReLU activate. Only the first and the
// last multiplication of each layer run in testing mode, so an error found
// at the end of a layer sends execution back to the layer's first
// instruction.
//
// For each layer k a stuck partial-sum bit is injected just before the
// layer's last (tested) multiplication and removed by the reconfiguration
// model. The testbench checks that execution resumed at the first
// instruction of layer k, that the output is right, and compares the work
// redone (run time minus fault-free run time minus the recovery window) with
// what a full device reboot would redo: everything from the start of the
// program to the end of layer k. The redone work must match layer k's own
// time, plus the few cycles that ran while the failed check drained through
// the array (under 4N). For the first layer that is all a reboot would redo
// too; for later layers the partial reconfiguration redoes much less, and a
// fault in the largest (middle) layer costs most. The network shape is this testbench's
// own choice.
module tb_layer_restart;
  import repair_pkg::*;

  localparam int N    = 14;
  localparam int L    = 20;
  localparam int NL   = 3;
  localparam int S    = 7;
  localparam int KBS [NL] = '{1, 3, 3};   // input blocks per layer
  localparam int MBS [NL] = '{3, 3, 1};   // output blocks per layer
  localparam int BASE [NL + 1] = '{0, 100, 200, 300};  // unified-buffer rows

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

  // activations per layer boundary: A[l][block][v][i], l = 0 is the input
  logic signed [7:0] A [NL + 1][3][L][N];
  logic signed [7:0] W [NL][3][3][N][N];   // tile (layer, k, m)

  task automatic make_data();
    for (int b = 0; b < KBS[0]; b++)
      for (int v = 0; v < L; v++)
        for (int i = 0; i < N; i++) A[0][b][v][i] = 8'($urandom_range(0, 255));
    for (int l = 0; l < NL; l++)
      for (int k = 0; k < KBS[l]; k++)
        for (int m = 0; m < MBS[l]; m++)
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) W[l][k][m][i][j] = 8'($urandom_range(0, 255));
    for (int l = 0; l < NL; l++)
      for (int m = 0; m < MBS[l]; m++)
        for (int v = 0; v < L; v++)
          for (int j = 0; j < N; j++) begin
            longint s;
            s = 0;
            for (int k = 0; k < KBS[l]; k++)
              for (int i = 0; i < N; i++) s += longint'(A[l][k][v][i]) * longint'(W[l][k][m][i][j]);
            s = s >>> S;
            A[l + 1][m][v][j] = (s < 0) ? 8'sd0 : (s > 127) ? 8'sd127 : 8'(s);
          end
  endtask

  int lstart [NL + 1];    // program index of each layer's first instruction
  int last_rw [NL];       // program index of each layer's last read_weights

  task automatic load();
    instr_t p [64];
    bit     ls [64];
    int n, row, mm, nmm, t;
    row = 0;
    for (int l = 0; l < NL; l++)
      for (int k = 0; k < KBS[l]; k++)
        for (int m = 0; m < MBS[l]; m++)
          for (int i = 0; i < N; i++) begin
            @(negedge clk);
            wb_wr_en = 1; wb_wr_addr = 15'(row);
            for (int j = 0; j < N; j++) wb_wr_row[j] = W[l][k][m][i][j];
            row++;
          end
    @(negedge clk) wb_wr_en = 0;
    for (int b = 0; b < KBS[0]; b++)
      for (int v = 0; v < L; v++) begin
        @(negedge clk);
        ub_a_en = 1; ub_a_we = 1; ub_a_addr = 12'(BASE[0] + b * L + v);
        for (int i = 0; i < N; i++) ub_a_wdata[i] = A[0][b][v][i];
      end
    @(negedge clk) begin ub_a_en = 0; ub_a_we = 0; end
    n = 0;
    row = 0;
    for (int l = 0; l < NL; l++) begin
      lstart[l] = n;
      mm = 0;
      nmm = KBS[l] * MBS[l];
      for (int m = 0; m < MBS[l]; m++) begin
        for (int k = 0; k < KBS[l]; k++) begin
          t = (mm == 0 || mm == nmm - 1);
          if (mm == nmm - 1) last_rw[l] = n;
          // tile (l, k, m) sits at weight rows ordered by layer, k, m
          row = 0;
          for (int l2 = 0; l2 < l; l2++) row += KBS[l2] * MBS[l2];
          row = (row + k * MBS[l] + m) * N;
          p[n] = mk(t ? OP_T_READ_W : OP_READ_W, N, 0, row);
          ls[n] = (n == lstart[l]);
          n++;
          if (k == 0) p[n] = mk(t ? OP_T_MATMUL : OP_MATMUL, L, m * L, BASE[l]);
          else        p[n] = mk(t ? OP_T_MATMUL_ACC : OP_MATMUL_ACC, L, m * L, BASE[l] + k * L);
          ls[n] = 0;
          n++;
          mm++;
        end
        p[n] = mk(8'h80 | 8'(S << 2) | 8'(ACT_RELU), L, m * L, BASE[l + 1] + m * L);
        ls[n] = 0;
        n++;
      end
    end
    lstart[NL] = n;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(k); prog_instr = p[k]; prog_layer_start = ls[k];
    end
    @(negedge clk) prog_we = 0;
    prog_len = 11'(n);
  endtask

  int run_cycles, win_cycles;
  int t_layer_end [NL];

  task automatic run_prog(output bit finished);
    int l;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    run_cycles = 1;
    win_cycles = 0;
    l = 0;
    while (!done && !full_reboot_req && run_cycles < 50000) begin
      if (tpu_irq || dpr_req || rp_reset || !tpu_alive) win_cycles++;
      if (l < NL - 1 && n_dpr == 0 && dut.u_tpu.u_ctrl.seq_next == 32'(lstart[l + 1])) begin
        t_layer_end[l] = run_cycles;
        l++;
      end
      @(negedge clk);
      run_cycles++;
    end
    t_layer_end[NL - 1] = run_cycles;
    finished = done;
  endtask

  task automatic count_bad(output int bad);
    bad = 0;
    for (int m = 0; m < MBS[NL - 1]; m++)
      for (int v = 0; v < L; v++) begin
        @(negedge clk);
        ub_a_en = 1; ub_a_we = 0; ub_a_addr = 12'(BASE[NL] + m * L + v);
        @(negedge clk);
        ub_a_en = 0;
        #1;
        for (int j = 0; j < N; j++) if (ub_a_rdata[j] !== A[NL][m][v][j]) bad++;
      end
  endtask

  bit fault_on;

  initial begin
    forever begin
      @(posedge clk);
      if (dpr_req && !rst) begin
        repeat (20) @(negedge clk);
        rp_reset = 1;
        if (fault_on) release dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out;
        fault_on = 0;
        repeat (10) @(negedge clk);
        rp_reset = 0;
        dpr_done = 1;
        @(negedge clk) dpr_done = 0;
        while (dpr_req) @(negedge clk);
      end
    end
  end

  bit fin;
  int bad, t_clean, extra, reboot_cost, layer_cost, max_extra, max_layer;
  int clean_end [NL];

  initial begin
    fault_on = 0;
    full_test = 0;
    max_extra = 0;
    max_layer = -1;
    make_data();
    do_reset(); load(); run_prog(fin);
    t_clean = run_cycles;
    clean_end = t_layer_end;
    check(fin && n_dpr == 0, "fault-free run finished without recovery");
    count_bad(bad);
    check(bad == 0, $sformatf("fault free: %0d wrong bytes", bad));
    $display("fault free: %0d cycles, layers end at %0d / %0d / %0d",
             t_clean, clean_end[0], clean_end[1], clean_end[2]);
    for (int k = 0; k < NL; k++) begin
      do_reset(); load();
      fork
        run_prog(fin);
        begin
          wait (dut.u_tpu.u_ctrl.seq_next == 32'(last_rw[k] + 1));
          force dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out[4] = 1'b1;
          fault_on = 1;
        end
      join
      check(fin && n_dpr == 1, $sformatf("layer %0d: one reconfiguration (%0d)", k + 1, n_dpr));
      check(resume_pc == 11'(lstart[k]),
            $sformatf("layer %0d: resumed at %0d, layer starts at %0d", k + 1, resume_pc, lstart[k]));
      count_bad(bad);
      check(bad == 0, $sformatf("layer %0d: %0d wrong bytes after recovery", k + 1, bad));
      extra = run_cycles - t_clean - win_cycles;
      reboot_cost = clean_end[k];
      layer_cost = clean_end[k] - ((k == 0) ? 0 : clean_end[k - 1]);
      $display("fault in layer %0d: redone %0d cycles; the layer alone takes %0d; a full reboot would redo %0d",
               k + 1, extra, layer_cost, reboot_cost);
      // the redone work is this layer, plus what ran while the failed check
      // drained through the array (under 4N cycles), not more
      check(extra <= layer_cost + 4 * N && extra >= layer_cost / 2,
            $sformatf("layer %0d: redone work %0d matches the layer (%0d)", k + 1, extra, layer_cost));
      if (k > 0)
        check(extra < reboot_cost - clean_end[0] / 2,
              $sformatf("layer %0d: partial reconfiguration redoes less than a reboot", k + 1));
      if (extra > max_extra) begin max_extra = extra; max_layer = k; end
    end
    check(max_layer == 1, "a fault in the most complex (second) layer costs most");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
