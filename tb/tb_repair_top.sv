// tb_repair_top: end-to-end test of the platform at its default size
// (14 x 14 array). A two-layer network runs as an 8-instruction program:
//   0 t_read_weight W1            (layer 1 start)
//   1 t_matrix_multiply X -> acc
//   2 activate ReLU -> UB[100..]
//   3 t_read_weight W2a           (layer 2 start; plain read_weights in the
//   4 t_matrix_multiply UB[100..]  layer-policy run, with a plain matmul)
//   5 t_read_weight W2b
//   6 t_matrix_multiply, accumulating (tiling)
//   7 activate Sigmoid -> UB[200..]
// The result is compared with a reference computed here in plain integer
// arithmetic. Scenarios: fault free; stuck bit in an array partial sum
// (repaired by partial reconfiguration, resume from instruction 3); the same
// with the layer policy; weight-register bit-flip (soft error, reloaded
// without reconfiguration); stuck accumulator bit; a fault that survives
// reconfiguration (three failed repairs, then full reboot, then a cold start
// that succeeds); single-bit upsets in the unified and weight buffers (ECC).
// A simple model of the reconfiguration controller answers dpr_req: it holds the
// partition in reset, "repairs" the injected fault unless told not to, and
// answers dpr_done. Every mechanism is counted and must occur.
module tb_repair_top;
  import repair_pkg::*;

  localparam int N  = 14;
  localparam int L  = 20;
  localparam int S1 = 6;   // ReLU requantization shift
  localparam int S2 = 8;   // Sigmoid requantization shift

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
  int cnt_pass = 0, cnt_soft = 0, cnt_dpr = 0, cnt_reboot = 0, cnt_ecc = 0;
  int cnt_simd = 0, cnt_tiling = 0, cnt_plain = 0, cnt_layer_resume = 0, cnt_acc_diag = 0;
  int cnt_sa_diag = 0, cnt_w_diag = 0, cnt_wb_ecc = 0;

  logic signed [7:0] X   [L][N];
  logic signed [7:0] W1  [N][N];
  logic signed [7:0] W2a [N][N];
  logic signed [7:0] W2b [N][N];
  logic signed [7:0] Y1  [L][N];
  logic        [7:0] Y2  [L][N];

  bit repair_on_dpr;
  bit fault_sa, fault_acc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- reference
  function automatic logic signed [7:0] sat8(input longint v);
    if (v > 127) return 8'sd127;
    if (v < -128) return -8'sd128;
    return 8'(v);
  endfunction

  function automatic logic [7:0] sigm(input longint x);
    longint u, y;
    u = (x < 0) ? -x : x;
    if (u >= 80)      y = 128;
    else if (u >= 38) y = u / 4 + 108;
    else if (u >= 16) y = u + 80;
    else              y = 2 * u + 64;
    if (x < 0) y = 128 - y;
    if (y > 127) y = 127;
    return 8'(y);
  endfunction

  task automatic make_data();
    for (int v = 0; v < L; v++)
      for (int i = 0; i < N; i++) X[v][i] = 8'($urandom_range(0, 255));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        W1[i][j]  = 8'($urandom_range(0, 255));
        W2a[i][j] = 8'($urandom_range(0, 255));
        W2b[i][j] = 8'($urandom_range(0, 255));
      end
    for (int v = 0; v < L; v++)
      for (int j = 0; j < N; j++) begin
        longint s = 0;
        for (int i = 0; i < N; i++) s += longint'(X[v][i]) * longint'(W1[i][j]);
        s = s >>> S1;
        Y1[v][j] = (s < 0) ? 8'sd0 : sat8(s);
      end
    for (int v = 0; v < L; v++)
      for (int j = 0; j < N; j++) begin
        longint s = 0;
        for (int i = 0; i < N; i++)
          s += longint'(Y1[v][i]) * (longint'(W2a[i][j]) + longint'(W2b[i][j]));
        Y2[v][j] = sigm(s >>> S2);
      end
  endtask

  // ---------------------------------------------------------- host side
  function automatic instr_t mk(input logic [7:0] op, input int len, input int acc, input int buf_a);
    instr_t t;
    t.op = op; t.calc_len = 32'(len); t.acc_addr = 16'(acc); t.buf_addr = 24'(buf_a);
    return t;
  endfunction

  task automatic load_all(input bit plain_mid);
    instr_t p [8];
    bit     ls [8];
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wb_wr_en = 1;
      wb_wr_addr = 15'(i);        for (int j = 0; j < N; j++) wb_wr_row[j] = W1[i][j];
      @(negedge clk);
      wb_wr_addr = 15'(N + i);    for (int j = 0; j < N; j++) wb_wr_row[j] = W2a[i][j];
      @(negedge clk);
      wb_wr_addr = 15'(2 * N + i); for (int j = 0; j < N; j++) wb_wr_row[j] = W2b[i][j];
    end
    @(negedge clk) wb_wr_en = 0;
    for (int v = 0; v < L; v++) begin
      @(negedge clk);
      ub_a_en = 1; ub_a_we = 1; ub_a_addr = 12'(v);
      for (int i = 0; i < N; i++) ub_a_wdata[i] = X[v][i];
    end
    @(negedge clk) begin ub_a_en = 0; ub_a_we = 0; end
    p[0] = mk(OP_T_READ_W, N, 0, 0);                              ls[0] = 1;
    p[1] = mk(OP_T_MATMUL, L, 0, 0);                              ls[1] = 0;
    p[2] = mk(8'h80 | 8'(S1 << 2) | 8'(ACT_RELU), L, 0, 100);     ls[2] = 0;
    p[3] = mk(plain_mid ? OP_READ_W : OP_T_READ_W, N, 0, N);      ls[3] = 1;
    p[4] = mk(plain_mid ? OP_MATMUL : OP_T_MATMUL, L, 0, 100);    ls[4] = 0;
    p[5] = mk(OP_T_READ_W, N, 0, 2 * N);                          ls[5] = 0;
    p[6] = mk(OP_T_MATMUL_ACC, L, 0, 100);                        ls[6] = 0;
    p[7] = mk(8'h80 | 8'(S2 << 2) | 8'(ACT_SIGMOID), L, 0, 200);  ls[7] = 0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(k); prog_instr = p[k]; prog_layer_start = ls[k];
    end
    @(negedge clk) prog_we = 0;
    prog_len = 11'd8;
  endtask

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

  task automatic run_prog(output bit finished);
    int t = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done && !full_reboot_req && t < 20000) begin
      @(negedge clk);
      t++;
    end
    finished = done;
  endtask

  task automatic check_result(input string tag);
    int bad = 0;
    for (int v = 0; v < L; v++) begin
      @(negedge clk);
      ub_a_en = 1; ub_a_we = 0; ub_a_addr = 12'(200 + v);
      @(negedge clk);
      ub_a_en = 0;
      #1;
      for (int j = 0; j < N; j++) if (ub_a_rdata[j] !== Y2[v][j]) bad++;
    end
    for (int v = 0; v < L; v++) begin
      @(negedge clk);
      ub_a_en = 1; ub_a_we = 0; ub_a_addr = 12'(100 + v);
      @(negedge clk);
      ub_a_en = 0;
      #1;
      for (int j = 0; j < N; j++) if (ub_a_rdata[j] !== Y1[v][j]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong output bytes", tag, bad));
  endtask

  // ---------------------------------------------------------- DFX model
  initial begin
    forever begin
      @(posedge clk);
      if (dpr_req && !rst) begin
        repeat (20) @(negedge clk);
        rp_reset = 1;
        if (repair_on_dpr) begin
          if (fault_sa)  release dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out;
          if (fault_acc) release dut.u_tpu.u_acc.g_col[2].u_add.sum;
          fault_sa = 0; fault_acc = 0;
        end
        repeat (10) @(negedge clk);
        rp_reset = 0;
        dpr_done = 1;
        @(negedge clk) dpr_done = 0;
        while (dpr_req) @(negedge clk);
      end
    end
  end

  // ---------------------------------------------------------- monitors
  logic       pop_q, irq_q = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_tpu.u_acc.ck_valid && dut.u_tpu.u_acc.res_valid &&
        dut.u_tpu.u_acc.res_kind == VK_DATA) cnt_simd++;
    if (dut.u_tpu.u_acc.res_valid && dut.u_tpu.u_acc.res_accum &&
        dut.u_tpu.u_acc.res_kind == VK_DATA) cnt_tiling++;
    if (dut.u_tpu.chk_pass) cnt_pass++;
    if (ecc_single) cnt_ecc++;
    if (wb_ecc_single) cnt_wb_ecc++;
    if (tpu_irq && !irq_q) begin
      if (tpu_status.diag == DIAG_SA)     cnt_sa_diag++;
      if (tpu_status.diag == DIAG_ACC)    cnt_acc_diag++;
      if (tpu_status.diag == DIAG_WEIGHT) cnt_w_diag++;
    end
    if (tpu_irq && !irq_q) $display("%0t irq diag=%0d mask=%h seq=%0d base=%0d", $time, tpu_status.diag, tpu_status.col_mask, tpu_status.instr_seq, dut.u_rec.base_pc);
    irq_q <= tpu_irq;
    if (dut.u_tpu.u_ctrl.fifo_pop && dut.u_tpu.u_ctrl.fifo_dout.op == OP_MATMUL) cnt_plain++;
  end

  // ---------------------------------------------------------- scenarios
  bit fin;
  logic flip_bit;

  initial begin
    repair_on_dpr = 1; fault_sa = 0; fault_acc = 0;
    full_test = 1;
    make_data();

    // 1. fault free
    do_reset(); load_all(0); run_prog(fin);
    check(fin, "fault-free run finished");
    check(n_dpr == 0 && n_soft == 0, "fault-free run needed no recovery");
    check_result("fault free");

    // 2. stuck partial-sum bit in column 3, injected during layer 2
    do_reset(); load_all(0);
    fork
      run_prog(fin);
      begin
        wait (dut.u_tpu.u_ctrl.seq_next == 32'd5);
        force dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out[4] = 1'b1;
        fault_sa = 1;
      end
    join
    check(fin, "array fault: run finished");
    check(n_dpr == 1, $sformatf("array fault: one reconfiguration (%0d)", n_dpr));
    check(resume_pc == 11'd3, $sformatf("array fault: resumed at 3 (%0d)", resume_pc));
    if (n_dpr == 1) cnt_dpr++;
    check_result("array fault");

    // 3. same fault, layer policy (only first and last matmul of layer 2 tested)
    full_test = 0;
    do_reset(); load_all(1);
    fork
      run_prog(fin);
      begin
        wait (dut.u_tpu.u_ctrl.seq_next == 32'd6);
        force dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out[4] = 1'b1;
        fault_sa = 1;
      end
    join
    check(fin, "layer policy: run finished");
    check(n_dpr == 1 && resume_pc == 11'd3,
          $sformatf("layer policy: resumed at layer start (dpr %0d pc %0d)", n_dpr, resume_pc));
    if (n_dpr == 1 && resume_pc == 11'd3) cnt_layer_resume++;
    check_result("layer policy");
    full_test = 1;

    // 4. weight register bit-flip after the weights were checked-in
    do_reset(); load_all(0);
    fork
      run_prog(fin);
      begin
        wait (dut.u_tpu.u_ctrl.seq_next == 32'd2);
        @(negedge clk);
        flip_bit = ~dut.u_tpu.u_sa.g_row[2].g_col[7].u_pe.w_active[3];
        force dut.u_tpu.u_sa.g_row[2].g_col[7].u_pe.w_active[3] = flip_bit;
        wait (tpu_irq);
        release dut.u_tpu.u_sa.g_row[2].g_col[7].u_pe.w_active;
      end
    join
    check(fin, "weight flip: run finished");
    check(n_soft == 1 && n_dpr == 0,
          $sformatf("weight flip: repaired by reload (soft %0d dpr %0d)", n_soft, n_dpr));
    if (n_soft == 1) cnt_soft++;
    check_result("weight flip");

    // 5. stuck accumulator bit in column 2
    do_reset(); load_all(0);
    fork
      run_prog(fin);
      begin
        wait (dut.u_tpu.u_ctrl.seq_next == 32'd1);
        force dut.u_tpu.u_acc.g_col[2].u_add.sum[3] = 1'b0;
        fault_acc = 1;
      end
    join
    check(fin, "accumulator fault: run finished");
    check(n_dpr == 1, "accumulator fault: one reconfiguration");
    check_result("accumulator fault");

    // 6. fault that reconfiguration does not cure -> full reboot
    repair_on_dpr = 0;
    do_reset(); load_all(0);
    force dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out[4] = 1'b1;
    fault_sa = 1;
    run_prog(fin);
    check(!fin && full_reboot_req, "persistent fault: full reboot requested");
    check(n_dpr == 16'(MAXE + 1), $sformatf("persistent fault: %0d reconfigurations", n_dpr));
    if (full_reboot_req) cnt_reboot++;
    release dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out;
    fault_sa = 0;
    repair_on_dpr = 1;
    // cold start after the reboot
    do_reset(); load_all(0); run_prog(fin);
    check(fin, "cold start after reboot finished");
    check_result("cold start");

    // 7. single-bit upsets in the unified buffer input data and in a weight
    do_reset(); load_all(0);
    dut.u_ub.mem[5][17] = ~dut.u_ub.mem[5][17];
    dut.u_wb.mem[N + 2][40] = ~dut.u_wb.mem[N + 2][40];
    run_prog(fin);
    check(fin, "ECC run finished");
    check_result("ECC");

    // mechanisms
    check(cnt_pass > 0,   "test-mode check passed at least once");
    check(cnt_soft > 0,   "soft-error recovery happened");
    check(cnt_dpr > 0,    "partial reconfiguration happened");
    check(cnt_layer_resume > 0, "layer-start resume happened");
    check(cnt_reboot > 0, "full reboot requested");
    check(cnt_ecc > 0,    "ECC corrected a bit");
    check(cnt_wb_ecc > 0, "weight-buffer ECC corrected a bit");
    check(cnt_simd > 0,   "checksum and data lanes added in the same cycle");
    check(cnt_tiling > 0, "accumulating (tiling) matmul happened");
    check(cnt_plain > 0,  "plain-mode matmul happened");
    check(cnt_sa_diag > 0,  "array fault diagnosed");
    check(cnt_acc_diag > 0, "accumulator fault diagnosed");
    check(cnt_w_diag > 0,   "weight bit-flip diagnosed");
    $display("mechanisms: pass=%0d soft=%0d dpr=%0d layer=%0d reboot=%0d ecc ub/wb=%0d/%0d simd=%0d tiling=%0d plain=%0d diag sa/acc/w=%0d/%0d/%0d",
             cnt_pass, cnt_soft, cnt_dpr, cnt_layer_resume, cnt_reboot, cnt_ecc, cnt_wb_ecc, cnt_simd,
             cnt_tiling, cnt_plain, cnt_sa_diag, cnt_acc_diag, cnt_w_diag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MAXE = 2;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
