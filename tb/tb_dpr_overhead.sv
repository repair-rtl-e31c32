// tb_dpr_overhead: cost of re-executing a faulty instruction after a partial
// reconfiguration, as a function of the number of vectors it processes.
//
// The full-size platform (14 x 14 array, no parameter overrides) runs a
// one-layer program: t_read_weight, t_matrix_multiply of L vectors, and a
// ReLU activate. L sweeps 14, 28, ... 112, i.e. operands from the array's
// own size up to eight times larger. Each size runs twice: once fault free,
// and once with a stuck partial-sum bit injected while the multiplication
// runs. A model of the reconfiguration controller answers dpr_req and clears
// the fault.
//
// The extra time is the faulty run's length minus the fault-free run's
// length, minus the recovery window. The window runs from the interrupt to
// the accelerator being alive again and the request being withdrawn; it is
// dominated by the device's reconfiguration time, which this model does not
// know. At a 100 MHz clock the architecture keeps the re-execution cost below
// 2 us, so the check is: extra cycles < 200 for every size. The extra time
// must also grow with L, stay at least L (the vectors are issued again), and
// the faulty run must give the same output as the fault-free one.
module tb_dpr_overhead;
  import repair_pkg::*;

  localparam int N     = 14;
  localparam int LMAX  = 8 * N;
  localparam int S     = 6;     // requantization shift
  localparam int OUT   = 1000;  // unified-buffer row of the results
  localparam int BOUND = 200;   // 2 us at 100 MHz

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

  logic signed [7:0] X [LMAX][N];
  logic signed [7:0] W [N][N];
  logic signed [7:0] Y [LMAX][N];
  bit fault_on;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic make_data();
    for (int v = 0; v < LMAX; v++)
      for (int i = 0; i < N; i++) X[v][i] = 8'($urandom_range(0, 255));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) W[i][j] = 8'($urandom_range(0, 255));
    for (int v = 0; v < LMAX; v++)
      for (int j = 0; j < N; j++) begin
        longint s;
        s = 0;
        for (int i = 0; i < N; i++) s += longint'(X[v][i]) * longint'(W[i][j]);
        s = s >>> S;
        Y[v][j] = (s < 0) ? 8'sd0 : (s > 127) ? 8'sd127 : 8'(s);
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

  task automatic load(input int len);
    instr_t p [3];
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wb_wr_en = 1; wb_wr_addr = 15'(i);
      for (int j = 0; j < N; j++) wb_wr_row[j] = W[i][j];
    end
    @(negedge clk) wb_wr_en = 0;
    for (int v = 0; v < len; v++) begin
      @(negedge clk);
      ub_a_en = 1; ub_a_we = 1; ub_a_addr = 12'(v);
      for (int i = 0; i < N; i++) ub_a_wdata[i] = X[v][i];
    end
    @(negedge clk) begin ub_a_en = 0; ub_a_we = 0; end
    p[0] = mk(OP_T_READ_W, N, 0, 0);
    p[1] = mk(OP_T_MATMUL, len, 0, 0);
    p[2] = mk(8'h80 | 8'(S << 2) | 8'(ACT_RELU), len, 0, OUT);
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(k); prog_instr = p[k]; prog_layer_start = (k == 0);
    end
    @(negedge clk) prog_we = 0;
    prog_len = 11'd3;
  endtask

  // cycles from start to done, and cycles spent in the recovery window
  int run_cycles, win_cycles;

  task automatic run_prog(output bit finished);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    run_cycles = 1;
    win_cycles = 0;
    while (!done && !full_reboot_req && run_cycles < 20000) begin
      if (tpu_irq || dpr_req || rp_reset || !tpu_alive) win_cycles++;
      @(negedge clk);
      run_cycles++;
    end
    finished = done;
  endtask

  task automatic count_bad(input int len, output int bad);
    bad = 0;
    for (int v = 0; v < len; v++) begin
      @(negedge clk);
      ub_a_en = 1; ub_a_we = 0; ub_a_addr = 12'(OUT + v);
      @(negedge clk);
      ub_a_en = 0;
      #1;
      for (int j = 0; j < N; j++) if (ub_a_rdata[j] !== Y[v][j]) bad++;
    end
  endtask

  // reconfiguration controller model: holds the partition in reset, which
  // also clears the injected fault, then answers dpr_done
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
  int bad, t_clean, t_fault, extra, prev_extra;

  initial begin
    fault_on = 0;
    full_test = 1;
    prev_extra = 0;
    make_data();
    for (int k = 1; k <= 8; k++) begin
      int len;
      len = k * N;
      // fault free
      do_reset(); load(len); run_prog(fin);
      t_clean = run_cycles;
      check(fin && n_dpr == 0, $sformatf("L=%0d: fault-free run finished cleanly", len));
      count_bad(len, bad);
      check(bad == 0, $sformatf("L=%0d fault free: %0d wrong bytes", len, bad));
      // stuck partial-sum bit during the multiplication
      do_reset(); load(len);
      fork
        run_prog(fin);
        begin
          wait (dut.u_tpu.u_ctrl.seq_next == 32'd2);
          force dut.u_tpu.u_sa.g_row[5].g_col[3].u_pe.psum_out[4] = 1'b1;
          fault_on = 1;
        end
      join
      t_fault = run_cycles;
      check(fin && n_dpr == 1 && resume_pc == 11'd0,
            $sformatf("L=%0d: one reconfiguration, resumed at 0 (dpr %0d pc %0d)", len, n_dpr, resume_pc));
      count_bad(len, bad);
      check(bad == 0, $sformatf("L=%0d after recovery: %0d wrong bytes", len, bad));
      extra = t_fault - t_clean - win_cycles;
      $display("L=%0d vectors: fault free %0d cycles, with fault %0d, recovery window %0d, re-execution %0d cycles (%0d ns at 100 MHz)",
               len, t_clean, t_fault, win_cycles, extra, extra * 10);
      check(extra < BOUND, $sformatf("L=%0d: re-execution %0d cycles, bound %0d", len, extra, BOUND));
      check(extra >= len, $sformatf("L=%0d: re-execution %0d cycles covers the vectors", len, extra));
      check(extra > prev_extra, $sformatf("L=%0d: re-execution grows with the vector count", len));
      prev_extra = extra;
    end
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
