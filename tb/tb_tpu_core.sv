// tb_tpu_core: the accelerator with behavioural weight and unified buffers.
// Runs plain and testing-mode weight loads and multiplications on random
// data, checks the accumulator contents against a reference product
// (overwrite and accumulate), the activate path into the unified buffer,
// that the testing variant costs exactly 3 more issue cycles than the plain
// one, the pass pulse of a clean check, and that a stuck partial-sum bit
// raises irq with the right diagnosis, column and instruction index, flushes
// the queued instructions, and that irq_clear restarts the numbering and
// execution.
module tb_tpu_core;
  import repair_pkg::*;
  localparam int N = 14;
  localparam int L = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, run, irq_clear, instr_push, instr_full, wb_rd_en, ub_en, ub_we;
  logic irq, chk_pass, alive, idle;
  instr_t instr_din;
  logic [23:0] wb_rd_addr, ub_addr;
  logic [7:0] wb_rd_row [N], ub_wdata [N], ub_rdata [N];
  tpu_status_t status;
  int checks = 0, failures = 0;

  tpu_core dut (.*);

  // behavioural buffers, one-cycle read latency
  logic [7:0] wbm [64][N];
  logic [7:0] ubm [256][N];
  always @(posedge clk) begin
    if (wb_rd_en) wb_rd_row <= wbm[wb_rd_addr[5:0]];
    if (ub_en && ub_we) ubm[ub_addr[7:0]] <= ub_wdata;
    if (ub_en && !ub_we) ub_rdata <= ubm[ub_addr[7:0]];
  end

  logic signed [7:0] W [2][N][N];
  logic signed [7:0] X [L][N];
  int n_pass = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (chk_pass) n_pass++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic instr_t mk(input logic [7:0] op, input int len, input int acc, input int b);
    instr_t t;
    t.op = op; t.calc_len = 32'(len); t.acc_addr = 16'(acc); t.buf_addr = 24'(b);
    return t;
  endfunction

  task automatic push(input instr_t t);
    @(negedge clk);
    while (instr_full) @(negedge clk);
    instr_push = 1; instr_din = t;
    @(negedge clk);
    instr_push = 0;
  endtask

  task automatic wait_idle();
    int t = 0;
    @(negedge clk);
    while (!idle && !irq && t < 5000) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
  endtask

  // accumulator rows acc0.. must hold X * (W[a] (+ W[b] if both))
  task automatic check_acc(input int acc0, input bit two, input string tag);
    int bad = 0;
    longint e;
    for (int v = 0; v < L; v++)
      for (int j = 0; j < N; j++) begin
        e = 0;
        for (int i = 0; i < N; i++)
          e += longint'(X[v][i]) * (longint'(W[0][i][j]) + (two ? longint'(W[1][i][j]) : 0));
        if (dut.u_acc.mem[acc0 + v][j] != 32'(e)) bad++;
      end
    chk(bad == 0, $sformatf("%s: %0d wrong accumulator values", tag, bad));
  endtask

  // issue cycles of one matmul: from its first input vector to the next pop
  task automatic time_matmul(input logic [7:0] rw, input logic [7:0] mm, output int cycles);
    int t0;
    push(mk(rw, N, 0, 0));
    push(mk(mm, L, 0, 0));
    push(mk(OP_NOP, 0, 0, 0));
    wait (dut.u_ctrl.state == dut.u_ctrl.S_MM_RUN);
    t0 = cyc;
    wait (dut.fifo_pop);
    cycles = cyc - t0;
    wait_idle();
  endtask

  int c_plain, c_test;

  initial begin
    rst = 1; run = 0; irq_clear = 0; instr_push = 0; instr_din = '0;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          W[k][i][j] = 8'($urandom);
          wbm[k * N + i][j] = W[k][i][j];
        end
    for (int v = 0; v < L; v++)
      for (int i = 0; i < N; i++) begin
        X[v][i] = 8'($urandom);
        ubm[v][i] = X[v][i];
      end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(alive, "alive after reset");
    run = 1;

    time_matmul(OP_READ_W, OP_MATMUL, c_plain);
    check_acc(0, 0, "plain matmul");
    time_matmul(OP_T_READ_W, OP_T_MATMUL, c_test);
    check_acc(0, 0, "testing matmul");
    chk(c_test - c_plain == 3, $sformatf("testing mode costs 3 cycles (%0d vs %0d)", c_test, c_plain));
    chk(n_pass == 1, $sformatf("one passing check (%0d)", n_pass));

    // tiling: second weight set accumulated onto rows 32..
    push(mk(OP_T_READ_W, N, 0, 0));
    push(mk(OP_T_MATMUL, L, 32, 0));
    push(mk(OP_T_READ_W, N, 0, N));
    push(mk(OP_T_MATMUL_ACC, L, 32, 0));
    wait_idle();
    check_acc(32, 1, "accumulating matmul");
    chk(n_pass == 3, "two more passing checks");

    // activate: accumulator rows 0.. (X*W0) >>> 10, no function -> UB 100..
    push(mk(8'h80 | 8'(10 << 2) | 8'(ACT_NONE), L, 0, 100));
    wait_idle();
    begin
      int bad = 0;
      longint e;
      for (int v = 0; v < L; v++)
        for (int j = 0; j < N; j++) begin
          e = 0;
          for (int i = 0; i < N; i++) e += longint'(X[v][i]) * longint'(W[0][i][j]);
          e = e >>> 10;
          if (e > 127) e = 127;
          if (e < -128) e = -128;
          if (ubm[100 + v][j] != 8'(e)) bad++;
        end
      chk(bad == 0, $sformatf("activate wrote %0d wrong bytes", bad));
    end

    // structural fault: stuck partial-sum bit in column 9
    force dut.u_sa.g_row[7].g_col[9].u_pe.psum_out[2] = 1'b1;
    // 11 instructions so far (indices 0..10)
    push(mk(OP_T_READ_W, N, 0, 0));       // 11
    push(mk(OP_T_MATMUL, L, 0, 0));       // 12  fails
    push(mk(OP_T_READ_W, N, 0, N));       // 13
    push(mk(OP_T_MATMUL, L, 64, 0));      // 14
    push(mk(OP_T_READ_W, N, 0, 0));       // 15
    push(mk(OP_T_MATMUL, L, 96, 0));      // 16
    wait (irq);
    @(negedge clk);
    chk(status.diag == DIAG_SA, $sformatf("diag SA (%0d)", status.diag));
    chk(status.col_mask == 16'h0200, $sformatf("column 9 (%h)", status.col_mask));
    chk(status.instr_seq == 12, $sformatf("failed instruction 12 (%0d)", status.instr_seq));
    repeat (200) @(negedge clk);
    chk(dut.u_fifo.empty, "queue flushed");
    chk(dut.u_ctrl.state == dut.u_ctrl.S_HALT, "halted");
    release dut.u_sa.g_row[7].g_col[9].u_pe.psum_out;
    irq_clear = 1;
    @(negedge clk);
    irq_clear = 0;
    @(negedge clk);
    chk(!irq, "irq cleared");
    chk(dut.u_ctrl.seq_next == 0, "numbering restarted");
    push(mk(OP_T_READ_W, N, 0, 0));
    push(mk(OP_T_MATMUL, L, 0, 0));
    wait_idle();
    check_acc(0, 0, "after clear");
    chk(!irq, "no error after the fault is removed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
