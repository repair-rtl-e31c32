// tb_tpu_control: the sequencer alone, with a queue standing in for the
// instruction FIFO and the array's busy flag driven by the testbench.
// Checks, cycle by cycle, the weight-buffer addresses of read_weights (top
// row last), the checksum-lane strobes of t_read_weight, that a matmul waits
// for the array to empty before activating the weights, the vector stream
// (calc_len data vectors, plus ONES, MONES, ZERO in testing mode), the
// activate read/write sequence and decode, and the error path (irq, status,
// flush, halt, irq_clear).
module tb_tpu_control;
  import repair_pkg::*;
  localparam int N = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, run, irq_clear, fifo_empty, fifo_pop, fifo_flush;
  instr_t fifo_dout;
  logic wb_rd_en, sa_in_valid, sa_w_shift_en, sa_w_activate, sa_busy, sa_out_valid;
  logic [23:0] wb_rd_addr, ub_addr;
  vkind_e sa_in_kind, sa_out_kind;
  logic [15:0] acc_res_addr, acc_rd_addr, det_mask;
  logic acc_res_accum, acc_ck_clear, acc_ck_valid, acc_ck_commit, acc_rd_en;
  logic act_in_valid, act_out_valid, ub_en, ub_we;
  logic [1:0] act_func;
  logic [4:0] act_shift;
  logic det_valid, det_error, irq, chk_pass, alive, idle;
  diag_e det_diag;
  tpu_status_t status;
  int checks = 0, failures = 0;

  tpu_control #(.N(N)) dut (.*);

  instr_t q [$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : q[0];
  always @(posedge clk) begin
    if (fifo_flush) q.delete();
    else if (fifo_pop) void'(q.pop_front());
  end
  always @(posedge clk) act_out_valid <= act_in_valid;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic instr_t mk(input logic [7:0] op, input int len, input int acc, input int b);
    instr_t t;
    t.op = op; t.calc_len = 32'(len); t.acc_addr = 16'(acc); t.buf_addr = 24'(b);
    return t;
  endfunction

  // cycle log
  int n_wb, n_shift, n_ck, n_clr, n_act_w, n_slot, n_ub_rd, n_accrd, n_ubwr, n_commit;
  vkind_e kinds [$];
  int wb_addrs [$], ub_rd_addrs [$], acc_addrs [$], ub_wr_addrs [$];
  task automatic clear_log();
    n_wb = 0; n_shift = 0; n_ck = 0; n_clr = 0; n_act_w = 0; n_slot = 0; n_ub_rd = 0;
    n_accrd = 0; n_ubwr = 0; n_commit = 0;
    kinds.delete(); wb_addrs.delete(); ub_rd_addrs.delete(); acc_addrs.delete();
    ub_wr_addrs.delete();
  endtask
  always @(negedge clk) if (!rst) begin
    if (wb_rd_en) begin n_wb++; wb_addrs.push_back(int'(wb_rd_addr)); end
    if (sa_w_shift_en) n_shift++;
    if (acc_ck_valid) n_ck++;
    if (acc_ck_clear) n_clr++;
    if (sa_w_activate) begin
      n_act_w++;
      chk(!sa_busy, "weights activated only when the array is empty");
    end
    if (acc_ck_commit) n_commit++;
    if (sa_in_valid) begin n_slot++; kinds.push_back(sa_in_kind); end
    if (ub_en && !ub_we) begin n_ub_rd++; ub_rd_addrs.push_back(int'(ub_addr)); end
    if (ub_en && ub_we) begin n_ubwr++; ub_wr_addrs.push_back(int'(ub_addr)); end
    if (acc_rd_en) begin n_accrd++; acc_addrs.push_back(int'(acc_rd_addr)); end
  end

  task automatic run_until_empty();
    int t = 0;
    repeat (2) @(negedge clk);
    while ((!fifo_empty || dut.state != dut.S_FETCH) && t < 2000) begin @(negedge clk); t++; end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    rst = 1; run = 0; irq_clear = 0; sa_busy = 0; sa_out_valid = 0; sa_out_kind = VK_DATA;
    det_valid = 0; det_error = 0; det_diag = DIAG_OK; det_mask = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(alive, "alive");
    run = 1;

    // read_weights
    clear_log();
    q.push_back(mk(OP_READ_W, N, 0, 40));
    run_until_empty();
    chk(n_wb == N && n_shift == N && n_ck == 0, $sformatf("read_weights %0d %0d %0d", n_wb, n_shift, n_ck));
    for (int k = 0; k < N; k++) chk(wb_addrs[k] == 40 + N - 1 - k, "weight address order");

    // t_read_weight
    clear_log();
    q.push_back(mk(OP_T_READ_W, N, 0, 0));
    run_until_empty();
    chk(n_ck == N && n_clr == 1, "t_read_weight feeds the checksum lane");

    // matmul waits for busy
    clear_log();
    sa_busy = 1;
    q.push_back(mk(OP_T_MATMUL, 5, 7, 60));
    repeat (10) @(negedge clk);
    chk(n_act_w == 0 && n_slot == 0, "matmul waits while the array is busy");
    sa_busy = 0;
    run_until_empty();
    chk(n_act_w == 1 && n_commit == 1, "weights activated and checksum committed once");
    chk(n_slot == 8, $sformatf("5 data + 3 test vectors (%0d)", n_slot));
    chk(n_ub_rd == 5, "5 unified-buffer reads");
    for (int k = 0; k < 5; k++) chk(ub_rd_addrs[k] == 60 + k && kinds[k] == VK_DATA, "data vectors");
    chk(kinds[5] == VK_ONES && kinds[6] == VK_MONES && kinds[7] == VK_ZERO, "test vector order");
    chk(acc_res_addr == 7 && acc_res_accum == 0, "result address and overwrite mode");

    // plain accumulate matmul
    clear_log();
    q.push_back(mk(OP_MATMUL_ACC, 4, 3, 0));
    run_until_empty();
    chk(n_slot == 4 && acc_res_accum == 1, "plain accumulate: no test vectors");

    // activate sigmoid, shift 5
    clear_log();
    q.push_back(mk(8'h80 | 8'(5 << 2) | 8'(ACT_SIGMOID), 6, 20, 90));
    repeat (2) @(negedge clk);
    chk(act_func == ACT_SIGMOID && act_shift == 5, "activate decode");
    run_until_empty();
    chk(n_accrd == 6 && n_ubwr == 6, $sformatf("activate reads %0d writes %0d", n_accrd, n_ubwr));
    for (int k = 0; k < 6; k++) chk(acc_addrs[k] == 20 + k && ub_wr_addrs[k] == 90 + k, "activate addresses");

    // the pending check of the first t_matrix_multiply passes
    chk(dut.chk_pending, "check pending after t_matrix_multiply");
    det_valid = 1;
    @(negedge clk);
    det_valid = 0;
    chk(chk_pass && !irq, "clean check gives a pass pulse");
    @(negedge clk);
    chk(!dut.chk_pending, "no check pending");

    // error path
    q.push_back(mk(OP_T_READ_W, N, 0, 0));
    q.push_back(mk(OP_T_MATMUL, 3, 0, 0));
    q.push_back(mk(OP_READ_W, N, 0, 0));
    q.push_back(mk(OP_READ_W, N, 0, 0));
    wait (dut.chk_pending);
    @(negedge clk);
    det_valid = 1; det_error = 1; det_diag = DIAG_ACC; det_mask = 16'h0010;
    @(negedge clk);
    det_valid = 0; det_error = 0;
    @(negedge clk);
    chk(irq, "irq raised");
    chk(status.diag == DIAG_ACC && status.col_mask == 16'h0010, "status diagnosis");
    chk(status.instr_seq == 6, $sformatf("status instruction index 6 (%0d)", status.instr_seq));
    chk(fifo_empty, "queue flushed");
    clear_log();
    q.push_back(mk(OP_READ_W, N, 0, 0));
    repeat (20) @(negedge clk);
    chk(n_wb == 0, "nothing runs while halted");
    irq_clear = 1;
    @(negedge clk);
    irq_clear = 0;
    q.push_back(mk(OP_READ_W, N, 0, 0));
    run_until_empty();
    chk(!irq && n_wb == N, "runs again after irq_clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
