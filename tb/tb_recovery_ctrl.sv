// tb_recovery_ctrl: the recovery flow against a scripted accelerator.
// Checks that the program is streamed in order and completion reported; that
// a structural fault leads to a reconfiguration request, a wait for alive,
// and a restart at the right resume point (start of the accumulation chain
// with full testing, start of the layer otherwise); that a weight bit-flip is
// handled by irq_clear and reload without reconfiguration; and that errors
// after reconfiguration are counted and the third one (counter > 2) ends in
// a full-reboot request.
module tb_recovery_ctrl;
  import repair_pkg::*;
  localparam int P = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, prog_we, prog_layer_start, full_test, start;
  logic [9:0] prog_addr;
  instr_t prog_instr, tpu_instr;
  logic [10:0] prog_len, resume_pc;
  logic tpu_run, tpu_irq_clear, tpu_push, tpu_full, tpu_irq, tpu_chk_pass, tpu_alive, tpu_idle;
  tpu_status_t tpu_status;
  logic dpr_req, dpr_done, full_reboot_req, done;
  logic [7:0] err_cnt;
  logic [15:0] n_soft, n_dpr;
  int checks = 0, failures = 0;

  recovery_ctrl dut (.*);

  instr_t prog [P];
  bit     ls [P];
  instr_t pushed [$];
  always @(negedge clk) if (!rst && tpu_push && !tpu_full) pushed.push_back(tpu_instr);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic instr_t mk(input logic [7:0] op, input int b);
    instr_t t;
    t.op = op; t.calc_len = 32'd14; t.acc_addr = 16'd0; t.buf_addr = 24'(b);
    return t;
  endfunction

  // raise an error for the instruction with the given TPU index
  task automatic fail(input int seq, input diag_e d);
    @(negedge clk);
    tpu_irq = 1; tpu_idle = 0;
    tpu_status.diag = d; tpu_status.col_mask = 16'h1; tpu_status.instr_seq = 32'(seq);
  endtask

  // answer a reconfiguration request: alive drops, then returns
  task automatic serve_dpr();
    int t = 0;
    while (!dpr_req && t < 200) begin @(negedge clk); t++; end
    chk(dpr_req, "reconfiguration requested");
    pushed.delete();
    repeat (5) @(negedge clk);
    tpu_alive = 0; tpu_irq = 0;
    repeat (5) @(negedge clk);
    chk(pushed.size() == 0, "nothing pushed during reconfiguration");
    dpr_done = 1;
    @(negedge clk);
    dpr_done = 0;
    repeat (3) @(negedge clk);
    chk(pushed.size() == 0, "nothing pushed before alive");
    tpu_alive = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst = 1; prog_we = 0; prog_layer_start = 0; full_test = 1; start = 0; prog_addr = 0;
    prog_instr = '0; prog_len = 11'(P); tpu_full = 0; tpu_irq = 0; tpu_status = '0;
    tpu_chk_pass = 0; tpu_alive = 1; tpu_idle = 0; dpr_done = 0;
    prog[0] = mk(OP_T_READ_W, 0);      ls[0] = 1;
    prog[1] = mk(OP_T_MATMUL, 1);      ls[1] = 0;
    prog[2] = mk(8'h81, 2);            ls[2] = 0;
    prog[3] = mk(OP_T_READ_W, 3);      ls[3] = 1;
    prog[4] = mk(OP_T_MATMUL, 4);      ls[4] = 0;
    prog[5] = mk(OP_T_READ_W, 5);      ls[5] = 0;
    prog[6] = mk(OP_T_MATMUL_ACC, 6);  ls[6] = 0;
    prog[7] = mk(8'h82, 7);            ls[7] = 0;
    prog[8] = mk(OP_T_READ_W, 8);      ls[8] = 0;
    prog[9] = mk(OP_T_MATMUL, 9);      ls[9] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < P; k++) begin
      prog_we = 1; prog_addr = 10'(k); prog_instr = prog[k]; prog_layer_start = ls[k];
      @(negedge clk);
    end
    prog_we = 0;

    // 1. plain streaming, with back-pressure
    start = 1; @(negedge clk); start = 0;
    tpu_full = 1; repeat (3) @(negedge clk); tpu_full = 0;
    repeat (P + 2) @(negedge clk);
    chk(pushed.size() == P, $sformatf("whole program pushed (%0d)", pushed.size()));
    for (int k = 0; k < P && k < pushed.size(); k++) chk(pushed[k] == prog[k], "program order");
    chk(!done, "not done while the accelerator is busy");
    tpu_idle = 1;
    repeat (2) @(negedge clk);
    chk(done, "done");

    // 2. structural fault in instruction 6 (accumulating) -> resume at 3
    pushed.delete();
    tpu_idle = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (P + 2) @(negedge clk);
    fail(6, DIAG_SA);
    serve_dpr();
    chk(resume_pc == 3 && n_dpr == 1, $sformatf("resume at 3 (%0d), one DPR", resume_pc));
    chk(pushed.size() > 0 && pushed[0] == prog[3], "re-run from instruction 3");
    // 3. a clean check ends the post-reconfiguration phase; then a weight
    //    flip in the matmul at index 1 after the resume (program index 4)
    @(negedge clk) tpu_chk_pass = 1;
    @(negedge clk) tpu_chk_pass = 0;
    repeat (P) @(negedge clk);
    pushed.delete();
    fail(1, DIAG_WEIGHT);
    wait (tpu_irq_clear);
    @(negedge clk);
    tpu_irq = 0;
    repeat (P) @(negedge clk);
    chk(n_soft == 1 && n_dpr == 1 && !dpr_req, "weight flip: reload without DPR");
    chk(resume_pc == 3 && pushed.size() > 0 && pushed[0] == prog[3],
        $sformatf("weight flip: reload from 3 (%0d, %0d pushed, first buf %0d)", resume_pc,
                  pushed.size(), pushed.size() > 0 ? pushed[0].buf_addr : 0));
    tpu_idle = 1;
    repeat (2) @(negedge clk);
    chk(done, "done after the soft error");

    // 4. layer policy: fault in instruction 9 -> resume at layer start 3
    full_test = 0;
    tpu_idle = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (P + 2) @(negedge clk);
    fail(9, DIAG_ACC);
    serve_dpr();
    chk(resume_pc == 3 && n_dpr == 2, $sformatf("layer policy: resume at 3 (%0d)", resume_pc));
    full_test = 1;

    // 5. fault persists after reconfiguration: counter 1, 2, 3 -> reboot
    for (int e = 1; e <= 3; e++) begin
      fail(1, DIAG_SA);
      repeat (15) @(negedge clk);
      chk(err_cnt == 8'(e), $sformatf("error counter %0d (%0d)", e, err_cnt));
      if (e < 3) serve_dpr();
    end
    chk(full_reboot_req && !dpr_req, "full reboot after counter exceeds 2");
    chk(n_dpr == 4, $sformatf("two more DPR attempts (%0d)", n_dpr));
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
