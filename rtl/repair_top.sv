// repair_top: fault-tolerant DNN accelerator platform. A systolic-array
// accelerator with a built-in self-test (tpu_core) is paired with a recovery
// controller that repairs it by partial reconfiguration and resumes the
// inference from the last correctly executed instruction.
//
// Blocks and partitioning:
//  * tpu_core is the reconfigurable partition. During a reconfiguration the
//    external reconfiguration controller holds rp_reset high; afterwards the
//    partition restarts from reset and raises alive.
//  * weight_buffer and unified_buffer (both ECC protected) are static, so weights,
//    inputs and intermediate layer outputs survive a repair.
//  * recovery_ctrl streams the program into the accelerator and runs the
//    detection/correction flow: dpr_req/dpr_done talk to the reconfiguration
//    controller, full_reboot_req asks for a full device reconfiguration.
// The host writes weights (wb_wr_*), input data (ub_a_*, which also reads
// results) and the program (prog_*), then pulses start; done rises when the
// program has completed. Which parts are static and which are reconfigured
// follows the architecture; the port list is this design's.
module repair_top
  import repair_pkg::*;
#(
  parameter int unsigned N           = 14,
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned PSUM_W      = 32,
  parameter int unsigned ACC_DEPTH   = 512,
  parameter int unsigned FIFO_DEPTH  = 32,
  parameter int unsigned WB_DEPTH    = 32768,
  parameter int unsigned UB_DEPTH    = 4096,
  parameter int unsigned PROG_DEPTH  = 1024,
  parameter int unsigned MAX_DPR_ERR = 2,
  localparam int unsigned WAW        = $clog2(WB_DEPTH),
  localparam int unsigned UAW        = $clog2(UB_DEPTH),
  localparam int unsigned PAW        = $clog2(PROG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // reconfiguration controller
  input  logic              rp_reset,
  output logic              dpr_req,
  input  logic              dpr_done,
  output logic              full_reboot_req,
  // host: weight buffer
  input  logic              wb_wr_en,
  input  logic [WAW-1:0]    wb_wr_addr,
  input  logic [DATA_W-1:0] wb_wr_row [N],
  // host: unified buffer port A
  input  logic              ub_a_en,
  input  logic              ub_a_we,
  input  logic [UAW-1:0]    ub_a_addr,
  input  logic [7:0]        ub_a_wdata [N],
  output logic [7:0]        ub_a_rdata [N],
  // host: program
  input  logic              prog_we,
  input  logic [PAW-1:0]    prog_addr,
  input  instr_t            prog_instr,
  input  logic              prog_layer_start,
  input  logic [PAW:0]      prog_len,
  input  logic              full_test,
  input  logic              start,
  // status
  output logic              done,
  output logic              tpu_irq,
  output tpu_status_t       tpu_status,
  output logic              tpu_alive,
  output logic [PAW:0]      resume_pc,
  output logic [7:0]        err_cnt,
  output logic [15:0]       n_soft,
  output logic [15:0]       n_dpr,
  output logic              ecc_single,
  output logic              ecc_double,
  output logic              wb_ecc_single,
  output logic              wb_ecc_double
);

  logic        rp_rst;
  logic        tpu_run, tpu_irq_clear, tpu_push, tpu_full, tpu_chk_pass, tpu_idle;
  instr_t      tpu_instr;
  logic        wb_rd_en;
  logic [23:0] wb_rd_addr;
  logic [DATA_W-1:0] wb_rd_row [N];
  logic        ub_b_en, ub_b_we;
  logic [23:0] ub_b_addr;
  logic [7:0]  ub_b_wdata [N], ub_b_rdata [N];

  assign rp_rst = rst || rp_reset;

  tpu_core #(
    .N(N), .DATA_W(DATA_W), .PSUM_W(PSUM_W), .ACC_DEPTH(ACC_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_tpu (
    .clk(clk), .rst(rp_rst), .run(tpu_run), .irq_clear(tpu_irq_clear),
    .instr_push(tpu_push), .instr_din(tpu_instr), .instr_full(tpu_full),
    .wb_rd_en(wb_rd_en), .wb_rd_addr(wb_rd_addr), .wb_rd_row(wb_rd_row),
    .ub_en(ub_b_en), .ub_we(ub_b_we), .ub_addr(ub_b_addr),
    .ub_wdata(ub_b_wdata), .ub_rdata(ub_b_rdata),
    .irq(tpu_irq), .status(tpu_status), .chk_pass(tpu_chk_pass),
    .alive(tpu_alive), .idle(tpu_idle)
  );

  weight_buffer #(.N(N), .DATA_W(DATA_W), .WB_DEPTH(WB_DEPTH)) u_wb (
    .clk(clk), .rst(rst), .wr_en(wb_wr_en), .wr_addr(wb_wr_addr), .wr_row(wb_wr_row),
    .rd_en(wb_rd_en), .rd_addr(wb_rd_addr[WAW-1:0]), .rd_row(wb_rd_row),
    .ecc_single(wb_ecc_single), .ecc_double(wb_ecc_double)
  );

  unified_buffer #(.N(N), .UB_DEPTH(UB_DEPTH)) u_ub (
    .clk(clk), .rst(rst),
    .a_en(ub_a_en), .a_we(ub_a_we), .a_addr(ub_a_addr), .a_wdata(ub_a_wdata), .a_rdata(ub_a_rdata),
    .b_en(ub_b_en), .b_we(ub_b_we), .b_addr(ub_b_addr[UAW-1:0]), .b_wdata(ub_b_wdata),
    .b_rdata(ub_b_rdata),
    .ecc_single(ecc_single), .ecc_double(ecc_double)
  );

  recovery_ctrl #(.PROG_DEPTH(PROG_DEPTH), .MAX_DPR_ERR(MAX_DPR_ERR)) u_rec (
    .clk(clk), .rst(rst),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_instr(prog_instr),
    .prog_layer_start(prog_layer_start), .prog_len(prog_len), .full_test(full_test),
    .start(start),
    .tpu_run(tpu_run), .tpu_irq_clear(tpu_irq_clear), .tpu_push(tpu_push),
    .tpu_instr(tpu_instr), .tpu_full(tpu_full), .tpu_irq(tpu_irq),
    .tpu_status(tpu_status), .tpu_chk_pass(tpu_chk_pass), .tpu_alive(tpu_alive),
    .tpu_idle(tpu_idle),
    .dpr_req(dpr_req), .dpr_done(dpr_done), .full_reboot_req(full_reboot_req),
    .done(done), .resume_pc(resume_pc), .err_cnt(err_cnt), .n_soft(n_soft), .n_dpr(n_dpr)
  );

endmodule
