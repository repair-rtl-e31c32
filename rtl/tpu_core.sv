// tpu_core: the reconfigurable part of the accelerator, a tinyTPU-style
// weight-stationary systolic-array engine extended with a testing mode.
//
// It holds the instruction FIFO, the control unit, the N x N systolic array,
// the accumulator bank (with R0/R1 and the SIMD checksum lane), the
// detection unit and the activation unit. The weight buffer and the unified
// (input/output) buffer sit outside, so that resetting this block, which is
// what a partial reconfiguration amounts to, leaves them intact; they are
// reached through the wb_* and ub_* ports (one-cycle read latency).
//
// In plain mode the instructions behave like an ordinary systolic
// accelerator. In testing mode (t_read_weight followed by t_matrix_multiply)
// the weight checksum C_A of each column is built while the weights load,
// three test vectors follow the data through the array, and the detection
// unit checks the results while the next instruction runs. On a fault, irq
// rises and status says what failed and in which instruction. The partition
// boundary and the vector multiplexer are this design's reading of the
// architecture.
module tpu_core
  import repair_pkg::*;
#(
  parameter int unsigned N          = 14,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned PSUM_W     = 32,
  parameter int unsigned ACC_DEPTH  = 512,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        irq_clear,
  // instruction FIFO write side
  input  logic        instr_push,
  input  instr_t      instr_din,
  output logic        instr_full,
  // weight buffer read port
  output logic        wb_rd_en,
  output logic [23:0] wb_rd_addr,
  input  logic [DATA_W-1:0] wb_rd_row [N],
  // unified buffer port B
  output logic        ub_en,
  output logic        ub_we,
  output logic [23:0] ub_addr,
  output logic [7:0]  ub_wdata [N],
  input  logic [7:0]  ub_rdata [N],
  // status
  output logic        irq,
  output tpu_status_t status,
  output logic        chk_pass,
  output logic        alive,
  output logic        idle
);

  localparam int unsigned AAW = $clog2(ACC_DEPTH);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  instr_t      fifo_dout;
  logic        fifo_empty, fifo_pop, fifo_flush;
  logic [FAW:0] fifo_count;

  logic        sa_in_valid, sa_w_shift_en, sa_w_activate, sa_busy, sa_out_valid;
  vkind_e      sa_in_kind, sa_out_kind;
  logic signed [DATA_W-1:0] sa_in_vec  [N];
  logic signed [PSUM_W-1:0] sa_out_vec [N];

  logic [15:0] acc_res_addr, acc_rd_addr;
  logic        acc_res_accum, acc_ck_clear, acc_ck_valid, acc_ck_commit, acc_rd_en;
  logic signed [PSUM_W-1:0] acc_rd_vec [N];
  logic        chk_valid;
  logic [PSUM_W-1:0] chk_a [N], chk_an [N], chk_csa [N], chk_ncsa [N], chk_z [N];

  logic        det_valid, det_error;
  diag_e       det_diag;
  logic [15:0] det_mask;

  logic        act_in_valid, act_out_valid;
  logic [1:0]  act_func;
  logic [4:0]  act_shift;
  logic signed [7:0] act_out_vec [N];

  instr_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .flush(fifo_flush),
    .push(instr_push), .din(instr_din),
    .pop(fifo_pop), .dout(fifo_dout),
    .full(instr_full), .empty(fifo_empty), .count(fifo_count)
  );

  tpu_control #(.N(N)) u_ctrl (
    .clk(clk), .rst(rst), .run(run), .irq_clear(irq_clear),
    .fifo_empty(fifo_empty), .fifo_dout(fifo_dout), .fifo_pop(fifo_pop), .fifo_flush(fifo_flush),
    .wb_rd_en(wb_rd_en), .wb_rd_addr(wb_rd_addr),
    .sa_in_valid(sa_in_valid), .sa_in_kind(sa_in_kind),
    .sa_w_shift_en(sa_w_shift_en), .sa_w_activate(sa_w_activate),
    .sa_busy(sa_busy), .sa_out_valid(sa_out_valid), .sa_out_kind(sa_out_kind),
    .acc_res_addr(acc_res_addr), .acc_res_accum(acc_res_accum),
    .acc_ck_clear(acc_ck_clear), .acc_ck_valid(acc_ck_valid), .acc_ck_commit(acc_ck_commit),
    .acc_rd_en(acc_rd_en), .acc_rd_addr(acc_rd_addr),
    .act_in_valid(act_in_valid), .act_func(act_func), .act_shift(act_shift),
    .act_out_valid(act_out_valid),
    .ub_en(ub_en), .ub_we(ub_we), .ub_addr(ub_addr),
    .det_valid(det_valid), .det_error(det_error), .det_diag(det_diag), .det_mask(det_mask),
    .irq(irq), .status(status), .chk_pass(chk_pass), .alive(alive), .idle(idle)
  );

  // input vector: unified-buffer data or one of the three test vectors
  for (genvar i = 0; i < N; i++) begin : g_vec
    always_comb begin
      unique case (sa_in_kind)
        VK_ONES:  sa_in_vec[i] = DATA_W'(1);
        VK_MONES: sa_in_vec[i] = '1;
        VK_ZERO:  sa_in_vec[i] = '0;
        default:  sa_in_vec[i] = ub_rdata[i];
      endcase
    end
    assign ub_wdata[i] = act_out_vec[i];
  end

  systolic_array #(.N(N), .DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_sa (
    .clk(clk), .rst(rst),
    .in_valid(sa_in_valid), .in_kind(sa_in_kind), .in_vec(sa_in_vec),
    .w_shift_en(sa_w_shift_en), .w_row_in(wb_rd_row), .w_activate(sa_w_activate),
    .out_valid(sa_out_valid), .out_kind(sa_out_kind), .out_vec(sa_out_vec),
    .busy(sa_busy)
  );

  accumulator_bank #(.N(N), .DATA_W(DATA_W), .PSUM_W(PSUM_W), .ACC_DEPTH(ACC_DEPTH)) u_acc (
    .clk(clk), .rst(rst),
    .res_valid(sa_out_valid), .res_kind(sa_out_kind), .res_vec(sa_out_vec),
    .res_addr(acc_res_addr[AAW-1:0]), .res_accum(acc_res_accum),
    .ck_clear(acc_ck_clear), .ck_valid(acc_ck_valid), .ck_row(wb_rd_row),
    .ck_commit(acc_ck_commit),
    .rd_en(acc_rd_en), .rd_addr(acc_rd_addr[AAW-1:0]), .rd_vec(acc_rd_vec),
    .chk_valid(chk_valid), .chk_a(chk_a), .chk_an(chk_an),
    .chk_csa(chk_csa), .chk_ncsa(chk_ncsa), .chk_z(chk_z)
  );

  fault_detector #(.N(N), .PSUM_W(PSUM_W)) u_det (
    .clk(clk), .rst(rst), .chk_valid(chk_valid),
    .chk_a(chk_a), .chk_an(chk_an), .chk_csa(chk_csa), .chk_ncsa(chk_ncsa), .chk_z(chk_z),
    .det_valid(det_valid), .det_error(det_error), .diag(det_diag), .col_mask(det_mask)
  );

  activation_unit #(.N(N), .PSUM_W(PSUM_W)) u_act (
    .clk(clk), .rst(rst), .in_valid(act_in_valid), .func(act_func), .shift(act_shift),
    .in_vec(acc_rd_vec), .out_valid(act_out_valid), .out_vec(act_out_vec)
  );

endmodule
