// tpu_control: instruction fetch, decode and sequencing of the accelerator.
//
// Instructions are popped from the instruction FIFO while run is high and
// executed one at a time:
//  * read_weights / t_read_weight: N weight rows are read from the weight
//    buffer (buf_addr+N-1 down to buf_addr, so PE row i ends up holding row
//    buf_addr+i) and shifted into the array's shadow weight registers, one per
//    cycle. The testing variant also streams each row into the accumulators'
//    checksum lane (ck_valid, ck_clear on the first row). N+1 cycles.
//  * matrix_multiply / t_matrix_multiply (acc bit = op[1]): waits until the
//    array is empty, activates the loaded weights and commits the weight
//    checksum to R0/R1 (1 cycle), then issues calc_len input vectors from the
//    unified buffer, one per cycle. The testing variant appends three test
//    vectors (all +1, all -1, all 0), i.e. exactly 3 extra cycles. Results
//    drain through the array in the background while the next instruction
//    runs; the detection unit judges the test results during that time.
//  * activate (op[7] set): waits until the array is empty, then reads
//    calc_len accumulator rows, passes them through the activation unit and
//    writes them to the unified buffer from buf_addr on (calc_len cycles plus
//    2 cycles of drain).
// When the detection unit reports an error the sequencer stops, holds the
// FIFO flushed, raises irq and latches the status (diagnosis, faulty columns
// and the index of the failed instruction counted from reset) until
// irq_clear, which also restarts the instruction count at 0, so that the
// host can number the instructions it pushes after a recovery. alive rises one cycle after reset ends. The instruction set and
// the error behaviour follow the architecture; the cycle-level schedule, the
// one-instruction-at-a-time execution and the encodings are this design's.
module tpu_control
  import repair_pkg::*;
#(
  parameter int unsigned N = 14
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        irq_clear,
  // instruction FIFO
  input  logic        fifo_empty,
  input  instr_t      fifo_dout,
  output logic        fifo_pop,
  output logic        fifo_flush,
  // weight buffer read
  output logic        wb_rd_en,
  output logic [23:0] wb_rd_addr,
  // systolic array
  output logic        sa_in_valid,
  output vkind_e      sa_in_kind,
  output logic        sa_w_shift_en,
  output logic        sa_w_activate,
  input  logic        sa_busy,
  input  logic        sa_out_valid,
  input  vkind_e      sa_out_kind,
  // accumulator bank
  output logic [15:0] acc_res_addr,
  output logic        acc_res_accum,
  output logic        acc_ck_clear,
  output logic        acc_ck_valid,
  output logic        acc_ck_commit,
  output logic        acc_rd_en,
  output logic [15:0] acc_rd_addr,
  // activation unit
  output logic        act_in_valid,
  output logic [1:0]  act_func,
  output logic [4:0]  act_shift,
  input  logic        act_out_valid,
  // unified buffer port B
  output logic        ub_en,
  output logic        ub_we,
  output logic [23:0] ub_addr,
  // detection unit
  input  logic        det_valid,
  input  logic        det_error,
  input  diag_e       det_diag,
  input  logic [15:0] det_mask,
  // to the host
  output logic        irq,
  output tpu_status_t status,
  output logic        chk_pass,
  output logic        alive,
  output logic        idle
);

  typedef enum logic [2:0] {
    S_FETCH, S_RW, S_MM_WAIT, S_MM_RUN, S_ACT_WAIT, S_ACT_RUN, S_ACT_DRAIN, S_HALT
  } state_e;

  state_e      state;
  instr_t      ir;
  logic [31:0] cnt;
  logic [31:0] seq_next, seq_cur, chk_seq;
  logic        rw_shift, rw_first, rw_test;
  logic        mm_test;
  logic [15:0] out_addr;
  logic        out_accum;
  logic [23:0] ub_wr_addr;
  logic        chk_pending;
  logic [31:0] mm_total;
  logic        slot_valid;
  vkind_e      slot_kind;
  logic [23:0] mm_rd_addr;

  assign mm_total = ir.calc_len + (mm_test ? 32'd3 : 32'd0);

  // ---------------------------------------------------------------- issue
  always_comb begin
    fifo_pop      = 1'b0;
    wb_rd_en      = 1'b0;
    wb_rd_addr    = ir.buf_addr + 24'(N - 1) - cnt[23:0];
    sa_w_activate = 1'b0;
    acc_ck_commit = 1'b0;
    acc_rd_en     = 1'b0;
    acc_rd_addr   = ir.acc_addr + cnt[15:0];
    slot_valid    = 1'b0;
    slot_kind     = VK_DATA;
    mm_rd_addr    = ir.buf_addr + cnt[23:0];
    unique case (state)
      S_FETCH:   fifo_pop = run && !fifo_empty;
      S_RW:      wb_rd_en = (cnt < N);
      S_MM_WAIT: if (!sa_busy) begin
                   sa_w_activate = 1'b1;
                   acc_ck_commit = 1'b1;
                 end
      S_MM_RUN:  if (cnt < mm_total) begin
                   slot_valid = 1'b1;
                   if (cnt < ir.calc_len)              slot_kind = VK_DATA;
                   else if (cnt == ir.calc_len)        slot_kind = VK_ONES;
                   else if (cnt == ir.calc_len + 1)    slot_kind = VK_MONES;
                   else                                slot_kind = VK_ZERO;
                 end
      S_ACT_RUN: acc_rd_en = (cnt < ir.calc_len);
      default: ;
    endcase
  end

  assign fifo_flush    = (state == S_HALT);
  assign sa_w_shift_en = rw_shift;
  assign acc_ck_valid  = rw_shift && rw_test;
  assign acc_ck_clear  = rw_shift && rw_test && rw_first;
  assign acc_res_addr  = out_addr;
  assign acc_res_accum = out_accum;
  assign act_func      = ir.op[1:0];
  assign act_shift     = ir.op[6:2];

  // unified buffer port B: activate writes win, matmul reads otherwise
  assign ub_en   = act_out_valid || (slot_valid && slot_kind == VK_DATA);
  assign ub_we   = act_out_valid;
  assign ub_addr = act_out_valid ? ub_wr_addr : mm_rd_addr;

  assign idle = (state == S_FETCH) && fifo_empty && !sa_busy && !chk_pending && !irq;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_FETCH;
      ir           <= '0;
      cnt          <= '0;
      seq_next     <= '0;
      seq_cur      <= '0;
      chk_seq      <= '0;
      rw_shift     <= 1'b0;
      rw_first     <= 1'b0;
      rw_test      <= 1'b0;
      mm_test      <= 1'b0;
      out_addr     <= '0;
      out_accum    <= 1'b0;
      ub_wr_addr   <= '0;
      chk_pending  <= 1'b0;
      sa_in_valid  <= 1'b0;
      sa_in_kind   <= VK_DATA;
      act_in_valid <= 1'b0;
      irq          <= 1'b0;
      status       <= '0;
      chk_pass     <= 1'b0;
      alive        <= 1'b0;
    end else begin
      alive        <= 1'b1;
      chk_pass     <= 1'b0;
      rw_shift     <= wb_rd_en;
      rw_first     <= wb_rd_en && cnt == 0;
      sa_in_valid  <= slot_valid;
      sa_in_kind   <= slot_kind;
      act_in_valid <= acc_rd_en;

      if (sa_out_valid && sa_out_kind == VK_DATA) out_addr <= out_addr + 1'b1;
      if (act_out_valid) ub_wr_addr <= ub_wr_addr + 1'b1;

      unique case (state)
        S_FETCH: if (fifo_pop) begin
          ir       <= fifo_dout;
          seq_cur  <= seq_next;
          seq_next <= seq_next + 1'b1;
          cnt      <= '0;
          if (is_read_w(fifo_dout.op)) begin
            state   <= S_RW;
            rw_test <= fifo_dout.op[0];
          end else if (is_matmul(fifo_dout.op)) begin
            state <= S_MM_WAIT;
          end else if (is_activate(fifo_dout.op)) begin
            state <= S_ACT_WAIT;
          end
        end
        S_RW: begin
          cnt <= cnt + 1'b1;
          if (cnt == N) state <= S_FETCH;
        end
        S_MM_WAIT: if (!sa_busy) begin
          state     <= S_MM_RUN;
          out_addr  <= ir.acc_addr;
          out_accum <= ir.op[1];
          mm_test   <= ir.op[0];
        end
        S_MM_RUN: begin
          cnt <= cnt + 1'b1;
          if (slot_valid && slot_kind == VK_ZERO) begin
            chk_pending <= 1'b1;
            chk_seq     <= seq_cur;
          end
          if (cnt + 1 >= mm_total) state <= S_FETCH;
        end
        S_ACT_WAIT: if (!sa_busy) begin
          state      <= S_ACT_RUN;
          ub_wr_addr <= ir.buf_addr;
        end
        S_ACT_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1 >= ir.calc_len) begin
            state <= S_ACT_DRAIN;
            cnt   <= '0;
          end
        end
        S_ACT_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == 1) state <= S_FETCH;
        end
        S_HALT: if (irq_clear) begin
          irq      <= 1'b0;
          seq_next <= '0;
          state    <= S_FETCH;
        end
        default: state <= S_FETCH;
      endcase

      if (det_valid) begin
        chk_pending <= 1'b0;
        if (det_error) begin
          state       <= S_HALT;
          irq         <= 1'b1;
          status.diag      <= det_diag;
          status.col_mask  <= det_mask;
          status.instr_seq <= chk_seq;
        end else begin
          chk_pass <= 1'b1;
        end
      end
    end
  end

endmodule
