// recovery_ctrl: error detection and correction flow of the platform, run in
// hardware next to the accelerator.
//
// It plays the orchestrating role of the host processor in the recovery
// flow: it holds the instruction program of an inference (written by the
// host into a program memory, one entry = an 80-bit instruction plus a
// "first instruction of a layer" flag), streams it into the accelerator's
// instruction FIFO, and reacts to the accelerator's interrupt:
//  1. From the status it finds the failed instruction and walks back through
//     the program to the resume point: with full_test set (every matrix
//     multiplication runs in testing mode) the read_weights that loaded the
//     weights of the failed multiplication, or, if that multiplication adds
//     to the accumulators (tiling), of the first multiplication of its
//     accumulation chain; otherwise the first instruction of the failed
//     layer.
//  2. A weight-register bit-flip (soft error) is repaired by re-running from
//     the resume point, which reloads the weights (irq_clear, no
//     reconfiguration).
//  3. A structural fault triggers a partial reconfiguration: dpr_req is held
//     until the reconfiguration controller answers dpr_done; then the block
//     waits for the accelerator's alive signal and re-runs from the resume
//     point with the "post DPR" flag set.
//  4. An error while the flag is set increments the error counter; when the
//     counter exceeds MAX_DPR_ERR (printed as "Error Counter > 2" in the flow
//     chart) full_reboot_req is raised and the block stops; otherwise it
//     reconfigures again. A passing check clears the flag and the counter.
// Steps 1, 3 and 4 follow the architecture's flow; step 2 follows its remark
// that soft errors only need the weights reloaded. Doing the flow in a
// hardware state machine instead of processor firmware, the program memory
// and the backward walk are this design's choices.
// done rises when the whole program has run and the accelerator is idle.
module recovery_ctrl
  import repair_pkg::*;
#(
  parameter int unsigned PROG_DEPTH  = 1024,
  parameter int unsigned MAX_DPR_ERR = 2,
  localparam int unsigned PAW        = $clog2(PROG_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // program memory, written by the host
  input  logic           prog_we,
  input  logic [PAW-1:0] prog_addr,
  input  instr_t         prog_instr,
  input  logic           prog_layer_start,
  input  logic [PAW:0]   prog_len,
  input  logic           full_test,
  input  logic           start,
  // accelerator
  output logic           tpu_run,
  output logic           tpu_irq_clear,
  output logic           tpu_push,
  output instr_t         tpu_instr,
  input  logic           tpu_full,
  input  logic           tpu_irq,
  input  tpu_status_t    tpu_status,
  input  logic           tpu_chk_pass,
  input  logic           tpu_alive,
  input  logic           tpu_idle,
  // reconfiguration
  output logic           dpr_req,
  input  logic           dpr_done,
  output logic           full_reboot_req,
  // observation
  output logic           done,
  output logic [PAW:0]   resume_pc,
  output logic [7:0]     err_cnt,
  output logic [15:0]    n_soft,
  output logic [15:0]    n_dpr
);

  typedef enum logic [2:0] {
    R_IDLE, R_RUN, R_WALK, R_DPR, R_ALIVE, R_DONE, R_REBOOT
  } rstate_e;

  rstate_e        state;
  instr_t         prog_mem [PROG_DEPTH];
  logic           prog_ls  [PROG_DEPTH];
  logic [PAW:0]   pc, base_pc, scan;
  logic           post_dpr;
  logic           soft_err;
  logic           found;
  logic           mm_ovw;   // walk has passed an overwriting matmul
  instr_t         scan_instr;

  assign tpu_run   = (state == R_RUN);
  assign tpu_instr = prog_mem[pc[PAW-1:0]];
  assign tpu_push  = (state == R_RUN) && !tpu_irq && !tpu_irq_clear && (pc < prog_len) && !tpu_full;
  assign dpr_req   = (state == R_DPR);
  assign full_reboot_req = (state == R_REBOOT);
  assign done      = (state == R_DONE);

  assign scan_instr = prog_mem[scan[PAW-1:0]];

  always_comb begin
    if (full_test) found = is_read_w(scan_instr.op) && mm_ovw;
    else           found = prog_ls[scan[PAW-1:0]];
    found = found || (scan == '0);
  end

  always_ff @(posedge clk) begin
    if (prog_we) begin
      prog_mem[prog_addr] <= prog_instr;
      prog_ls[prog_addr]  <= prog_layer_start;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= R_IDLE;
      pc            <= '0;
      base_pc       <= '0;
      scan          <= '0;
      post_dpr      <= 1'b0;
      mm_ovw        <= 1'b0;
      soft_err          <= 1'b0;
      resume_pc     <= '0;
      err_cnt       <= '0;
      n_soft        <= '0;
      n_dpr         <= '0;
      tpu_irq_clear <= 1'b0;
    end else begin
      tpu_irq_clear <= 1'b0;
      if (tpu_chk_pass && state == R_RUN) begin
        post_dpr <= 1'b0;
        err_cnt  <= '0;
      end
      unique case (state)
        R_IDLE: if (start) begin
          pc      <= '0;
          base_pc <= '0;
          state   <= R_RUN;
        end
        R_RUN: begin
          if (tpu_irq && !tpu_irq_clear) begin  // clear still in flight: stale irq
            // failed instruction: TPU numbers its instructions from base_pc
            scan  <= base_pc + (PAW+1)'(tpu_status.instr_seq);
            soft_err  <= (tpu_status.diag == DIAG_WEIGHT) && !post_dpr;
            mm_ovw    <= 1'b0;
            state <= R_WALK;
            if (post_dpr) err_cnt <= err_cnt + 1'b1;
          end else begin
            if (tpu_push) pc <= pc + 1'b1;
            if (pc == prog_len && tpu_idle && !tpu_push) state <= R_DONE;
          end
        end
        R_WALK: begin
          if (found) begin
            resume_pc <= scan;
            if (err_cnt > 8'(MAX_DPR_ERR)) begin
              state <= R_REBOOT;
            end else if (soft_err) begin
              n_soft        <= n_soft + 1'b1;
              tpu_irq_clear <= 1'b1;
              pc            <= scan;
              base_pc       <= scan;
              state         <= R_RUN;
            end else begin
              n_dpr <= n_dpr + 1'b1;
              state <= R_DPR;
            end
          end else begin
            if (is_matmul(scan_instr.op)) mm_ovw <= !scan_instr.op[1];
            scan <= scan - 1'b1;
          end
        end
        R_DPR: if (dpr_done) state <= R_ALIVE;
        R_ALIVE: if (tpu_alive && !tpu_irq) begin
          post_dpr <= 1'b1;
          pc       <= resume_pc;
          base_pc  <= resume_pc;
          state    <= R_RUN;
        end
        R_DONE: if (start) begin
          pc      <= '0;
          base_pc <= '0;
          state   <= R_RUN;
        end
        R_REBOOT: ;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
