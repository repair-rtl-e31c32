// instr_fifo: first-in first-out queue of 80-bit accelerator instructions.
//
// The host pushes instructions (push, while !full); the accelerator's control
// unit pops them (pop, while !empty), the head being visible on dout at all
// times (first-word fall-through). flush empties the queue in one cycle: it
// is used when a fault is detected, so that nothing more runs on a faulty
// datapath. That the host feeds the accelerator through an instruction FIFO
// and that the pipeline is flushed on an error follow the architecture; the
// depth and the fall-through behaviour are this design's choices.
// A push and a pop in the same cycle are both honoured.
module instr_fifo
  import repair_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   flush,
  input  logic   push,
  input  instr_t din,
  input  logic   pop,
  output instr_t dout,
  output logic   full,
  output logic   empty,
  output logic [AW:0] count
);

  instr_t        mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop))
    else $error("instr_fifo: push while full");
  assert property (@(posedge clk) disable iff (rst) !(pop && empty))
    else $error("instr_fifo: pop while empty");

endmodule
