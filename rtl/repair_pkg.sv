// repair_pkg: types and constants shared by the fault-tolerant systolic-array
// accelerator and its recovery controller.
//
// The 80-bit instruction word carries an opcode, a vector count, an
// accumulator address and a buffer address (weight buffer for read_weights,
// unified buffer for matrix_multiply and activate). The field widths and the
// opcode values are this design's own choice; only the 80-bit width and the
// kinds of fields are fixed by the architecture.
package repair_pkg;

  localparam int unsigned INSTR_W = 80;

  typedef enum logic [7:0] {
    OP_NOP          = 8'h00,
    OP_READ_W       = 8'h08,  // read_weights
    OP_T_READ_W     = 8'h09,  // t_read_weight: also builds the weight checksums
    OP_MATMUL       = 8'h20,  // matrix_multiply, overwrite accumulators
    OP_T_MATMUL     = 8'h21,  // t_matrix_multiply, overwrite
    OP_MATMUL_ACC   = 8'h22,  // matrix_multiply, add to accumulators (tiling)
    OP_T_MATMUL_ACC = 8'h23   // t_matrix_multiply, add to accumulators
  } opcode_e;

  // Activate opcodes are 8'b1sss_ssff: ff selects the function, sssss is the
  // right shift that requantizes the 32-bit accumulator value.
  localparam logic [1:0] ACT_NONE    = 2'd0;
  localparam logic [1:0] ACT_RELU    = 2'd1;
  localparam logic [1:0] ACT_SIGMOID = 2'd2;

  typedef struct packed {
    logic [7:0]  op;        // [79:72]
    logic [31:0] calc_len;  // [71:40] number of vectors
    logic [15:0] acc_addr;  // [39:24]
    logic [23:0] buf_addr;  // [23:0]
  } instr_t;

  function automatic logic is_activate(logic [7:0] op);
    return op[7];
  endfunction
  function automatic logic is_read_w(logic [7:0] op);
    return !op[7] && op[7:1] == 7'b0000_100;
  endfunction
  function automatic logic is_matmul(logic [7:0] op);
    return !op[7] && op[7:2] == 6'b0010_00;
  endfunction
  function automatic logic is_test(logic [7:0] op);
    return (is_read_w(op) || is_matmul(op)) && op[0];
  endfunction

  // Kind of vector travelling through the systolic array.
  typedef enum logic [1:0] {
    VK_DATA  = 2'd0,  // normal input vector
    VK_ONES  = 2'd1,  // all +1, top adder operand 0   -> C_SA
    VK_MONES = 2'd2,  // all -1, top adder operand -1  -> not C_SA
    VK_ZERO  = 2'd3   // all 0, checks the LSB cannot stick at 1
  } vkind_e;

  // Diagnosis of one checked matrix multiplication.
  typedef enum logic [1:0] {
    DIAG_OK        = 2'd0,
    DIAG_WEIGHT    = 2'd1,  // weight register bit-flip (soft error)
    DIAG_ACC       = 2'd2,  // structural fault in an accumulator
    DIAG_SA        = 2'd3   // structural fault in a systolic-array column
  } diag_e;

  typedef struct packed {
    diag_e       diag;      // most severe diagnosis over all columns
    logic [15:0] col_mask;  // faulty columns (bit j = column j)
    logic [31:0] instr_seq; // index of the failed instruction since reset
  } tpu_status_t;

  // Per-byte SECDED code used by the on-chip buffers: Hamming(12,8) with
  // check bits at positions 1, 2, 4 and 8 and data at 3,5,6,7,9,10,11,12,
  // plus an overall parity bit in bit 0 (13 bits per byte).
  localparam int unsigned ECC_CW = 13;

  function automatic logic [ECC_CW-1:0] ecc_encode(input logic [7:0] d);
    logic [ECC_CW-1:0] c;
    c = '0;
    {c[12], c[11], c[10], c[9], c[7], c[6], c[5], c[3]} = d;
    for (int k = 0; k < 4; k++)
      for (int p = 3; p <= 12; p++)
        if (p[k] && p != (1 << k)) c[1 << k] ^= c[p];
    c[0] = ^c[12:1];
    return c;
  endfunction

  // Returns {double, single, data}: corrects one flipped bit, flags two.
  function automatic logic [9:0] ecc_decode(input logic [ECC_CW-1:0] c_in);
    logic [ECC_CW-1:0] c;
    logic [3:0]        s;
    logic              par;
    logic              sgl, dbl;
    c = c_in;
    s = '0;
    for (int k = 0; k < 4; k++)
      for (int p = 1; p <= 12; p++)
        if (p[k]) s[k] ^= c[p];
    par = ^c;
    sgl = 1'b0;
    dbl = 1'b0;
    if (par) begin
      sgl = 1'b1;
      if (s != 0 && s <= 12) c[s] = ~c[s];
    end else if (s != 0) begin
      dbl = 1'b1;
    end
    return {dbl, sgl, c[12], c[11], c[10], c[9], c[7], c[6], c[5], c[3]};
  endfunction

endpackage
