// weight_buffer: on-chip memory holding the network weights, one row of N
// signed 8-bit weights per address (block RAM on an FPGA), with error
// correcting code.
//
// Port W is written by the host; port R is read by the accelerator's
// read_weights sequencer, with the row on rd_row one cycle after rd_en.
// Each byte is stored as a 13-bit SECDED code word (ecc_encode in the
// package): a read corrects any single flipped bit per byte and flags a
// double flip, whose data is passed on uncorrected. ecc_single / ecc_double
// pulse in the cycle the read data is valid.
// That the accelerator has its own weight buffer in block RAM, and that the
// block RAMs carry ECC, is the architecture's; the depth (WB_DEPTH rows), the
// per-byte code and the two-port organisation are this design's choices.
// The code is defined for bytes, so DATA_W must be 8.
module weight_buffer
  import repair_pkg::*;
#(
  parameter int unsigned N        = 14,
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned WB_DEPTH = 32768,
  localparam int unsigned AW      = $clog2(WB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_row [N],
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_row [N],
  output logic              ecc_single,
  output logic              ecc_double
);

  localparam int unsigned CW = ECC_CW;

  initial assert (DATA_W == 8) else $error("weight_buffer: ECC is per byte, DATA_W must be 8");

  logic [N*CW-1:0] mem [WB_DEPTH];
  logic [N*CW-1:0] wr_enc;
  logic [N*CW-1:0] rd_q;
  logic            rd_v;
  logic [N-1:0]    s_lane, d_lane;

  for (genvar j = 0; j < N; j++) begin : g_lane
    logic [9:0] dec;
    assign wr_enc[j*CW +: CW] = ecc_encode(8'(wr_row[j]));
    assign dec                = ecc_decode(rd_q[j*CW +: CW]);
    assign rd_row[j]          = DATA_W'(dec[7:0]);
    assign s_lane[j]          = dec[8];
    assign d_lane[j]          = dec[9];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_enc;
    if (rd_en) rd_q <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_v <= 1'b0;
    else     rd_v <= rd_en;
  end

  assign ecc_single = rd_v && |s_lane;
  assign ecc_double = rd_v && |d_lane;

endmodule
