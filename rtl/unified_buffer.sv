// unified_buffer: the accelerator's input/output buffer with error
// correcting code, one row of N bytes per address.
//
// Input images and the outputs of every layer live here. The buffer sits
// outside the reconfigurable partition and is ECC protected, so its content
// survives both a partial reconfiguration of the accelerator and single
// event upsets; this is what lets execution resume after a repair. Both facts
// follow the architecture.
//
// Each byte is stored as a 13-bit SECDED code word (see ecc_encode in the
// package). A read corrects any single flipped bit in a byte and flags a
// double flip (data then passed uncorrected). The per-byte
// code (rather than a vendor's 64-bit block-RAM ECC) and the port
// arrangement are this design's choices.
//
// Port A belongs to the host, port B to the accelerator (matmul reads input
// vectors, activate writes results). Reads return data one cycle after
// *_en with *_we low; ecc_single / ecc_double pulse in that same cycle when a
// read on either port found a correctable / uncorrectable error.
module unified_buffer
  import repair_pkg::*;
#(
  parameter int unsigned N        = 14,
  parameter int unsigned UB_DEPTH = 4096,
  localparam int unsigned AW      = $clog2(UB_DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata [N],
  output logic [7:0]    a_rdata [N],
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_wdata [N],
  output logic [7:0]    b_rdata [N],
  output logic          ecc_single,
  output logic          ecc_double
);

  localparam int unsigned CW = ECC_CW;

  logic [N*CW-1:0] mem [UB_DEPTH];
  logic [N*CW-1:0] a_q, b_q, a_enc, b_enc;
  logic            a_rd, b_rd;
  logic [N-1:0]    a_s, a_d, b_s, b_d;

  for (genvar j = 0; j < N; j++) begin : g_lane
    logic [9:0] a_dec, b_dec;
    assign a_enc[j*CW +: CW] = ecc_encode(a_wdata[j]);
    assign b_enc[j*CW +: CW] = ecc_encode(b_wdata[j]);
    assign a_dec      = ecc_decode(a_q[j*CW +: CW]);
    assign b_dec      = ecc_decode(b_q[j*CW +: CW]);
    assign a_rdata[j] = a_dec[7:0];
    assign b_rdata[j] = b_dec[7:0];
    assign a_s[j]     = a_dec[8];
    assign a_d[j]     = a_dec[9];
    assign b_s[j]     = b_dec[8];
    assign b_d[j]     = b_dec[9];
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_enc;
      else      a_q <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_enc;
      else      b_q <= mem[b_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_rd <= 1'b0;
      b_rd <= 1'b0;
    end else begin
      a_rd <= a_en && !a_we;
      b_rd <= b_en && !b_we;
    end
  end

  assign ecc_single = (a_rd && |a_s) || (b_rd && |b_s);
  assign ecc_double = (a_rd && |a_d) || (b_rd && |b_d);

endmodule
