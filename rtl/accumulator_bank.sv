// accumulator_bank: the bank of N column accumulators next to the systolic
// array, with the checksum registers R0/R1 used by the testing mode.
//
// Normal use (as in any weight-stationary TPU): each result vector leaving
// the array is written to accumulator row res_addr, or added to it when
// res_accum is set (tiling). Rows are read back by the activate instruction
// through rd_addr, one cycle after rd_en.
//
// Testing mode (follows the architecture):
//  * While t_read_weight pushes weight rows into the array, the same rows
//    (ck_valid, ck_row) are summed per column into the 16-bit checksum lane,
//    giving C_A_j. Each column adder is a simd_add48, so this happens in the
//    same cycle as a data-lane accumulation of the previous multiplication.
//  * ck_commit (issued when the loaded weights become active) stores
//    R0_j = -C_A_j and R1_j = C_A_j; ck_clear restarts the lane at 0.
//  * The test vectors' results arrive after the data: VK_ONES gives C_SA_j
//    and the adder writes a_j = C_SA_j + R0_j back to R0; VK_MONES gives
//    not(C_SA_j) and writes a*_j = not(C_SA_j) + R1_j back to R1; VK_ZERO is
//    only captured. With no fault a_j = 0 and a*_j = all ones.
//  * With the VK_ZERO result, a snapshot (a, a*, C_SA, not C_SA, zero
//    result) is presented to the detection unit with chk_valid for one cycle.
// Where the R0/R1 values live (dedicated registers per column) and the
// moment of ck_commit are this design's choices.
module accumulator_bank
  import repair_pkg::*;
#(
  parameter int unsigned N         = 14,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned PSUM_W    = 32,
  parameter int unsigned ACC_DEPTH = 512,
  localparam int unsigned AW       = $clog2(ACC_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst,
  // results from the systolic array
  input  logic                     res_valid,
  input  vkind_e                   res_kind,
  input  logic signed [PSUM_W-1:0] res_vec [N],
  input  logic        [AW-1:0]     res_addr,
  input  logic                     res_accum,
  // weight checksum lane
  input  logic                     ck_clear,
  input  logic                     ck_valid,
  input  logic        [DATA_W-1:0] ck_row  [N],
  input  logic                     ck_commit,
  // read port for activate
  input  logic                     rd_en,
  input  logic        [AW-1:0]     rd_addr,
  output logic signed [PSUM_W-1:0] rd_vec  [N],
  // snapshot for the detection unit
  output logic                     chk_valid,
  output logic        [PSUM_W-1:0] chk_a    [N],
  output logic        [PSUM_W-1:0] chk_an   [N],
  output logic        [PSUM_W-1:0] chk_csa  [N],
  output logic        [PSUM_W-1:0] chk_ncsa [N],
  output logic        [PSUM_W-1:0] chk_z    [N]
);

  logic signed [PSUM_W-1:0] mem [ACC_DEPTH][N];
  logic        [15:0]       ck_acc [N];
  logic        [PSUM_W-1:0] r0 [N];
  logic        [PSUM_W-1:0] r1 [N];
  logic        [47:0]       op_a [N];
  logic        [47:0]       op_b [N];
  logic        [47:0]       sum  [N];

  for (genvar j = 0; j < N; j++) begin : g_col
    always_comb begin
      // checksum lane: running C_A_j plus the weight entering now
      op_a[j][47:32] = ck_clear ? 16'd0 : ck_acc[j];
      op_b[j][47:32] = ck_valid ? 16'($signed(ck_row[j])) : 16'd0;
      // data lane: what the arriving result is added to
      unique case (res_kind)
        VK_ONES:  op_a[j][31:0] = r0[j];
        VK_MONES: op_a[j][31:0] = r1[j];
        default:  op_a[j][31:0] = res_accum ? mem[res_addr][j] : '0;
      endcase
      op_b[j][31:0] = res_vec[j];
    end

    simd_add48 u_add (.a(op_a[j]), .b(op_b[j]), .sum(sum[j]));
  end

  always_ff @(posedge clk) begin
    chk_valid <= 1'b0;
    if (rst) begin
      for (int j = 0; j < N; j++) begin
        ck_acc[j]   <= '0;
        r0[j]       <= '0;
        r1[j]       <= '0;
        chk_a[j]    <= '0;
        chk_an[j]   <= '0;
        chk_csa[j]  <= '0;
        chk_ncsa[j] <= '0;
        chk_z[j]    <= '0;
        rd_vec[j]   <= '0;
      end
    end else begin
      for (int j = 0; j < N; j++) begin
        if (ck_clear || ck_valid) ck_acc[j] <= sum[j][47:32];
        if (ck_commit) begin
          r1[j] <= PSUM_W'($signed(ck_acc[j]));
          r0[j] <= -PSUM_W'($signed(ck_acc[j]));
        end
        if (rd_en) rd_vec[j] <= mem[rd_addr][j];
      end
      if (res_valid) begin
        unique case (res_kind)
          VK_DATA:
            for (int j = 0; j < N; j++) mem[res_addr][j] <= sum[j][31:0];
          VK_ONES:
            for (int j = 0; j < N; j++) begin
              r0[j]      <= sum[j][31:0];
              chk_csa[j] <= res_vec[j];
            end
          VK_MONES:
            for (int j = 0; j < N; j++) begin
              r1[j]       <= sum[j][31:0];
              chk_ncsa[j] <= res_vec[j];
            end
          VK_ZERO: begin
            for (int j = 0; j < N; j++) begin
              chk_z[j]  <= res_vec[j];
              chk_a[j]  <= r0[j];
              chk_an[j] <= r1[j];
            end
            chk_valid <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
