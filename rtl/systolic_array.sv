// systolic_array: N x N grid of mac_pe with input skew, output de-skew and
// the top-row adder operand used by the self-test vectors.
//
// Input vectors enter one per cycle (in_valid). Element i of a vector feeds
// row i of the grid after i cycles of skew, moves right one column per cycle,
// and the partial sums move down one row per cycle, so column j produces
// sum_i(x_i * w_ij) at its bottom N+j cycles after the vector entered. Each
// column result is then delayed by N-1-j cycles so that all N results of one
// vector leave together, 2N-1 cycles after it entered (out_valid).
//
// The adder of the first PE row normally receives 0. For a vector of kind
// VK_MONES (the all -1 test vector) it receives -1, so that column j yields
// -sum_i(w_ij) - 1 = not(C_SA_j); this injection follows the architecture.
// The vector kind travels with the data and comes out as out_kind.
//
// Weights: while w_shift_en is high, w_row_in enters the shadow registers of
// row 0 and every shadow row moves one row down; after N shifts row i holds
// the (N-1-i)-th row shifted in. w_activate copies all shadows into the
// active weights in one cycle. busy is high while any vector is inside.
module systolic_array
  import repair_pkg::*;
#(
  parameter int unsigned N      = 14,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PSUM_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  vkind_e                   in_kind,
  input  logic signed [DATA_W-1:0] in_vec   [N],
  input  logic                     w_shift_en,
  input  logic        [DATA_W-1:0] w_row_in [N],
  input  logic                     w_activate,
  output logic                     out_valid,
  output vkind_e                   out_kind,
  output logic signed [PSUM_W-1:0] out_vec  [N],
  output logic                     busy
);

  localparam int unsigned LAT = 2 * N - 1;

  // a[i][j]: input of PE(i,j); a[i][N] is dropped at the right edge
  logic signed [DATA_W-1:0] a_h  [N][N+1];
  // p[i][j]: partial sum entering PE(i,j); p[N][j] is the column result
  logic signed [PSUM_W-1:0] p_v  [N+1][N];
  logic        [DATA_W-1:0] w_v  [N+1][N];

  // valid/kind delay line, stage k holds the tag of the vector that entered
  // k cycles ago (stage 0 = the vector entering now)
  logic   tag_v [LAT+1];
  vkind_e tag_k [LAT+1];

  assign tag_v[0] = in_valid;
  assign tag_k[0] = in_kind;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= LAT; k++) begin
        tag_v[k] <= 1'b0;
        tag_k[k] <= VK_DATA;
      end
    end else begin
      for (int k = 1; k <= LAT; k++) begin
        tag_v[k] <= tag_v[k-1];
        tag_k[k] <= tag_k[k-1];
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int k = 1; k <= LAT; k++) busy |= tag_v[k];
  end

  assign out_valid = tag_v[LAT];
  assign out_kind  = tag_k[LAT];

  for (genvar i = 0; i < N; i++) begin : g_skew
    // row i sees the vector i cycles late
    logic signed [DATA_W-1:0] sk [i+1];
    assign sk[0] = in_valid ? in_vec[i] : '0;
    for (genvar k = 1; k <= i; k++) begin : g_d
      always_ff @(posedge clk) begin
        if (rst) sk[k] <= '0;
        else     sk[k] <= sk[k-1];
      end
    end
    assign a_h[i][0] = sk[i];
  end

  for (genvar j = 0; j < N; j++) begin : g_top
    // the vector reaches PE(0,j) j cycles after entering
    assign p_v[0][j] = (tag_v[j] && tag_k[j] == VK_MONES) ? '1 : '0;
    assign w_v[0][j] = w_row_in[j];
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      mac_pe #(.DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_pe (
        .clk         (clk),
        .rst         (rst),
        .a_in        (a_h[i][j]),
        .psum_in     (p_v[i][j]),
        .w_shift_in  (w_v[i][j]),
        .w_shift_en  (w_shift_en),
        .w_activate  (w_activate),
        .a_out       (a_h[i][j+1]),
        .psum_out    (p_v[i+1][j]),
        .w_shift_out (w_v[i+1][j])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_deskew
    // column j leaves the grid at N+j cycles; delay it to 2N-1
    localparam int unsigned D = N - 1 - j;
    logic signed [PSUM_W-1:0] ds [D+1];
    assign ds[0] = p_v[N][j];
    for (genvar k = 1; k <= D; k++) begin : g_d
      always_ff @(posedge clk) begin
        if (rst) ds[k] <= '0;
        else     ds[k] <= ds[k-1];
      end
    end
    assign out_vec[j] = ds[D];
  end

endmodule
