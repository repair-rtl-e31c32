// activation_unit: hardwired quantized activation functions applied to one
// accumulator row (N values) per cycle by the activate instruction.
//
// Each 32-bit accumulator value is first requantized by an arithmetic right
// shift (shift, 0..31), then:
//  * ACT_NONE:    saturated to signed 8 bits;
//  * ACT_RELU:    negative values become 0, the rest saturate at 127;
//  * ACT_SIGMOID: the shifted value is read as fixed point with 4 fractional
//    bits and passed through the piecewise-linear PLAN approximation of the
//    sigmoid (segments at |x| = 1, 2.375 and 5, slopes 1/4, 1/8, 1/32),
//    giving a result in units of 1/128, saturated to 127.
// That the unit offers ReLU and Sigmoid is the architecture's; the
// requantizing shift, the fixed-point format and the PLAN approximation are
// this design's choices. Output is registered: out_valid follows in_valid by
// one cycle.
module activation_unit
  import repair_pkg::*;
#(
  parameter int unsigned N      = 14,
  parameter int unsigned PSUM_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic        [1:0]        func,
  input  logic        [4:0]        shift,
  input  logic signed [PSUM_W-1:0] in_vec  [N],
  output logic                     out_valid,
  output logic signed [7:0]        out_vec [N]
);

  function automatic logic signed [7:0] sat8(input logic signed [PSUM_W-1:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return v[7:0];
  endfunction

  // PLAN sigmoid, x in Q.4, result in units of 1/128 (0..127)
  function automatic logic [7:0] plan_sigmoid(input logic signed [PSUM_W-1:0] x);
    logic [PSUM_W-1:0] u;
    logic [PSUM_W-1:0] y;
    u = x[PSUM_W-1] ? PSUM_W'(-x) : PSUM_W'(x);
    if (u >= 80)      y = 128;
    else if (u >= 38) y = (u >> 2) + 108;
    else if (u >= 16) y = u + 80;
    else              y = (u << 1) + 64;
    if (x[PSUM_W-1]) y = 128 - y;
    return (y > 127) ? 8'd127 : y[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int j = 0; j < N; j++) out_vec[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < N; j++) begin
          logic signed [PSUM_W-1:0] q;
          q = in_vec[j] >>> shift;
          unique case (func)
            ACT_RELU:    out_vec[j] <= (q < 0) ? 8'sd0 : sat8(q);
            ACT_SIGMOID: out_vec[j] <= plan_sigmoid(q);
            default:     out_vec[j] <= sat8(q);
          endcase
        end
      end
    end
  end

endmodule
