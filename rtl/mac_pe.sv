// mac_pe: one processing element of the weight-stationary systolic array.
//
// The PE holds a weight and, every cycle, multiplies the input arriving from
// its left neighbour by that weight and adds the partial sum arriving from
// the PE above. Input and partial sum leave registered, so the input reaches
// the right neighbour and the sum reaches the PE below one cycle later.
// This multiply-and-accumulate with stationary weights follows the
// architecture; the weight register being double-buffered (a shadow register
// that shifts down the column while the array still computes, copied into the
// active weight by w_activate) is this design's choice, so a weight load can
// overlap the draining of the previous multiplication.
//
// Timing: a_out and psum_out are valid one clock after a_in / psum_in.
// w_shift_out is the shadow register, which feeds the shadow of the PE below.
// Operands are signed two's complement.
module mac_pe #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PSUM_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [PSUM_W-1:0] psum_in,
  input  logic        [DATA_W-1:0] w_shift_in,
  input  logic                     w_shift_en,
  input  logic                     w_activate,
  output logic signed [DATA_W-1:0] a_out,
  output logic signed [PSUM_W-1:0] psum_out,
  output logic        [DATA_W-1:0] w_shift_out
);

  logic        [DATA_W-1:0]   w_shadow;
  logic signed [DATA_W-1:0]   w_active;
  logic signed [2*DATA_W-1:0] product;

  assign product     = a_in * w_active;
  assign w_shift_out = w_shadow;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_shadow <= '0;
      w_active <= '0;
      a_out    <= '0;
      psum_out <= '0;
    end else begin
      if (w_shift_en) w_shadow <= w_shift_in;
      if (w_activate) w_active <= w_shadow;
      a_out    <= a_in;
      psum_out <= psum_in + PSUM_W'(product);
    end
  end

endmodule
