// simd_add48: a 48-bit adder used in SIMD mode, as a DSP slice's ALU is when
// split into independent lanes.
//
// The 48-bit operands are two lanes: bits [31:0] carry 32-bit accumulator
// data (matrix-multiplication results), bits [47:32] a 16-bit lane in which
// the 8-bit weights are summed into the column checksum. The carry out of the
// data lane is killed, so one addition updates both lanes independently in the
// same cycle. Splitting the accumulator this way follows the architecture
// (32-bit results next to 8-bit weights in one >= 48-bit DSP operand); the
// lane boundary at bit 32 and the 16-bit checksum lane are this design's
// choice. Purely combinational.
module simd_add48 (
  input  logic [47:0] a,
  input  logic [47:0] b,
  output logic [47:0] sum
);

  logic [31:0] lo;
  logic [15:0] hi;

  always_comb begin
    lo  = a[31:0] + b[31:0];
    hi  = a[47:32] + b[47:32];  // no carry in from the data lane
    sum = {hi, lo};
  end

endmodule
