// fault_detector: XOR-based detection and diagnosis of one checked matrix
// multiplication, one column at a time.
//
// Inputs per column j are the values left by the test vectors in the
// accumulator bank: a_j = C_SA_j - C_A_j, a*_j = not(C_SA_j) + C_A_j, the two
// array checksums C_SA_j and not(C_SA_j), and the array's answer to the
// all-zero vector. The rules follow the architecture:
//  * a_j = 0, a*_j = all ones and zero result = 0: column fault free;
//  * zero result not 0: a bit stuck at 1 in the array column (DIAG_SA);
//  * (a_j, a*_j) wrong but complementary (a_j XOR a*_j = all ones): a weight
//    register was flipped after loading, a soft error (DIAG_WEIGHT);
//  * (a_j, a*_j) not complementary but C_SA_j and not(C_SA_j) are: the fault
//    is in accumulator j (DIAG_ACC);
//  * otherwise the fault is in array column j (DIAG_SA).
// The overall diagnosis is the most severe column's (SA > ACC > WEIGHT), an
// ordering chosen by this design. Results are registered: det_valid pulses
// one cycle after chk_valid, together with diag and col_mask.
module fault_detector
  import repair_pkg::*;
#(
  parameter int unsigned N      = 14,
  parameter int unsigned PSUM_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              chk_valid,
  input  logic [PSUM_W-1:0] chk_a    [N],
  input  logic [PSUM_W-1:0] chk_an   [N],
  input  logic [PSUM_W-1:0] chk_csa  [N],
  input  logic [PSUM_W-1:0] chk_ncsa [N],
  input  logic [PSUM_W-1:0] chk_z    [N],
  output logic              det_valid,
  output logic              det_error,
  output diag_e             diag,
  output logic [15:0]       col_mask
);

  diag_e       col_diag [N];
  diag_e       worst;
  logic [15:0] mask;

  for (genvar j = 0; j < N; j++) begin : g_col
    logic fault_free, pair_comp, csa_comp, zero_ok;
    always_comb begin
      fault_free = ((chk_a[j] ^ '0) == '0) && ((chk_an[j] ^ '1) == '0);
      pair_comp  = &(chk_a[j] ^ chk_an[j]);
      csa_comp   = &(chk_csa[j] ^ chk_ncsa[j]);
      zero_ok    = (chk_z[j] == '0);
      if (!zero_ok)        col_diag[j] = DIAG_SA;
      else if (fault_free) col_diag[j] = DIAG_OK;
      else if (pair_comp)  col_diag[j] = DIAG_WEIGHT;
      else if (csa_comp)   col_diag[j] = DIAG_ACC;
      else                 col_diag[j] = DIAG_SA;
    end
  end

  always_comb begin
    worst = DIAG_OK;
    mask  = '0;
    for (int j = 0; j < N; j++) begin
      if (col_diag[j] != DIAG_OK) mask[j] = 1'b1;
      if (col_diag[j] > worst)    worst   = col_diag[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      det_valid <= 1'b0;
      det_error <= 1'b0;
      diag      <= DIAG_OK;
      col_mask  <= '0;
    end else begin
      det_valid <= chk_valid;
      if (chk_valid) begin
        det_error <= (worst != DIAG_OK);
        diag      <= worst;
        col_mask  <= mask;
      end
    end
  end

  initial assert (N <= 16) else $error("col_mask holds at most 16 columns");

endmodule
