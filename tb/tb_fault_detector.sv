// tb_fault_detector: builds the accumulator snapshot for random weight
// checksums and each fault class (none, weight bit-flip, stuck bit in the
// array, stuck bit in an accumulator, LSB stuck at 1 seen by the zero vector)
// from the equations a = C_SA - C_A and a* = not(C_SA) + C_A, and checks the
// diagnosis, the faulty-column mask and the one-cycle latency.
module tb_fault_detector;
  import repair_pkg::*;
  localparam int N = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, chk_valid, det_valid, det_error;
  logic [31:0] chk_a [N], chk_an [N], chk_csa [N], chk_ncsa [N], chk_z [N];
  diag_e diag;
  logic [15:0] col_mask;
  int checks = 0, failures = 0;

  fault_detector #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // cls: 0 none, 1 weight flip, 2 array stuck bit, 3 accumulator stuck bit, 4 zero stuck
  task automatic scenario(input int cls, input int col);
    logic [31:0] ca, csa, ncsa, a, an, z;
    diag_e exp_d;
    for (int j = 0; j < N; j++) begin
      ca   = 32'($signed(8'($urandom))) * 3;
      csa  = ca;
      ncsa = ~ca;
      z    = 0;
      if (j == col) begin
        unique case (cls)
          1: begin csa = ca + 32'd16; ncsa = ~csa; end         // weight changed by 16
          2: begin                                              // stuck-at-1 in the array
               csa  = csa  | 32'h0000_0400;
               ncsa = ncsa | 32'h0000_0400;
             end
          4: z = 32'd1;
          default: ;
        endcase
      end
      a  = csa - ca;
      an = ncsa + ca;
      if (cls == 3 && j == col) begin
        a  = a | 32'h0000_0100;                                 // stuck in accumulator
        an = an | 32'h0000_0100;
      end
      chk_a[j] = a; chk_an[j] = an; chk_csa[j] = csa; chk_ncsa[j] = ncsa; chk_z[j] = z;
    end
    unique case (cls)
      0: exp_d = DIAG_OK;
      1: exp_d = DIAG_WEIGHT;
      3: exp_d = DIAG_ACC;
      default: exp_d = DIAG_SA;
    endcase
    @(negedge clk);
    chk_valid = 1;
    @(negedge clk);
    chk_valid = 0;
    chk(det_valid, "det_valid one cycle after chk_valid");
    chk(diag == exp_d, $sformatf("class %0d col %0d: diag %0d exp %0d", cls, col, diag, exp_d));
    chk(det_error == (cls != 0), "det_error");
    chk(col_mask == ((cls == 0) ? 16'd0 : 16'(1 << col)), $sformatf("mask %h", col_mask));
    @(negedge clk);
    chk(!det_valid, "det_valid is a pulse");
  endtask

  initial begin
    rst = 1; chk_valid = 0;
    for (int j = 0; j < N; j++) begin
      chk_a[j] = 0; chk_an[j] = '1; chk_csa[j] = 0; chk_ncsa[j] = '1; chk_z[j] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 40; r++) scenario(r % 5, $urandom_range(0, N - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
