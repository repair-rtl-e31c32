// tb_systolic_array: loads random weights through the shadow shift chain,
// activates them, streams random vectors followed by the three test vectors
// and checks every output vector against a reference product, including the
// 2N-1 cycle latency, the checksums C_SA = column sum of the weights and
// not(C_SA) = -C_SA-1 produced by the -1 injection, and the all-zero answer.
module tb_systolic_array;
  import repair_pkg::*;
  localparam int N = 14;
  localparam int L = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, w_shift_en, w_activate, out_valid, busy;
  vkind_e in_kind, out_kind;
  logic signed [7:0]  in_vec [N];
  logic [7:0]         w_row_in [N];
  logic signed [31:0] out_vec [N];
  int checks = 0, failures = 0;

  systolic_array #(.N(N)) dut (.*);

  logic signed [7:0] W [N][N];
  logic signed [7:0] X [L+3][N];
  vkind_e            K [L+3];
  int                t_in [L+3];
  int                cyc = 0;
  int                nout = 0;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // output checker
  always @(negedge clk) if (!rst && out_valid) begin
    int v;
    longint e;
    v = nout;
    nout++;
    chk(out_kind == K[v], $sformatf("kind of vector %0d", v));
    chk(cyc - t_in[v] == 2 * N - 1, $sformatf("latency of vector %0d: %0d", v, cyc - t_in[v]));
    for (int j = 0; j < N; j++) begin
      e = 0;
      for (int i = 0; i < N; i++) e += longint'(X[v][i]) * longint'(W[i][j]);
      if (K[v] == VK_MONES) e = e - 1;
      chk(out_vec[j] == 32'(e), $sformatf("v=%0d col %0d got %0d exp %0d", v, j, out_vec[j], e));
    end
  end

  initial begin
    rst = 1; in_valid = 0; in_kind = VK_DATA; w_shift_en = 0; w_activate = 0;
    for (int j = 0; j < N; j++) begin in_vec[j] = 0; w_row_in[j] = 0; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) W[i][j] = 8'($urandom);
    for (int v = 0; v < L; v++) begin
      K[v] = VK_DATA;
      for (int i = 0; i < N; i++) X[v][i] = 8'($urandom);
    end
    K[L] = VK_ONES; K[L+1] = VK_MONES; K[L+2] = VK_ZERO;
    for (int i = 0; i < N; i++) begin X[L][i] = 1; X[L+1][i] = -1; X[L+2][i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N; k++) begin
      w_shift_en = 1;
      for (int j = 0; j < N; j++) w_row_in[j] = W[N-1-k][j];
      @(negedge clk);
    end
    w_shift_en = 0;
    w_activate = 1;
    @(negedge clk);
    w_activate = 0;
    for (int v = 0; v < L + 3; v++) begin
      in_valid = 1; in_kind = K[v];
      for (int i = 0; i < N; i++) in_vec[i] = X[v][i];
      t_in[v] = cyc;
      @(negedge clk);
      if (v == 0) chk(busy, "busy while computing");
    end
    in_valid = 0;
    repeat (3 * N) @(negedge clk);
    chk(nout == L + 3, $sformatf("all vectors came out (%0d)", nout));
    chk(!busy, "idle after drain");
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
