// tb_simd_add48: random operands; each lane of the sum is compared with an
// independent lane-wise addition, and a carry out of the data lane must not
// reach the checksum lane.
module tb_simd_add48;
  logic [47:0] a, b, s;
  int checks = 0, failures = 0;

  simd_add48 dut (.a(a), .b(b), .sum(s));

  task automatic check(input logic [47:0] ea, input logic [47:0] eb);
    logic [31:0] elo;
    logic [15:0] ehi;
    a = ea; b = eb;
    #1;
    elo = ea[31:0] + eb[31:0];
    ehi = ea[47:32] + eb[47:32];
    checks++;
    if (s !== {ehi, elo}) begin
      failures++;
      $display("FAIL a=%h b=%h got %h exp %h", ea, eb, s, {ehi, elo});
    end
  endtask

  initial begin
    check(48'h0000_FFFF_FFFF, 48'h0000_0000_0001); // data carry must vanish
    check(48'h0001_8000_0000, 48'h0002_8000_0000);
    check(48'hFFFF_0000_0005, 48'h0001_FFFF_FFFB);
    for (int i = 0; i < 500; i++)
      check({$urandom(), $urandom()}, {$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
