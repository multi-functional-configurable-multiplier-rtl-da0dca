// tb_vedic_mult8: exhaustive check of the configurable 8-bit Vedic multiplier
// in its three modes: a*b (single 8x8), a[3:0]*b[3:0] (single 4x4) and the two
// nibble products side by side (twin 4x4, mode 00 and 01).
module tb_vedic_mult8;
  logic [1:0]  mode;
  logic [7:0]  a, b;
  logic [15:0] p, e;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_mult8 dut (.mode(mode), .a(a), .b(b), .p(p));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          mode = 2'(m);
          a = 8'(i);
          b = 8'(j);
          #1;
          case (m)
            3:       e = 16'(i * j);
            2:       e = 16'((i % 16) * (j % 16));
            default: e = {8'((i / 16) * (j / 16)), 8'((i % 16) * (j % 16))};
          endcase
          checks++;
          if (p != e) begin
            failures++;
            if (failures < 10) $display("FAIL mode=%0d %0d*%0d p=%h exp=%h", m, i, j, p, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
