// tb_cbm_switch_logic: checks the zero-group counts and the exchange decision
// of cbm_switch_logic over all 9-bit values of each operand against the
// integer Booth-digit model (a digit is zero when its group is 000 or 111).
module tb_cbm_switch_logic;
  import tb_cbm_ref_pkg::*;
  logic [8:0] x, y;
  logic [2:0] zx, zy;
  logic       sw;
  int checks = 0, failures = 0;
  int ex, ey;
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_switch_logic dut (.x(x), .y(y), .zx(zx), .zy(zy), .sw(sw));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      x = 9'(i);
      y = 9'($urandom);
      #1;
      ex = ref_zero_digits(i >= 256 ? i - 512 : i);
      ey = ref_zero_digits(int'(y) >= 256 ? int'(y) - 512 : int'(y));
      checks++;
      if (int'(zx) != ex || int'(zy) != ey || sw != (ex > ey)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h zx=%0d/%0d zy=%0d/%0d sw=%b", x, y, zx, ex, zy, ey, sw);
      end
    end
    // directed: 0 has five zero groups, -1 four (its lowest group is 110)
    x = 9'h000; y = 9'h0AA; #1; checks++; if (!(sw && zx == 5)) failures++;
    x = 9'h1FF; y = 9'h1FF; #1; checks++; if (sw || zx != 4 || zy != 4) failures++;
    x = 9'h0AA; y = 9'h000; #1; checks++; if (sw) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
