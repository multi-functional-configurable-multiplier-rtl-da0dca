// tb_cbm_sbg: checks the sign bit and the lane zero flags of cbm_sbg in all
// modes, with random operands in which bytes are often zero.
module tb_cbm_sbg;
  import cbm_pkg::*;
  logic [2:0]  cm;
  logic [15:0] a, b;
  logic        sb, lz, hz;
  logic        esb, elz, ehz;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_sbg dut (.cm(cm), .a(a), .b(b), .sb(sb), .lz(lz), .hz(hz));

  function automatic logic [7:0] rbyte();
    return ($urandom_range(3) == 0) ? 8'h00 : 8'($urandom);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      cm = 3'($urandom);
      a  = {rbyte(), rbyte()};
      b  = {rbyte(), rbyte()};
      #1;
      case (cm[2:1])
        2'b11: begin
          elz = (a == 0) || (b == 0);
          ehz = elz;
          esb = !elz && ((signed'(a) < 0) != (signed'(b) < 0));
        end
        2'b10: begin
          elz = (a[7:0] == 0) || (b[7:0] == 0);
          ehz = 1'b1;
          esb = !elz && ((signed'(a[7:0]) < 0) != (signed'(b[7:0]) < 0));
        end
        default: begin
          elz = (a[7:0] == 0) || (b[7:0] == 0);
          ehz = (a[15:8] == 0) || (b[15:8] == 0);
          esb = !elz && ((signed'(a[7:0]) < 0) != (signed'(b[7:0]) < 0));
        end
      endcase
      checks++;
      if (sb != esb || lz != elz || hz != ehz) begin
        failures++;
        if (failures < 10) $display("FAIL cm=%b a=%h b=%h sb=%b lz=%b hz=%b", cm, a, b, sb, lz, hz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
