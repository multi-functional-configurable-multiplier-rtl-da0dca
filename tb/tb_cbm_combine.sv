// tb_cbm_combine: checks the product combiner with random sub-products. The
// expected 32-bit word is formed with integer weights: HH*2^16 + (LH+HL)*2^8
// + LL in 16-bit mode, the kept upper halves when truncating, SB in the sign
// positions of guarded and 8-bit products, and the two lanes side by side in
// twin mode.
module tb_cbm_combine;
  import cbm_pkg::*;
  logic [2:0]  cm;
  logic        guard, sb;
  logic [17:0] sp [4];
  logic [31:0] p, e;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_combine dut (.cm(cm), .guard(guard), .sb(sb), .sp(sp), .p(p));

  function automatic longint sx18(logic [17:0] v);
    return longint'(signed'(v));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hh, lh, hl, ll;
    for (int i = 0; i < 5000; i++) begin
      cm = 3'($urandom);
      guard = 1'($urandom);
      sb = 1'($urandom);
      for (int s = 0; s < 4; s++) sp[s] = 18'($urandom);
      if (~cm[0]) begin  // truncated sub-products arrive with a clear low byte
        sp[SUB_LH][7:0] = '0;
        sp[SUB_HL][7:0] = '0;
        if (cm[2:1] != 2'b11) begin
          sp[SUB_LL][7:0] = '0;
          sp[SUB_HH][7:0] = '0;
        end
      end
      #1;
      hh = sx18(sp[SUB_HH]); lh = sx18(sp[SUB_LH]);
      hl = sx18(sp[SUB_HL]); ll = sx18(sp[SUB_LL]);
      if (cm[2:1] == 2'b11) begin
        if (~cm[0])      e = {16'(hh * 65536 + (lh + hl) * 256 >>> 16), 16'h0};
        else if (guard)  e = {{16{sb}}, 16'(ll)};
        else             e = 32'(hh * 65536 + (lh + hl) * 256 + ll);
      end else if (cm[2:1] == 2'b10) begin
        if (~cm[0]) e = 32'((longint'(signed'(16'(ll))) >>> 8) * 256);
        else        e = {{16{sb}}, 16'(ll)};
      end else begin
        e = {16'(hh), 16'(ll)};
        if (~cm[0]) begin
          e[23:16] = 8'h00;
          e[7:0]   = 8'h00;
        end
      end
      checks++;
      if (p !== e) begin
        failures++;
        if (failures < 10) $display("FAIL cm=%b guard=%b sb=%b p=%h exp=%h", cm, guard, sb, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
