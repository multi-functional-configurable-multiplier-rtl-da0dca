// tb_cbm_booth8: checks the byte-level Booth sub-multiplier against integer
// arithmetic. Full precision: p must equal x*y for every signedness, with and
// without operand exchange. Shutdown: p must be 0. Truncated: p must match the
// column-truncation model, stay within 5 units of 2^8 of the exact product,
// and the compensation must bring the average error below that of plain
// truncation.
module tb_cbm_booth8;
  import cbm_pkg::*;
  import tb_cbm_ref_pkg::*;
  logic [7:0]  a, b;
  sub_ctrl_t   ctrl;
  logic [17:0] p;
  logic [4:0]  nz;
  int checks = 0, failures = 0;
  longint sum_err = 0, sum_plain = 0, ntr = 0;  // truncation error statistics
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_booth8 dut (.a(a), .b(b), .ctrl(ctrl), .p(p), .nz(nz));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, mc, mp, got, exp, err;
    for (int i = 0; i < 20000; i++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      ctrl = sub_ctrl_t'($urandom);
      if (i < 65536 / 4 && i % 2 == 0) ctrl.sd = 1'b0;
      #1;
      x  = (ctrl.a_sgn && a[7]) ? int'(a) - 256 : int'(a);
      y  = (ctrl.b_sgn && b[7]) ? int'(b) - 256 : int'(b);
      got = int'(signed'(p));
      checks++;
      if (ctrl.sd) begin
        if (p != 0) begin
          failures++;
          if (failures < 10) $display("FAIL shutdown p=%h", p);
        end
        continue;
      end
      mc  = ctrl.sw ? y : x;
      mp  = ctrl.sw ? x : y;
      exp = ref_sub(mc, mp, ctrl.tr);
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h ctrl=%b p=%0d exp=%0d", a, b, ctrl, got, exp);
      end
      if (ctrl.tr) begin
        err = got - x * y;
        checks++;
        if (err > 5 * 256 || err < -5 * 256) failures++;
        sum_err   += longint'(err);
        sum_plain += ((x * y) >>> 8) * 256 - x * y;   // plain floor truncation
        ntr++;
      end
    end
    $display("truncated: %0d results, mean error %0d, mean error of floor truncation %0d (units of 1)", ntr,
             sum_err / ntr, sum_plain / ntr);
    checks++;
    if ((sum_err < 0 ? -sum_err : sum_err) / ntr > 128) failures++;
    // directed extremes
    ctrl = '{a_sgn: 1, b_sgn: 1, sw: 0, sd: 0, tr: 0};
    a = 8'h80; b = 8'h80; #1; checks++; if (int'(signed'(p)) != 16384) failures++;
    ctrl = '{a_sgn: 0, b_sgn: 0, sw: 1, sd: 0, tr: 0};
    a = 8'hFF; b = 8'hFF; #1; checks++; if (int'(signed'(p)) != 65025) failures++;
    ctrl = '{a_sgn: 1, b_sgn: 0, sw: 0, sd: 0, tr: 0};
    a = 8'h80; b = 8'hFF; #1; checks++; if (int'(signed'(p)) != -128 * 255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
