// tb_cbm_drd: checks the per-sub-multiplier control words of cbm_drd
// (signedness, shutdown, truncation, operand exchange) and the guard flag in
// every mode, using operands drawn so that short (signed-byte) values, which
// trigger range shutdown, occur often.
module tb_cbm_drd;
  import cbm_pkg::*;
  import tb_cbm_ref_pkg::*;
  logic [2:0]  cm;
  logic [15:0] a, b;
  sub_ctrl_t   ctrl [4];
  logic        guard;
  int checks = 0, failures = 0;
  int range_sd = 0, swaps = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_drd dut (.cm(cm), .a(a), .b(b), .ctrl(ctrl), .guard(guard));

  function automatic logic [15:0] roperand();
    case ($urandom_range(2))
      0: return 16'($signed(8'($urandom)));   // fits a signed byte
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m16, m8, tr, sa, sbb;
    bit [3:0] esd, etr, eas, ebs, esw;
    int ab [4], bb [4], x, y;
    for (int i = 0; i < 5000; i++) begin
      cm = 3'($urandom);
      a  = roperand();
      b  = roperand();
      #1;
      m16 = (cm[2:1] == 2'b11);
      m8  = (cm[2:1] == 2'b10);
      tr  = ~cm[0];
      sa  = (signed'(a) >= -128) && (signed'(a) <= 127);
      sbb = (signed'(b) >= -128) && (signed'(b) <= 127);
      if (m16) begin
        eas = {2'b11, sa, sa};
        ebs = {1'b1, sbb, 1'b1, sbb};
        esd = {sa | sbb, sa, sbb, tr};
        etr = {1'b0, tr, tr, 1'b0};
      end else if (m8) begin
        eas = 4'hF; ebs = 4'hF; esd = 4'b1110; etr = {3'b0, tr};
      end else begin
        eas = 4'hF; ebs = 4'hF; esd = 4'b0110; etr = {tr, 2'b0, tr};
      end
      ab[0] = int'(a[7:0]);  bb[0] = int'(b[7:0]);
      ab[1] = int'(a[7:0]);  bb[1] = int'(b[15:8]);
      ab[2] = int'(a[15:8]); bb[2] = int'(b[7:0]);
      ab[3] = int'(a[15:8]); bb[3] = int'(b[15:8]);
      for (int s = 0; s < 4; s++) begin
        x = (eas[s] && ab[s] >= 128) ? ab[s] - 256 : ab[s];
        y = (ebs[s] && bb[s] >= 128) ? bb[s] - 256 : bb[s];
        esw[s] = !esd[s] && (ref_zero_digits(x) > ref_zero_digits(y));
        checks++;
        if (ctrl[s].a_sgn != eas[s] || ctrl[s].b_sgn != ebs[s] || ctrl[s].sd != esd[s]
            || ctrl[s].tr != etr[s] || ctrl[s].sw != esw[s]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cm=%b a=%h b=%h sub=%0d ctrl=%b exp as=%b bs=%b sw=%b sd=%b tr=%b",
                     cm, a, b, s, ctrl[s], eas[s], ebs[s], esw[s], esd[s], etr[s]);
        end
        if (esw[s]) swaps++;
      end
      checks++;
      if (guard != (m16 && sa && sbb)) failures++;
      if (m16 && (sa || sbb)) range_sd++;
    end
    checks++;
    if (range_sd == 0 || swaps == 0) failures++;
    $display("range shutdowns=%0d swaps=%0d", range_sd, swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
