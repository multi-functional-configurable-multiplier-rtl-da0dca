// tb_cbm_core: streams random operations through the registered configurable
// Booth multiplier, one per cycle with random idle cycles, and compares every
// result with the integer model of tb_cbm_ref_pkg. Full-precision results are
// also compared with the plain products (A*B, AL*BL, AH*BH), truncated ones
// must stay within a few units of the exact product. The output must appear
// exactly two cycles after the input. Zero operands must give zero and leave
// the operand registers of their lane unloaded.
module tb_cbm_core;
  import tb_cbm_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [2:0]  cm = '0;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] p;
  int checks = 0, failures = 0, cycle = 0;
  int n_zero_gate = 0;
  // error statistics of truncated 16-bit results, in units of 2^16
  real err_sum = 0.0, err_max = 0.0;
  int  n_tr16 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cbm_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .cm(cm), .a(a), .b(b),
                .out_valid(out_valid), .p(p));

  typedef struct {logic [2:0] cm; logic [15:0] a, b; int t;} op_t;
  op_t q[$];

  function automatic logic [15:0] roperand();
    case ($urandom_range(5))
      0: return 16'h0000;
      1: return 16'($signed(8'($urandom)));
      2: return {8'h00, 8'($urandom)};
      3: return {8'($urandom), 8'h00};
      default: return 16'($urandom);
    endcase
  endfunction

  function automatic bit exact_ok(op_t o, logic [31:0] r);
    longint sa, sb;
    sa = longint'(signed'(o.a)); sb = longint'(signed'(o.b));
    case (o.cm)
      3'b111: return r == 32'(sa * sb);
      3'b101: return r == 32'(longint'(signed'(o.a[7:0])) * longint'(signed'(o.b[7:0])));
      3'b001, 3'b011:
        return r == {16'(longint'(signed'(o.a[15:8])) * longint'(signed'(o.b[15:8]))),
                     16'(longint'(signed'(o.a[7:0])) * longint'(signed'(o.b[7:0])))};
      3'b110: begin
        longint d = longint'(signed'(r)) - sa * sb;
        return d < 12 * 65536 && d > -12 * 65536;
      end
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      logic [31:0] e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        o = q.pop_front();
        e = ref_cbm(o.cm, o.a, o.b);
        if (o.cm == 3'b110 && o.a != 0 && o.b != 0) begin
          real d;
          d = (real'(longint'(signed'(p))) - real'(longint'(signed'(o.a)) * longint'(signed'(o.b)))) / 65536.0;
          err_sum += d;
          if ((d < 0 ? -d : d) > err_max) err_max = (d < 0 ? -d : d);
          n_tr16++;
        end
        if (p !== e || !exact_ok(o, p) || cycle - o.t != 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL cm=%b a=%h b=%h p=%h exp=%h latency=%0d", o.cm, o.a, o.b, p, e, cycle - o.t);
        end
      end
    end
  end

  initial begin
    logic [7:0] held;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      in_valid <= ($urandom_range(7) != 0);
      cm <= 3'($urandom);
      a  <= roperand();
      b  <= roperand();
      @(negedge clk);
      if (in_valid) q.push_back('{cm, a, b, cycle});
      held = dut.a_q[7:0];
      @(posedge clk);
      #1;
      // a lane whose product is zero keeps its operand register
      if (in_valid && (a[7:0] == 0 || b[7:0] == 0) && cm[2:1] != 2'b11) begin
        n_zero_gate++;
        checks++;
        if (dut.a_q[7:0] != held) failures++;
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_zero_gate == 0) failures++;
    if (n_tr16 > 0)
      $display("truncated 16-bit: %0d results, mean error %f, max |error| %f (units of 2^16)",
               n_tr16, err_sum / n_tr16, err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
