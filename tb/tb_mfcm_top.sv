// tb_mfcm_top: end-to-end test of the multi-functional configurable
// multiplier at its default sizes.
//
// Booth side: random operations in all six configurations (16-bit, 8-bit,
// twin 8-bit; each full or truncated) are streamed one per cycle and checked
// against the integer model, with the two-cycle latency checked too. Then two
// directed sets are run: operands with a small dynamic range in one operand
// (two of the four sub-multipliers shut down) and in both operands (three of
// four shut down, product upper half supplied by the sign bit).
// Vedic side: random operations in its three modes, checked one cycle later.
// The test counts how often each mechanism fired (every mode, operand
// exchange, range shutdown, sign-bit guarding, operand-zero gating of each
// lane, non-zero error compensation) and fails for any that never did.
module tb_mfcm_top;
  import tb_cbm_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [2:0]  cm = '0;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] p;
  logic        v_in_valid = 0;
  logic [1:0]  v_mode = '0;
  logic [7:0]  v_a = '0, v_b = '0;
  logic        v_out_valid;
  logic [15:0] v_p;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mfcm_top dut (.*);

  typedef struct {logic [2:0] cm; logic [15:0] a, b; int t;} op_t;
  op_t q[$];
  typedef struct {logic [1:0] m; logic [7:0] a, b;} vop_t;
  vop_t vq[$];

  // mechanism counters
  int n_mode [8];
  int n_swap = 0, n_range_sd = 0, n_guard = 0, n_lz = 0, n_hz = 0, n_comp = 0;
  int n_sd2 = 0, n_sd3 = 0, n_vmode [4];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cbm.v_q) begin
      int nsd;
      n_mode[dut.u_cbm.cm_q]++;
      nsd = 0;
      for (int s = 0; s < 4; s++) begin
        if (dut.u_cbm.ctrl[s].sw) n_swap++;
        if (dut.u_cbm.ctrl[s].sd) nsd++;
      end
      if ((dut.u_cbm.ctrl[0].tr && dut.u_cbm.g_sub[0].u_mul.comp != 0) ||
          (dut.u_cbm.ctrl[1].tr && dut.u_cbm.g_sub[1].u_mul.comp != 0)) n_comp++;
      if (dut.u_cbm.cm_q == 3'b111 && !dut.u_cbm.lz_q) begin
        if (dut.u_cbm.ctrl[1].sd || dut.u_cbm.ctrl[2].sd) n_range_sd++;
        if (nsd == 2) n_sd2++;
        if (nsd == 3) n_sd3++;
        if (dut.u_cbm.guard) n_guard++;
      end
      if (dut.u_cbm.lz_q) n_lz++;
      if (dut.u_cbm.hz_q && dut.u_cbm.cm_q[2] == 1'b0) n_hz++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Booth result checker
  always @(posedge clk) if (rst_n && out_valid) begin
    op_t o;
    logic [31:0] e;
    checks++;
    if (q.size() == 0) failures++;
    else begin
      o = q.pop_front();
      e = ref_cbm(o.cm, o.a, o.b);
      if (p !== e || cycle - o.t != 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL cm=%b a=%h b=%h p=%h exp=%h latency=%0d", o.cm, o.a, o.b, p, e, cycle - o.t);
      end
    end
  end

  // Vedic result checker
  always @(posedge clk) if (rst_n && v_out_valid) begin
    vop_t o;
    logic [15:0] e;
    int i, j;
    checks++;
    if (vq.size() == 0) failures++;
    else begin
      o = vq.pop_front();
      i = int'(o.a); j = int'(o.b);
      case (o.m)
        2'b11:   e = 16'(i * j);
        2'b10:   e = 16'((i % 16) * (j % 16));
        default: e = {8'((i / 16) * (j / 16)), 8'((i % 16) * (j % 16))};
      endcase
      n_vmode[o.m]++;
      if (v_p != e) begin
        failures++;
        if (failures < 10) $display("FAIL vedic mode=%b %h*%h p=%h exp=%h", o.m, o.a, o.b, v_p, e);
      end
    end
  end

  function automatic logic [15:0] roperand();
    case ($urandom_range(5))
      0: return 16'h0000;
      1: return 16'($signed(8'($urandom)));
      2: return {8'h00, 8'($urandom)};
      3: return {8'($urandom), 8'h00};
      default: return 16'($urandom);
    endcase
  endfunction

  // drive one operation for one cycle, changing inputs on the falling edge
  task automatic issue(logic [2:0] c, logic [15:0] x, logic [15:0] y);
    @(negedge clk);
    in_valid = 1'b1;
    cm = c;
    a  = x;
    b  = y;
    q.push_back('{c, x, y, cycle});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      begin
        for (int i = 0; i < 3000; i++) issue(3'($urandom), roperand(), roperand());
        // one operand of small range: sub-multipliers on its high byte idle
        for (int i = 0; i < 50; i++)
          issue(3'b111, 16'($signed(7'($urandom))), 16'($urandom) | 16'h4000);
        // both operands of small range: only LL works, SB fills the upper half
        for (int i = 0; i < 50; i++)
          issue(3'b111, 16'($signed(8'($urandom_range(1, 255)))), 16'($signed(8'($urandom_range(1, 255)))));
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin
        for (int i = 0; i < 2000; i++) begin
          vop_t o;
          o = '{2'($urandom), 8'($urandom), 8'($urandom)};
          @(negedge clk);
          v_in_valid = 1'b1;
          v_mode = o.m; v_a = o.a; v_b = o.b;
          vq.push_back(o);
        end
        @(negedge clk);
        v_in_valid = 1'b0;
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || vq.size() != 0) failures++;
    $display("modes: 000=%0d 001=%0d 100=%0d 101=%0d 110=%0d 111=%0d", n_mode[0], n_mode[1],
             n_mode[4], n_mode[5], n_mode[6], n_mode[7]);
    $display("swaps=%0d range_shutdowns=%0d two_off=%0d three_off=%0d guarded=%0d",
             n_swap, n_range_sd, n_sd2, n_sd3, n_guard);
    $display("zero_gated_low=%0d zero_gated_high=%0d compensations=%0d", n_lz, n_hz, n_comp);
    $display("vedic modes: 00=%0d 01=%0d 10=%0d 11=%0d", n_vmode[0], n_vmode[1], n_vmode[2], n_vmode[3]);
    foreach (n_mode[m]) if (m != 2 && m != 3) begin
      checks++;
      if (n_mode[m] == 0) failures++;
    end
    foreach (n_vmode[m]) begin
      checks++;
      if (n_vmode[m] == 0) failures++;
    end
    for (int k = 0; k < 8; k++) begin
      int n;
      case (k)
        0: n = n_swap;  1: n = n_range_sd; 2: n = n_sd2; 3: n = n_sd3;
        4: n = n_guard; 5: n = n_lz;       6: n = n_hz;  default: n = n_comp;
      endcase
      checks++;
      if (n == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
