// cbm_core: 16-bit configurable Booth multiplier (CBM).
//
// One signed 16x16 product, one signed 8x8 product of the low bytes, or two
// independent signed 8x8 products per cycle, each either full or truncated to
// its upper half with error compensation (CM[2:0], see cbm_pkg). Structure:
//
//   a, b, cm --> SBG --> lane load enables, SB, zero flags
//            --> input registers (two byte lanes)
//            --> DRD --> four cbm_booth8 (LL, LH, HL, HH) --> cbm_combine
//            --> output register
//
// Power management, as in the architecture:
//   * operand-zero shutdown: when the SBG sees a zero operand in a lane, that
//     lane's input registers are not loaded (their enable stands for a clock
//     gate) and the lane's output register is loaded with zero directly;
//   * the DRD shuts down sub-multipliers the mode or the operand range does not
//     need and picks the Booth-encoded operand;
//   * sign-extension bits of short products come from SB (partially guarded).
//
// Interface: a valid-qualified input (in_valid with cm, a, b) and a
// valid-qualified output (out_valid with p). There is no back-pressure; one
// operation can enter every cycle and its result appears two clock edges
// later (latency 2, throughput 1 per cycle). Reset is asynchronous, active
// low, and clears the valid bits, the flags and the output register. The
// register placement, handshake and reset are this design's choices.
// An assertion checks that a shut-down sub-multiplier stays quiet; its
// "disable iff (!rst_n)" is why lint reports rst_n as used both
// asynchronously and synchronously; no logic uses it synchronously.
module cbm_core
  import cbm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2:0]           cm,
  input  logic [OpWidth-1:0]   a,
  input  logic [OpWidth-1:0]   b,
  output logic                 out_valid,
  output logic [ProdWidth-1:0] p
);
  localparam int unsigned BW = ByteWidth;
  localparam int unsigned HW = OpWidth;

  // SBG on the incoming operands
  logic sb_in, lz_in, hz_in;
  cbm_sbg u_sbg (
    .cm(cm), .a(a), .b(b), .sb(sb_in), .lz(lz_in), .hz(hz_in)
  );

  // Stage 1: input registers, one enable per byte lane
  logic          en_lo, en_hi;
  logic [2:0]    cm_q;
  logic [HW-1:0] a_q, b_q;
  logic          v_q, sb_q, lz_q, hz_q;

  assign en_lo = in_valid & ~lz_in;
  assign en_hi = in_valid & ~hz_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      cm_q <= 3'b111;
      sb_q <= 1'b0;
      lz_q <= 1'b1;
      hz_q <= 1'b1;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        cm_q <= cm;
        sb_q <= sb_in;
        lz_q <= lz_in;
        hz_q <= hz_in;
      end
    end
  end

  // operand lanes: no reset, loaded only when the lane does real work
  always_ff @(posedge clk) begin
    if (en_lo) begin
      a_q[BW-1:0] <= a[BW-1:0];
      b_q[BW-1:0] <= b[BW-1:0];
    end
    if (en_hi) begin
      a_q[HW-1:BW] <= a[HW-1:BW];
      b_q[HW-1:BW] <= b[HW-1:BW];
    end
  end

  // Stage 2: DRD, sub-multipliers, combiner
  sub_ctrl_t            ctrl [4];
  logic                 guard;
  logic [SubWidth-1:0]  sp [4];
  logic [Digits-1:0]    nz [4];
  logic [BW-1:0]        a_byte [4];
  logic [BW-1:0]        b_byte [4];
  logic [ProdWidth-1:0] prod;

  cbm_drd u_drd (
    .cm(cm_q), .a(a_q), .b(b_q), .ctrl(ctrl), .guard(guard)
  );

  assign a_byte[SUB_LL] = a_q[BW-1:0];
  assign b_byte[SUB_LL] = b_q[BW-1:0];
  assign a_byte[SUB_LH] = a_q[BW-1:0];
  assign b_byte[SUB_LH] = b_q[HW-1:BW];
  assign a_byte[SUB_HL] = a_q[HW-1:BW];
  assign b_byte[SUB_HL] = b_q[BW-1:0];
  assign a_byte[SUB_HH] = a_q[HW-1:BW];
  assign b_byte[SUB_HH] = b_q[HW-1:BW];

  for (genvar i = 0; i < 4; i++) begin : g_sub
    cbm_booth8 u_mul (
      .a   (a_byte[i]),
      .b   (b_byte[i]),
      .ctrl(ctrl[i]),
      .p   (sp[i]),
      .nz  (nz[i])
    );
    // a shut-down sub-multiplier must not switch: no digit, zero product
    a_shutdown_quiet : assert property (@(posedge clk) disable iff (!rst_n)
      (v_q && ctrl[i].sd) |-> (sp[i] == '0 && nz[i] == '0));
  end

  cbm_combine u_comb (
    .cm(cm_q), .guard(guard), .sb(sb_q), .sp(sp), .p(prod)
  );

  // Output register: a lane whose operand was zero is loaded with zero.
  logic hi_zero;
  assign hi_zero = (decode_mode(cm_q[2:1]) == MODE_TWIN8) ? hz_q : lz_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        p[HW-1:0]        <= lz_q    ? '0 : prod[HW-1:0];
        p[ProdWidth-1:HW] <= hi_zero ? '0 : prod[ProdWidth-1:HW];
      end
    end
  end

endmodule
