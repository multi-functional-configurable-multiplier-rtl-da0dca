// cbm_drd: dynamic-range detector (DRD) of the configurable Booth multiplier.
//
// For each of the four byte-level sub-multipliers (LL, LH, HL, HH; A byte x
// B byte) it produces one control word (cbm_pkg::sub_ctrl_t):
//   sd     - shutdown. Set for sub-multipliers the mode does not use (LH, HL,
//            HH in single 8-bit mode; LH, HL in twin mode; LL in truncated
//            16-bit mode, whose product lies wholly below the kept half) and,
//            in 16-bit mode, for those made redundant by the operand range:
//            an operand whose bits [15:7] are all equal fits in a signed byte,
//            so its high byte carries only sign extension. Its low byte is then
//            used as a signed byte and the sub-multipliers on its high byte
//            are shut down.
//   a_sgn/b_sgn - whether the byte is signed (high bytes, short operands, 8-bit
//            modes) or an unsigned low part of a 16-bit operand.
//   sw     - operand exchange, from one cbm_switch_logic per sub-multiplier.
//   tr     - truncation (CM[0] = 0): LH and HL in 16-bit mode, LL (and HH in
//            twin mode) in the 8-bit modes.
// guard = 1 flags a 16-bit product that fits in 16 bits (both operands short);
// its upper half is then the sign bit SB rather than computed.
// The signal names and roles follow the architecture; the range test (signed
// byte fit) and the shutdown table are this design's. Purely combinational.
module cbm_drd
  import cbm_pkg::*;
(
  input  logic [2:0]          cm,
  input  logic [OpWidth-1:0]  a,
  input  logic [OpWidth-1:0]  b,
  output sub_ctrl_t           ctrl [4],
  output logic                guard
);
  localparam int unsigned BW = ByteWidth;
  localparam int unsigned CW = $clog2(Digits + 1);

  cbm_mode_e         mode;
  logic              trunc, short_a, short_b;
  logic [BW-1:0]     a_byte [4];
  logic [BW-1:0]     b_byte [4];
  logic [ExtWidth-1:0] xe [4];
  logic [ExtWidth-1:0] ye [4];
  logic [3:0]        sw;
  logic [3:0]        sd;
  logic [3:0]        tr;
  logic [3:0]        as;
  logic [3:0]        bs;

  always_comb begin
    mode    = decode_mode(cm[2:1]);
    trunc   = ~cm[0];
    short_a = (&a[OpWidth-1:BW-1]) | ~(|a[OpWidth-1:BW-1]);
    short_b = (&b[OpWidth-1:BW-1]) | ~(|b[OpWidth-1:BW-1]);
    a_byte[SUB_LL] = a[BW-1:0];       b_byte[SUB_LL] = b[BW-1:0];
    a_byte[SUB_LH] = a[BW-1:0];       b_byte[SUB_LH] = b[OpWidth-1:BW];
    a_byte[SUB_HL] = a[OpWidth-1:BW]; b_byte[SUB_HL] = b[BW-1:0];
    a_byte[SUB_HH] = a[OpWidth-1:BW]; b_byte[SUB_HH] = b[OpWidth-1:BW];
    guard = 1'b0;
    unique case (mode)
      MODE_SINGLE16: begin
        // index order: {HH, HL, LH, LL}
        as    = {1'b1, 1'b1, short_a, short_a};
        bs    = {1'b1, short_b, 1'b1, short_b};
        sd    = {short_a | short_b, short_a, short_b, trunc};
        tr    = {1'b0, trunc, trunc, 1'b0};
        guard = short_a & short_b;
      end
      MODE_SINGLE8: begin
        as = 4'b1111;
        bs = 4'b1111;
        sd = 4'b1110;
        tr = {3'b000, trunc};
      end
      default: begin  // twin 8-bit
        as = 4'b1111;
        bs = 4'b1111;
        sd = 4'b0110;
        tr = {trunc, 2'b00, trunc};
      end
    endcase
    for (int i = 0; i < 4; i++) begin
      xe[i] = {as[i] & a_byte[i][BW-1], a_byte[i]};
      ye[i] = {bs[i] & b_byte[i][BW-1], b_byte[i]};
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_sw
    logic [CW-1:0] zx, zy;
    cbm_switch_logic u_sw (
      .x (xe[i]),
      .y (ye[i]),
      .zx(zx),
      .zy(zy),
      .sw(sw[i])
    );
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ctrl[i].a_sgn = as[i];
      ctrl[i].b_sgn = bs[i];
      ctrl[i].sw    = sw[i] & ~sd[i];
      ctrl[i].sd    = sd[i];
      ctrl[i].tr    = tr[i];
    end
  end

endmodule
