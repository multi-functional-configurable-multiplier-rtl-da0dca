// vedic_mult8: 8-bit unsigned configurable Vedic multiplier.
//
// Four vedic_4x4 blocks form aL*bL, aH*bL, aL*bH and aH*bH (nibbles of the
// 8-bit operands); an 8x8 product is q0 + (q1 + q2)*16 + q3*256. Like the
// Booth multiplier it is configurable, with a mode word of the same meaning
// as the Booth multiplier's CM[2:1]:
//   2'b11  single 8x8:  p = a * b
//   2'b10  single 4x4:  p = {8'b0, a[3:0] * b[3:0]}
//   2'b00  twin 4x4:    p = {a[7:4] * b[7:4], a[3:0] * b[3:0]} (01 likewise)
// The inputs of 4x4 blocks a mode does not use are held at zero so that they
// do not switch. Unsigned-only operation and the 2x2 -> 4x4 -> 8x8 build-up
// follow the architecture; the mode set mirroring the Booth multiplier is this
// design's reading of its "serial and parallel" 8-bit multiplier.
// Combinational.
module vedic_mult8 (
  input  logic [1:0]  mode,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic        full, twin;
  logic [3:0]  al, ah, bl, bh, ax, bx;  // ax/bx: xsum-block operands
  logic [7:0]  q0, q1, q2, q3;
  logic [8:0]  xsum;

  always_comb begin
    full = (mode == 2'b11);
    twin = ~mode[1];
    al = a[3:0];
    bl = b[3:0];
    ah = (full | twin) ? a[7:4] : 4'd0;
    bh = (full | twin) ? b[7:4] : 4'd0;
    ax = full ? a[7:4] : 4'd0;
    bx = full ? b[7:4] : 4'd0;
  end

  vedic_4x4 u_ll (.a(al), .b(bl), .p(q0));
  vedic_4x4 u_hl (.a(ax), .b(bl), .p(q1));
  vedic_4x4 u_lh (.a(al), .b(bx), .p(q2));
  vedic_4x4 u_hh (.a(ah), .b(bh), .p(q3));

  always_comb begin
    xsum = 9'(q1) + 9'(q2);
    if (full)      p = {q3, q0} + (16'(xsum) << 4);
    else if (twin) p = {q3, q0};
    else           p = {8'd0, q0};
  end

endmodule
