// cbm_booth8: byte-level radix-4 Booth sub-multiplier of the configurable
// Booth multiplier.
//
// Each byte is extended to ExtWidth (9) bits, by its sign bit when the DRD
// marks it signed and by 0 when it is the unsigned low part of a 16-bit
// operand, so one circuit serves all four byte pairs. Then:
//   * shutdown (sd): both operands are forced to zero, so every partial product
//     and carry stays at zero and the block does not switch;
//   * switching (sw): the operands are exchanged, so the operand with more
//     zero Booth groups becomes the Booth-encoded multiplier;
//   * the multiplier is recoded into Digits (5) radix-4 digits; row k is the
//     multiplicand times {0, +-1, +-2}, formed as the (inverted, for negative
//     digits) 10-bit magnitude, sign-extended, at weight 4^k, plus a negation
//     bit at column 2k;
//   * truncation (tr): all row bits and negation bits in columns below
//     TRUNC_COLS are omitted and cbm_err_comp adds its compensation at column
//     TRUNC_COLS. The result then has zeros in bits [TRUNC_COLS-1:0].
// p is the signed SubWidth (18)-bit sum of the rows. Booth recoding, operand
// exchange, shutdown by zeroing and truncation with compensation follow the
// architecture; the 9-bit extension and the row format are this design's.
// Purely combinational.
module cbm_booth8
  import cbm_pkg::*;
#(
  parameter int unsigned TRUNC_COLS = ByteWidth  // columns omitted when truncating
) (
  input  logic [ByteWidth-1:0] a,
  input  logic [ByteWidth-1:0] b,
  input  sub_ctrl_t            ctrl,
  output logic [SubWidth-1:0]  p,
  output logic [Digits-1:0]    nz     // per-digit non-zero flags (activity)
);
  localparam int unsigned EW    = ExtWidth;
  localparam int unsigned PW    = SubWidth;
  localparam int unsigned TROWS = (TRUNC_COLS + 1) / 2;  // rows with a bit below TRUNC_COLS
  localparam int unsigned CW    = $clog2(TROWS + 2);

  logic [EW-1:0]     xa, yb, mcand, mplier;
  logic [2*Digits:0] me;          // multiplier with implicit 0 and extension
  booth_digit_t      dig [Digits];
  logic [EW:0]       mag [Digits];
  logic [PW-1:0]     row [Digits];
  logic [PW-1:0]     negv;        // negation bits placed at their columns
  logic [PW-1:0]     keep;        // columns kept
  logic [CW-1:0]     comp;
  logic [PW-1:0]     sum;

  always_comb begin
    xa     = {ctrl.a_sgn & a[ByteWidth-1], a};
    yb     = {ctrl.b_sgn & b[ByteWidth-1], b};
    if (ctrl.sd) begin
      xa = '0;
      yb = '0;
    end
    mcand  = ctrl.sw ? yb : xa;
    mplier = ctrl.sw ? xa : yb;
    me     = {{(2*Digits-EW){mplier[EW-1]}}, mplier, 1'b0};
    keep   = ctrl.tr ? ({PW{1'b1}} << TRUNC_COLS) : {PW{1'b1}};
    negv   = '0;
    for (int k = 0; k < Digits; k++) begin
      dig[k] = booth_encode(me[2*k+2 -: 3]);
      nz[k]  = dig[k].one | dig[k].two;
      mag[k] = dig[k].two ? {mcand, 1'b0} :
               dig[k].one ? {mcand[EW-1], mcand} : '0;
      if (dig[k].neg) mag[k] = ~mag[k];
      row[k] = (PW'({{(PW-EW-1){mag[k][EW]}}, mag[k]}) << (2 * k)) & keep;
      negv[2*k] = dig[k].neg;
    end
    negv = negv & keep;
  end

  cbm_err_comp #(.ROWS(TROWS)) u_comp (
    .nz  (nz[TROWS-1:0]),
    .comp(comp)
  );

  always_comb begin
    sum = negv;
    for (int k = 0; k < Digits; k++) sum = sum + row[k];
    if (ctrl.tr) sum = sum + (PW'(comp) << TRUNC_COLS);
    p = sum;
  end

endmodule
