// cbm_pkg: shared types and constants of the 16-bit configurable Booth
// multiplier (CBM).
//
// The multiplier is configured by a 3-bit word CM[2:0]. CM[2:1] picks the
// operation: 11 = one signed 16x16 product, 10 = one signed 8x8 product of the
// low bytes, 00 = two independent signed 8x8 products (high bytes and low
// bytes). CM[0] = 1 keeps the full product, CM[0] = 0 truncates it to its upper
// half and adds an error-compensation value. The encoding CM[2:1] = 01 is not
// defined by the architecture; this implementation treats it like 00 (twin).
//
// The 16x16 product is built from four byte-level Booth sub-multipliers,
// indexed here as A-byte x B-byte: LL = A[7:0]*B[7:0], LH = A[7:0]*B[15:8],
// HL = A[15:8]*B[7:0], HH = A[15:8]*B[15:8].
package cbm_pkg;

  localparam int unsigned OpWidth   = 16;             // operand width
  localparam int unsigned ByteWidth = 8;              // sub-multiplier operand width
  localparam int unsigned ExtWidth  = ByteWidth + 1;  // byte with sign/zero extension
  localparam int unsigned Digits    = (ExtWidth + 1) / 2;  // radix-4 Booth digits
  localparam int unsigned SubWidth  = 2 * ExtWidth;   // sub-product width (18)
  localparam int unsigned ProdWidth = 2 * OpWidth;    // product width (32)

  typedef enum logic [1:0] {
    MODE_TWIN8    = 2'b00,
    MODE_RSVD     = 2'b01,
    MODE_SINGLE8  = 2'b10,
    MODE_SINGLE16 = 2'b11
  } cbm_mode_e;

  // Index of each sub-multiplier in the per-sub arrays.
  typedef enum logic [1:0] {
    SUB_LL = 2'd0,
    SUB_LH = 2'd1,
    SUB_HL = 2'd2,
    SUB_HH = 2'd3
  } sub_idx_e;

  // Control word the dynamic-range detector hands to one sub-multiplier.
  typedef struct packed {
    logic a_sgn;  // A byte is a signed (sign-extended) value
    logic b_sgn;  // B byte is a signed (sign-extended) value
    logic sw;     // exchange operands before Booth encoding
    logic sd;     // shut the sub-multiplier down (all partial products zero)
    logic tr;     // truncate: omit partial-product columns below ByteWidth
  } sub_ctrl_t;

  // Radix-4 Booth digit in sign/magnitude form.
  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| = 1
    logic two;  // |digit| = 2
  } booth_digit_t;

  // Encode the overlapping group {b[2k+1], b[2k], b[2k-1]}.
  function automatic booth_digit_t booth_encode(input logic [2:0] grp);
    booth_digit_t d;
    d.one = grp[1] ^ grp[0];
    d.two = (grp == 3'b011) || (grp == 3'b100);
    d.neg = grp[2] & ~(grp[1] & grp[0]);
    return d;
  endfunction

  // CM[2:1] = 01 behaves like twin mode.
  function automatic cbm_mode_e decode_mode(input logic [1:0] cm_hi);
    return (cm_hi == MODE_RSVD) ? MODE_TWIN8 : cbm_mode_e'(cm_hi);
  endfunction

endpackage
