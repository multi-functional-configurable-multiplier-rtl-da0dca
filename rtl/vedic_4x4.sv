// vedic_4x4: 4x4 unsigned Vedic multiplier built from four vedic_2x2 cells.
//
// With a = aH*4 + aL and b = bH*4 + bL the four 2x2 cells form aL*bL,
// aH*bL, aL*bH and aH*bH; the vertical products go to weights 1 and 16, the
// two crosswise products are summed (xsum) and added at weight 4. The two-level
// adder arrangement follows the usual Vedic 4x4 structure. Combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [4:0] xsum;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  always_comb begin
    xsum = 5'(q1) + 5'(q2);
    p     = {q3, q0} + (8'(xsum) << 2);
  end

endmodule
