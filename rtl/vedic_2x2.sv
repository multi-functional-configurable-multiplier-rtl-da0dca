// vedic_2x2: 2x2 unsigned multiplier in the Urdhva-Tiryagbhyam ("vertically
// and crosswise") form, the leaf of the Vedic multiplier.
//
// p0 is the vertical product a0&b0; the crosswise products a1&b0 and a0&b1
// are added by a half adder into p1 and a carry; that carry and the vertical
// product a1&b1 go through a second half adder into p2 and p3. Four AND gates
// and two half adders, as in the classic 2x2 Vedic cell. Combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  always_comb begin
    p[0] = a[0] & b[0];
    p[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    c1   = (a[1] & b[0]) & (a[0] & b[1]);
    p[2] = (a[1] & b[1]) ^ c1;
    p[3] = (a[1] & b[1]) & c1;
  end

endmodule
