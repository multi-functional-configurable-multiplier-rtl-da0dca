// cbm_switch_logic: operand-exchange decision for one byte-level Booth
// multiplication.
//
// Each operand arrives already sign- or zero-extended to ExtWidth (9) bits.
// The operand is cut into the overlapping 3-bit radix-4 Booth groups
// {x[2k+1], x[2k], x[2k-1]} (x[-1] = 0, bits above the MSB repeat it). A group
// made of three equal bits (000 or 111) encodes a zero digit, i.e. a zero
// partial product; one comparator per group detects it. The zero groups of each
// operand are counted and the counts compared: sw = 1 when the multiplicand
// operand x has more zero groups than the default multiplier y, so that after
// the exchange the operand with more zero partial products is Booth-encoded.
// The group comparators and the exchange rule follow the architecture; counting
// and comparing the counts (ties keep the default order) is this design's
// choice. Purely combinational.
module cbm_switch_logic
  import cbm_pkg::*;
#(
  parameter int unsigned W = ExtWidth
) (
  input  logic [W-1:0]       x,        // default multiplicand
  input  logic [W-1:0]       y,        // default multiplier (Booth-encoded)
  output logic [$clog2((W+1)/2+1)-1:0] zx,  // zero Booth groups in x
  output logic [$clog2((W+1)/2+1)-1:0] zy,  // zero Booth groups in y
  output logic               sw        // 1: exchange x and y
);
  localparam int unsigned G  = (W + 1) / 2;
  localparam int unsigned CW = $clog2(G + 1);

  logic [2*G:0] xe, ye;  // {extended MSBs, operand, implicit 0}
  logic [G-1:0] xz, yz;  // per-group comparator outputs

  always_comb begin
    xe = {{(2*G-W){x[W-1]}}, x, 1'b0};
    ye = {{(2*G-W){y[W-1]}}, y, 1'b0};
    for (int k = 0; k < G; k++) begin
      xz[k] = (xe[2*k+2 -: 3] == 3'b000) || (xe[2*k+2 -: 3] == 3'b111);
      yz[k] = (ye[2*k+2 -: 3] == 3'b000) || (ye[2*k+2 -: 3] == 3'b111);
    end
    zx = '0;
    zy = '0;
    for (int k = 0; k < G; k++) begin
      zx = zx + CW'(xz[k]);
      zy = zy + CW'(yz[k]);
    end
    sw = zx > zy;
  end

endmodule
