// cbm_sbg: sign bit generator (SBG) of the configurable Booth multiplier.
//
// From the configuration and the raw operands it produces
//   sb - sign of the (low-lane) product, used to replace sign-extension bits
//        of the product instead of computing them (partially guarded
//        computation). It is forced to 0 when the product is zero.
//   lz - the low lane's product is zero because one of its operands is zero
//        (in 16-bit mode: A == 0 or B == 0). The core then keeps its input
//        registers closed and loads zero into the output register.
//   hz - the same for the high lane. In 16-bit mode hz = lz; in single 8-bit
//        mode the high lane is idle and hz = 1.
// The three outputs and their use for shutdown follow the architecture; the
// per-lane split of the zero flag is this design's reading of LZ/HZ.
// Purely combinational.
module cbm_sbg
  import cbm_pkg::*;
(
  input  logic [2:0]          cm,
  input  logic [OpWidth-1:0]  a,
  input  logic [OpWidth-1:0]  b,
  output logic                sb,
  output logic                lz,
  output logic                hz
);
  localparam int unsigned BW = ByteWidth;

  cbm_mode_e mode;
  logic      a_zero, b_zero, al_zero, bl_zero, ah_zero, bh_zero;

  always_comb begin
    mode    = decode_mode(cm[2:1]);
    al_zero = (a[BW-1:0] == '0);
    ah_zero = (a[OpWidth-1:BW] == '0);
    bl_zero = (b[BW-1:0] == '0);
    bh_zero = (b[OpWidth-1:BW] == '0);
    a_zero  = al_zero & ah_zero;
    b_zero  = bl_zero & bh_zero;
    unique case (mode)
      MODE_SINGLE16: begin
        lz = a_zero | b_zero;
        hz = lz;
        sb = (a[OpWidth-1] ^ b[OpWidth-1]) & ~lz;
      end
      MODE_SINGLE8: begin
        lz = al_zero | bl_zero;
        hz = 1'b1;
        sb = (a[BW-1] ^ b[BW-1]) & ~lz;
      end
      default: begin  // twin 8-bit
        lz = al_zero | bl_zero;
        hz = ah_zero | bh_zero;
        sb = (a[BW-1] ^ b[BW-1]) & ~lz;
      end
    endcase
  end

endmodule
