// cbm_combine: product combiner of the configurable Booth multiplier.
//
// Adds the four 18-bit signed sub-products at their weights according to the
// mode and formats the 32-bit result p:
//   16-bit, full:      p = HH*2^16 + (LH + HL)*2^8 + LL. When guard is set
//                      (both operands fit in a signed byte) only LL is live and
//                      p[31:16] is filled with the sign bit SB instead of being
//                      added (partially guarded computation).
//   16-bit, truncated: only p[31:16] is formed, from HH and the kept upper
//                      parts of LH and HL (which already hold their
//                      compensation); p[15:0] = 0.
//   8-bit, full:       p = {16{SB}, LL[15:0]}.
//   8-bit, truncated:  p[15:8] = LL[15:8], p[7:0] = 0, p[31:16] repeats
//                      p[15] (the rounded value's own sign).
//   twin, full:        p = {HH[15:0], LL[15:0]}.
//   twin, truncated:   p = {HH[15:8], 8'b0, LL[15:8], 8'b0}.
// The mode set and the SB substitution follow the architecture; keeping the
// truncated result at its full-product bit positions is this design's choice.
// Purely combinational.
module cbm_combine
  import cbm_pkg::*;
(
  input  logic [2:0]           cm,
  input  logic                 guard,
  input  logic                 sb,
  input  logic [SubWidth-1:0]  sp [4],   // sub-products, indexed by sub_idx_e
  output logic [ProdWidth-1:0] p
);
  localparam int unsigned BW = ByteWidth;
  localparam int unsigned HW = OpWidth;

  cbm_mode_e       mode;
  logic            trunc;
  logic [HW-1:0]   hi_sum;

  always_comb begin
    mode   = decode_mode(cm[2:1]);
    trunc  = ~cm[0];
    hi_sum = '0;
    p      = '0;
    unique case (mode)
      MODE_SINGLE16: begin
        if (trunc) begin
          hi_sum = sp[SUB_HH][HW-1:0]
                 + HW'(signed'(sp[SUB_LH][SubWidth-1:BW]))
                 + HW'(signed'(sp[SUB_HL][SubWidth-1:BW]));
          p = {hi_sum, {HW{1'b0}}};
        end else if (guard) begin
          p = {{HW{sb}}, sp[SUB_LL][HW-1:0]};
        end else begin
          p = (ProdWidth'(signed'(sp[SUB_HH])) << (2 * BW))
            + (ProdWidth'(signed'(sp[SUB_LH])) << BW)
            + (ProdWidth'(signed'(sp[SUB_HL])) << BW)
            +  ProdWidth'(signed'(sp[SUB_LL]));
        end
      end
      MODE_SINGLE8: begin
        if (trunc) p = {{HW{sp[SUB_LL][HW-1]}}, sp[SUB_LL][HW-1:BW], {BW{1'b0}}};
        else       p = {{HW{sb}}, sp[SUB_LL][HW-1:0]};
      end
      default: begin  // twin 8-bit
        if (trunc) p = {sp[SUB_HH][HW-1:BW], {BW{1'b0}}, sp[SUB_LL][HW-1:BW], {BW{1'b0}}};
        else       p = {sp[SUB_HH][HW-1:0], sp[SUB_LL][HW-1:0]};
      end
    endcase
  end

endmodule
