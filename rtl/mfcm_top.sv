// mfcm_top: multi-functional configurable multiplier, top level.
//
// Two multipliers stand side by side, each with its own ports:
//   * cbm_core - the registered 16-bit configurable Booth multiplier (signed;
//     single 16-bit, single 8-bit or twin 8-bit, each full or truncated, with
//     dynamic-range shutdown and operand-zero gating). Latency 2 cycles,
//     one operation per cycle; see cbm_core.
//   * vedic_mult8 - the 8-bit unsigned Vedic multiplier (single 8x8, single
//     4x4 or twin 4x4). Its result is registered here, one cycle after the
//     inputs, with v_out_valid following v_in_valid.
// Clock and asynchronous active-low reset are shared. Registering the Vedic
// result is this design's choice.
module mfcm_top
  import cbm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // configurable Booth multiplier
  input  logic                 in_valid,
  input  logic [2:0]           cm,
  input  logic [OpWidth-1:0]   a,
  input  logic [OpWidth-1:0]   b,
  output logic                 out_valid,
  output logic [ProdWidth-1:0] p,
  // Vedic multiplier
  input  logic                 v_in_valid,
  input  logic [1:0]           v_mode,
  input  logic [7:0]           v_a,
  input  logic [7:0]           v_b,
  output logic                 v_out_valid,
  output logic [15:0]          v_p
);
  cbm_core u_cbm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .cm(cm), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  logic [15:0] v_prod;
  vedic_mult8 u_vedic (.mode(v_mode), .a(v_a), .b(v_b), .p(v_prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out_valid <= 1'b0;
      v_p         <= '0;
    end else begin
      v_out_valid <= v_in_valid;
      if (v_in_valid) v_p <= v_prod;
    end
  end

endmodule
