// cond_loss - instantaneous IGBT conduction power loss.
//
// P_con = V_ce(I) * I. The conduction voltage V_ce is interpolated from a
// current-only look-up table (pow2_lut) with power-of-two breakpoint gaps;
// as in the paper's fixed-point model the chip-temperature input of the
// original two-dimensional table is left out. The product of two Q0.16 values
// is truncated to W bits. With the package bases (16 V, 176 A) the result is in
// per unit of 2816 W and needs no further scaling. The table contents are this
// design's choice (see thermal_pkg).
//
// Timing: p_con and out_valid are registered on in_valid; one clock latency.
module cond_loss
  import thermal_pkg::*;
#(
  parameter int W = PU_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] i_pu,
  output logic [W-1:0] p_con,
  output logic         out_valid
);
  logic [W-1:0]             vce;
  logic [$clog2(VCE_N)-1:0] vce_seg;
  logic [2*W-1:0]           prod;

  assign prod = vce * i_pu;

  pow2_lut #(.W(W), .N(VCE_N), .XS(VCE_X), .YS(VCE_Y)) u_vce_lut (
    .x(i_pu), .y(vce), .seg(vce_seg)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_con     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p_con <= prod[2*W-1:W];
    end
  end
endmodule
