// switch_loss - instantaneous IGBT switching power loss.
//
// P_sw = E_sw(I) * k(R_g) * V_dc * f_sw, all in per unit. E_sw(I) is the
// switching energy versus output current table and k(R_g) the gate-resistance
// factor table, both pow2_lut instances with power-of-two breakpoint gaps.
// IMPROVED selects the paper's refined energy table (1, default) or its first
// coarse table (0). The energy tables refer to a 600 V blocking voltage, so the
// result is in per unit of 64 mJ * 2 * (1024 V / 600 V) * 32 kHz = 6990.5 W.
// The paper names the dependencies (current, gate resistance, switching
// frequency, blocking voltage); the product form, the bases and the gate
// resistance table are this design's choices. Products truncate to W bits.
//
// Timing: p_sw and out_valid are registered on in_valid; one clock latency.
// vdc_pu, fsw_pu and rg_pu are static configuration.
module switch_loss
  import thermal_pkg::*;
#(
  parameter int W        = PU_W,
  parameter bit IMPROVED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] i_pu,
  input  logic [W-1:0] vdc_pu,   // pu of 1024 V
  input  logic [W-1:0] fsw_pu,   // pu of 32 kHz
  input  logic [W-1:0] rg_pu,    // pu of 64 ohm
  output logic [W-1:0] p_sw,
  output logic         out_valid
);
  logic [W-1:0] esw, krg, ek, ekv, ekvf;
  logic [$clog2(RG_N)-1:0] rg_seg;

  // Q0.W x Q0.W -> Q0.W, truncated
  function automatic logic [W-1:0] mul(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [2*W-1:0] p;
    p = a * b;
    return p[2*W-1:W];
  endfunction

  always_comb begin
    ek   = mul(esw, krg);
    ekv  = mul(ek, vdc_pu);
    ekvf = mul(ekv, fsw_pu);
  end

  if (IMPROVED) begin : g_esw_improved
    logic [$clog2(ESW2_N)-1:0] seg;
    pow2_lut #(.W(W), .N(ESW2_N), .XS(ESW2_X), .YS(ESW2_Y)) u_esw_lut (
      .x(i_pu), .y(esw), .seg(seg)
    );
  end else begin : g_esw_first
    logic [$clog2(ESW1_N)-1:0] seg;
    pow2_lut #(.W(W), .N(ESW1_N), .XS(ESW1_X), .YS(ESW1_Y)) u_esw_lut (
      .x(i_pu), .y(esw), .seg(seg)
    );
  end

  pow2_lut #(.W(W), .N(RG_N), .XS(RG_X), .YS(RG_Y)) u_rg_lut (
    .x(rg_pu), .y(krg), .seg(rg_seg)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_sw      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p_sw <= ekvf;
    end
  end
endmodule
