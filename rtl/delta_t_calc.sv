// delta_t_calc - third-order chip-to-heatsink temperature calculation.
//
// The thermal impedance is modelled as three first-order R-tau stages whose
// temperature rises add (Z_th = sum R_i (1 - exp(-t/tau_i))). Each stage is a
// thermal_integrator with A_i = h*R_i/tau_i and B_i = 1 - h/tau_i in Q0.WI,
// computed at elaboration from R_KW and TAU_S in thermal_pkg and the step time
// STEP_S. The three WI-bit states are added with saturation, quantized to the
// global W-bit width as delta T (per unit of 256 K), and the heatsink temperature (per unit
// of 256 degC) is added to give the chip temperature. The stage structure and
// the coefficient formulas follow the paper; the R and tau values other than
// the 10 ms shortest time constant are this design's choices.
//
// Timing: the clock edge with `en` high updates the integrators; the next
// edge registers dt and tj, and out_valid is high with them (two clocks after
// en).
module delta_t_calc
  import thermal_pkg::*;
#(
  parameter int  W      = PU_W,
  parameter int  WI     = INT_W,
  parameter real STEP_S = H_S
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  p_in,     // pu of 1024 W
  input  logic [W-1:0]  ths_pu,   // pu of 256 degC
  output logic [W-1:0]  dt,       // pu of 256 K
  output logic [W-1:0]  tj,       // pu of 256 degC
  output logic          out_valid,
  output logic [WI-1:0] stage [3]
);
  for (genvar i = 0; i < 3; i++) begin : g_stage
    thermal_integrator #(
      .W(W), .WI(WI),
      .A(coef_a(R_KW[i], TAU_S[i], STEP_S, WI)),
      .B(coef_b(TAU_S[i], STEP_S, WI))
    ) u_int (
      .clk(clk), .rst_n(rst_n), .en(en), .x(p_in), .y(stage[i])
    );
  end

  logic [WI+1:0] dsum;
  logic [W-1:0]  dt_q;
  logic [W:0]    tsum;

  always_comb begin
    dsum = {2'b00, stage[0]} + {2'b00, stage[1]} + {2'b00, stage[2]};
    // quantize Q0.WI to Q0.W (WI >= W in any sensible configuration)
    dt_q = (|dsum[WI+1:WI]) ? '1 : W'(dsum[WI-1:0] >> (WI - W));
    tsum = {1'b0, ths_pu} + {1'b0, dt_q};
  end

  logic upd;   // integrator states changed on the previous edge

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upd       <= 1'b0;
      dt        <= '0;
      tj        <= '0;
      out_valid <= 1'b0;
    end else begin
      upd       <= en;
      out_valid <= upd;
      if (upd) begin
        dt <= dt_q;
        tj <= tsum[W] ? '1 : tsum[W-1:0];
      end
    end
  end
endmodule
