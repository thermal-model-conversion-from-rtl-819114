// thermal_model_top - real-time fixed-point IGBT temperature estimator.
//
// Estimates the chip temperature of an IGBT in a PWM voltage-source inverter
// from the measured output current and heatsink temperature, without a sensor
// on the chip. Once per fixed step h (100 us; STEP_CYCLES clocks, 5000 at an
// assumed 50 MHz clock) the design
//   1. samples both inputs and converts them to per unit (ad_block x2),
//   2. computes the conduction loss V_ce(I)*I (cond_loss) and the switching
//      loss E_sw(I)*k(R_g)*V_dc*f_sw (switch_loss) from look-up tables whose
//      breakpoint gaps are powers of two,
//   3. moves the switching loss to the conduction-loss base, adds, and moves
//      the total to the thermal network's base with factors K (power_sum),
//   4. updates three discrete first-order thermal stages and adds their
//      outputs to the heatsink temperature (delta_t_calc).
// All signals are unsigned per-unit fractions, W = 16 bits wide, the
// integrators WI = 24 bits, as in the paper; like the paper's model, the
// widths and the model step STEP_S are parameters, so the accuracy of other
// choices can be simulated. STEP_CYCLES must equal STEP_S times the clock
// frequency. The pipeline has one register per stage; dt and tj
// are valid (out_valid) five clocks after the step strobe. The chip
// temperature is not fed back to the conduction loss, as in the paper's fixed-
// point model. ESW_IMPROVED selects the refined (1) or the first (0) switching
// energy table.
//
// Inputs: i_adc signed current code (1/128 A per LSB), ths_adc signed heatsink
// temperature code (1/64 degC per LSB); cfg_vdc (pu of 1024 V), cfg_fsw (pu of
// 32 kHz) and cfg_rg (pu of 64 ohm) are static configuration.
module thermal_model_top
  import thermal_pkg::*;
#(
  parameter int unsigned STEP_CYCLES  = 5000,
  parameter real         STEP_S       = H_S,    // model step h, seconds
  parameter int          W            = PU_W,   // global word width
  parameter int          WI           = INT_W,  // integrator width
  parameter bit          ESW_IMPROVED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [15:0]  i_adc,
  input  logic signed [15:0]  ths_adc,
  input  logic [W-1:0]        cfg_vdc,
  input  logic [W-1:0]        cfg_fsw,
  input  logic [W-1:0]        cfg_rg,
  output logic                step,
  output logic [W-1:0]        i_pu,
  output logic [W-1:0]        ths_pu,
  output logic [W-1:0]        p_con,
  output logic [W-1:0]        p_sw,
  output logic [W-1:0]        p_in,
  output logic [W-1:0]        dt,
  output logic [W-1:0]        tj,
  output logic                out_valid,
  output logic                i_clamped,
  output logic                p_saturated
);
  logic v_ad, v_ths, v_con, v_sw, v_sum;
  logic ths_clamped;
  logic [WI-1:0] stage [3];

  step_timer #(.STEP_CYCLES(STEP_CYCLES)) u_step (
    .clk(clk), .rst_n(rst_n), .step(step)
  );

  // current: 1/128 A per code, base 176 A -> gain 65536/(128*176) in Q2.14
  ad_block #(.W(W), .ADC_W(16), .GAIN(47663), .GFRAC(14)) u_ad_i (
    .clk(clk), .rst_n(rst_n), .sample(step), .x_raw(i_adc),
    .x_pu(i_pu), .valid(v_ad), .clamped(i_clamped)
  );

  // heatsink temperature: 1/64 degC per code, base 256 degC -> gain 4
  ad_block #(.W(W), .ADC_W(16), .GAIN(65536), .GFRAC(14)) u_ad_ths (
    .clk(clk), .rst_n(rst_n), .sample(step), .x_raw(ths_adc),
    .x_pu(ths_pu), .valid(v_ths), .clamped(ths_clamped)
  );

  cond_loss #(.W(W)) u_con (
    .clk(clk), .rst_n(rst_n), .in_valid(v_ad), .i_pu(i_pu),
    .p_con(p_con), .out_valid(v_con)
  );

  switch_loss #(.W(W), .IMPROVED(ESW_IMPROVED)) u_sw (
    .clk(clk), .rst_n(rst_n), .in_valid(v_ad), .i_pu(i_pu),
    .vdc_pu(cfg_vdc), .fsw_pu(cfg_fsw), .rg_pu(cfg_rg),
    .p_sw(p_sw), .out_valid(v_sw)
  );

  power_sum #(.W(W)) u_sum (
    .clk(clk), .rst_n(rst_n), .in_valid(v_con & v_sw),
    .p_con(p_con), .p_sw(p_sw), .p_in(p_in), .out_valid(v_sum),
    .saturated(p_saturated)
  );

  delta_t_calc #(.W(W), .WI(WI), .STEP_S(STEP_S)) u_dt (
    .clk(clk), .rst_n(rst_n), .en(v_sum), .p_in(p_in), .ths_pu(ths_pu),
    .dt(dt), .tj(tj), .out_valid(out_valid), .stage(stage)
  );

  // Both A/D-blocks sample on the same strobe, and the two loss paths have
  // equal latency.
  a_ad_aligned: assert property (@(posedge clk) disable iff (!rst_n) v_ad == v_ths);
  a_loss_aligned: assert property (@(posedge clk) disable iff (!rst_n) v_con == v_sw);
endmodule
