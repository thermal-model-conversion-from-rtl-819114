// thermal_pkg - shared number formats, per-unit bases, look-up table contents
// and integrator coefficients of the fixed-point IGBT thermal model.
//
// Every signal of the model is an unsigned per-unit (pu) fraction in [0,1):
// 16 bits (Q0.16) for the general datapath and 24 bits (Q0.24) for the
// integrator states and coefficients by default. The 16/24-bit widths, the 100 us step
// and the 176 A current base (88 A = 1/2 pu) follow the paper; the other
// per-unit bases, the table contents beyond the printed rows and the thermal
// network values are this design's choices and are listed below.
//
// Per-unit bases
//   current          I_NOM   = 176 A
//   V_ce table       V_NOM   = 16 V         P_con base = 16 V * 176 A = 2816 W
//   switching energy E_NOM   = 64 mJ
//   gate-res factor  K_NOM   = 2            (factor 1.0 = 0.5 pu)
//   blocking voltage VDC_NOM = 1024 V       (energy tables refer to 600 V)
//   switching freq.  F_NOM   = 32 kHz
//   P_sw base        64 mJ * 2 * (1024/600) * 32 kHz = 6990.5 W
//   thermal power    P_T_NOM = 1024 W
//   temperature      T_NOM   = 256 K (also used for degC of the heatsink)
package thermal_pkg;

  // Default widths. Modules take their widths as parameters W and WI; the
  // tables below are written at 16 bits and rescaled to W where used.
  localparam int PU_W  = 16;   // global word width
  localparam int INT_W = 24;   // integrator width

  typedef logic [PU_W-1:0]  pu_t;   // Q0.16
  typedef logic [INT_W-1:0] pui_t;  // Q0.24
  typedef logic [PU_W:0]    bp_t;   // breakpoint, Q1.16 so that 1.0 pu fits

  localparam bp_t ONE = bp_t'(1 << PU_W);

  // ---------------------------------------------------------------------
  // Look-up tables. Breakpoints are in pu of the input base; every gap
  // between neighbours is a power of two so interpolation needs no divider.
  // ---------------------------------------------------------------------
  // V_ce versus current (pu of 16 V), breakpoints 0,1/32,1/16,1/8,1/4,1/2,1.
  // Effective voltages 0, 0.95, 1.77, 2.22, 3.09, 4.84, 8.34 V.
  localparam int VCE_N = 7;
  localparam bp_t VCE_X [VCE_N] = '{17'd0, 17'd2048, 17'd4096, 17'd8192,
                                    17'd16384, 17'd32768, 17'd65536};
  localparam pu_t VCE_Y [VCE_N] = '{16'd0, 16'd3887, 16'd7266, 16'd9077,
                                    16'd12665, 16'd19825, 16'd34161};

  // Switching energy versus current, improved table (pu of 64 mJ):
  // 0 A 0 mJ, 22 A 4.655 mJ, 66 A 17.99 mJ, 88 A 25 mJ, 176 A 53 mJ.
  localparam int ESW2_N = 5;
  localparam bp_t ESW2_X [ESW2_N] = '{17'd0, 17'd8192, 17'd24576, 17'd32768, 17'd65536};
  localparam pu_t ESW2_Y [ESW2_N] = '{16'd0, 16'd4767, 16'd18422, 16'd25600, 16'd54272};

  // Switching energy versus current, first coarse table (pu of 64 mJ):
  // 0 A 0 mJ, 88 A 25 mJ, 176 A 50 mJ.
  localparam int ESW1_N = 3;
  localparam bp_t ESW1_X [ESW1_N] = '{17'd0, 17'd32768, 17'd65536};
  localparam pu_t ESW1_Y [ESW1_N] = '{16'd0, 16'd25600, 16'd51200};

  // Switching-energy factor versus gate resistance (pu of 2), breakpoints
  // 0, 8, 16, 32, 64 ohm; factor 0.8, 1.0, 1.25, 1.7, 1.95.
  localparam int RG_N = 5;
  localparam bp_t RG_X [RG_N] = '{17'd0, 17'd8192, 17'd16384, 17'd32768, 17'd65536};
  localparam pu_t RG_Y [RG_N] = '{16'd26214, 16'd32768, 16'd40960, 16'd55706, 16'd63898};

  // ---------------------------------------------------------------------
  // Scaling factors K between nominal values, unsigned Q2.14.
  // ---------------------------------------------------------------------
  localparam int KFRAC = 14;
  localparam int K_SW  = 40672;  // P_sw base / P_con base = 6990.5/2816 = 2.4824
  localparam int K_T   = 45056;  // P_con base / P_T base  = 2816/1024  = 2.75

  // ---------------------------------------------------------------------
  // Third-order thermal network (three parallel R-tau stages).
  // A = h*R_pu/tau, B = 1 - h/tau   (forward Euler), R_pu = R * P_T/T_NOM.
  // ---------------------------------------------------------------------
  localparam real H_S       = 100.0e-6;         // default step time h
  localparam real P_T_NOM   = 1024.0;
  localparam real T_NOM     = 256.0;
  localparam real R_KW  [3] = '{0.05, 0.20, 0.20};  // K/W
  localparam real TAU_S [3] = '{0.01, 0.10, 1.00};  // s

  // Coefficients in Q0.<wi>, rounded to nearest, for step time h_s.
  function automatic int unsigned qfrac(input real v, input int wi);
    return int'($rtoi(v * (2.0 ** wi) + 0.5));
  endfunction

  function automatic int unsigned coef_a(input real r_kw, input real tau_s,
                                         input real h_s, input int wi);
    return qfrac(h_s * (r_kw * P_T_NOM / T_NOM) / tau_s, wi);
  endfunction

  function automatic int unsigned coef_b(input real tau_s, input real h_s,
                                         input int wi);
    return qfrac(1.0 - h_s / tau_s, wi);
  endfunction

endpackage
