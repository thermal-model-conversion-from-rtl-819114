// ad_block - the model's A/D-block: discretize, convert to per unit, quantize.
//
// On each `sample` strobe (the model step) the signed raw input code is
// multiplied by GAIN / 2^GFRAC, which maps one code step to its value in per
// unit of the signal's nominal value (scaled for 16 bits), and the result is
// quantized to a W-bit fraction Q0.W. Because every model signal must lie in
// [0,1), negative results clamp to 0 and results of 1 pu or more clamp to the
// largest Q0.W value. For the output current this keeps the half-wave in
// which the modelled IGBT conducts. The three steps follow the paper; the
// code format, the gain encoding and the clamping are this design's choices.
//
// Timing: x_pu and valid are registered; valid is high for one clock, the
// clock after `sample`.
module ad_block
  import thermal_pkg::*;
#(
  parameter int          W     = PU_W,
  parameter int          ADC_W = 16,
  parameter int unsigned GAIN  = 47663,  // 1/128 A per code, 176 A base
  parameter int          GFRAC = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample,
  input  logic signed [ADC_W-1:0] x_raw,
  output logic [W-1:0]            x_pu,
  output logic                    valid,
  output logic                    clamped   // value clamped this sample
);
  // GAIN is defined for a 16-bit result; a different W moves the binary point
  localparam int SH = GFRAC + PU_W - W;
  localparam int PW = ADC_W + 33 + ((W > PU_W) ? W - PU_W : 0);

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] scaled;   // Q.W
  logic [W-1:0]         q;
  logic                 clip;

  always_comb begin
    prod   = PW'(x_raw) * $signed({1'b0, 32'(GAIN)});
    scaled = (SH >= 0) ? prod >>> SH : prod <<< (-SH);
    if (scaled < 0) begin
      q    = '0;
      clip = 1'b1;
    end else if (scaled > $signed(PW'((64'd1 << W) - 1))) begin
      q    = '1;
      clip = 1'b1;
    end else begin
      q    = scaled[W-1:0];
      clip = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_pu    <= '0;
      valid   <= 1'b0;
      clamped <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        x_pu    <= q;
        clamped <= clip;
      end
    end
  end
endmodule
