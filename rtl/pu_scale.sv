// pu_scale - scaling factor K between two per-unit bases.
//
// Signals computed against one nominal value are moved to another by a
// constant factor K = base_from / base_to. K is an unsigned 16-bit constant
// with FRAC fraction bits (default Q2.14, so 0 <= K < 4), because a ratio of
// nominal values can exceed one. y = (x * K) >> FRAC, truncated, and
// saturated to the largest Q0.W value when the result reaches 1 pu.
// The factor follows the paper; its number format is this design's choice.
// Purely combinational; `sat` flags a saturated result.
module pu_scale
  import thermal_pkg::*;
#(
  parameter int          W     = PU_W,
  parameter int unsigned K     = K_SW,
  parameter int          FRAC  = KFRAC
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         sat
);
  logic [W+15:0] prod;
  logic [W+15:0] shifted;

  always_comb begin
    prod    = x * 16'(K);
    shifted = prod >> FRAC;
    sat     = |shifted[W+15:W];
    y       = sat ? '1 : shifted[W-1:0];
  end

  initial assert (K < 65536) else $error("pu_scale: K must fit 16 bits");
endmodule
