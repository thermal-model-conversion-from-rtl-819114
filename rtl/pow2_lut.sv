// pow2_lut - one-dimensional look-up table with power-of-two breakpoint gaps.
//
// The table holds N breakpoints XS (Q1.16, first 0, last 1.0 pu) and their
// outputs YS (Q0.16), rescaled at elaboration to the word width W. For an
// input x the segment k with XS[k] <= x < XS[k+1] is found with one
// comparator per breakpoint, and the output is linearly interpolated:
//     y = YS[k] + ((YS[k+1] - YS[k]) * (x - XS[k])) >>> log2(XS[k+1] - XS[k])
// The paper requires the gap between consecutive breakpoints to be a power of
// two so that this division is a shift; gaps may differ from segment to
// segment. Elaboration fails if a gap is not a power of two at width W. The
// comparator search, truncating arithmetic shift and output clamp to [0,1)
// are this design's choices. Purely combinational; `seg` reports the segment
// used.
module pow2_lut
  import thermal_pkg::*;
#(
  parameter int  W       = PU_W,
  parameter int  N       = ESW2_N,
  parameter bp_t XS [N]  = ESW2_X,
  parameter pu_t YS [N]  = ESW2_Y
) (
  input  logic [W-1:0]          x,
  output logic [W-1:0]          y,
  output logic [$clog2(N)-1:0]  seg
);
  localparam int SW = $clog2(N);

  logic [W:0]   xw    [N];   // breakpoints at width W
  logic [W-1:0] yw    [N];   // outputs at width W
  logic [4:0]   shamt [N];   // last entry unused, keeps the index width SW

  for (genvar k = 0; k < N; k++) begin : g_pt
    localparam longint XK = (W >= PU_W) ? longint'(XS[k]) << (W - PU_W)
                                        : longint'(XS[k]) >> (PU_W - W);
    localparam longint YK = (W >= PU_W) ? longint'(YS[k]) << (W - PU_W)
                                        : longint'(YS[k]) >> (PU_W - W);
    assign xw[k] = (W+1)'(XK);
    assign yw[k] = W'(YK);
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_seg
    localparam longint GAP = ((W >= PU_W) ? longint'(XS[k+1]) << (W - PU_W)
                                          : longint'(XS[k+1]) >> (PU_W - W))
                           - ((W >= PU_W) ? longint'(XS[k]) << (W - PU_W)
                                          : longint'(XS[k]) >> (PU_W - W));
    if (GAP <= 0 || (GAP & (GAP - 1)) != 0) begin : g_bad_gap
      $error("pow2_lut: breakpoint gap %0d is not a power of two", k);
    end
    assign shamt[k] = 5'($clog2(GAP));
  end
  assign shamt[N-1] = '0;
  if (XS[0] != '0 || XS[N-1] != ONE) begin : g_bad_range
    $error("pow2_lut: breakpoints must run from 0 to 1.0 pu");
  end

  logic        [W:0]     dx;
  logic signed [W+1:0]   dy;
  logic signed [2*W+3:0] prod;
  logic signed [W+2:0]   acc;

  always_comb begin
    seg = '0;
    for (int k = 1; k < N - 1; k++)
      if ({1'b0, x} >= xw[k]) seg = SW'(k);
    dx   = {1'b0, x} - xw[seg];
    dy   = $signed({2'b00, yw[seg + 1]}) - $signed({2'b00, yw[seg]});
    prod = (dy * $signed({1'b0, dx})) >>> shamt[seg];
    acc  = $signed({3'b000, yw[seg]}) + (W+3)'(prod);
    if (acc < 0)                            y = '0;
    else if (acc > $signed((W+3)'((1 << W) - 1))) y = '1;
    else                                    y = acc[W-1:0];
  end
endmodule
