// power_sum - sum of the losses and change to the thermal network's base.
//
// p_in = K_T * (p_con + K_SW * p_sw): the switching loss is first moved to
// the conduction-loss base (K_SW = 6990.5 W / 2816 W), the two losses are
// added with saturation, and the total is moved to the power base of the
// thermal network (K_T = 2816 W / 1024 W). The two scaling points are those of
// the paper's fixed-point model; the constant values follow from this design's
// per-unit bases (thermal_pkg).
//
// Timing: p_in and out_valid are registered on in_valid; one clock latency.
// `saturated` reports that a scaling or the addition clipped at 1 pu.
module power_sum
  import thermal_pkg::*;
#(
  parameter int          W   = PU_W,
  parameter int unsigned KSW = K_SW,
  parameter int unsigned KT  = K_T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] p_con,
  input  logic [W-1:0] p_sw,
  output logic [W-1:0] p_in,
  output logic         out_valid,
  output logic         saturated
);
  logic [W-1:0] sw_c, total, scaled;
  logic [W:0]   sum;
  logic         sat_sw, sat_t, sat_add;

  pu_scale #(.W(W), .K(KSW), .FRAC(KFRAC)) u_k_sw (.x(p_sw),  .y(sw_c),   .sat(sat_sw));
  pu_scale #(.W(W), .K(KT),  .FRAC(KFRAC)) u_k_t  (.x(total), .y(scaled), .sat(sat_t));

  always_comb begin
    sum     = {1'b0, p_con} + {1'b0, sw_c};
    sat_add = sum[W];
    total   = sat_add ? '1 : sum[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_in      <= '0;
      out_valid <= 1'b0;
      saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p_in      <= scaled;
        saturated <= sat_sw | sat_t | sat_add;
      end
    end
  end
endmodule
