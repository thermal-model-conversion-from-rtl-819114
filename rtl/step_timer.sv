// step_timer - fixed model step.
//
// The thermal model is evaluated once per fixed step h (100 us in the paper).
// This counter divides the clock by STEP_CYCLES and emits a one-clock strobe
// `step`; the first strobe comes STEP_CYCLES clocks after reset is released.
// The default assumes a 50 MHz clock (5000 clocks = 100 us); the clock rate is
// this design's choice. Reset is synchronous and active low.
module step_timer #(
  parameter int unsigned STEP_CYCLES = 5000
) (
  input  logic clk,
  input  logic rst_n,
  output logic step
);
  localparam int CW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      step <= 1'b0;
    end else if (cnt == CW'(STEP_CYCLES - 1)) begin
      cnt  <= '0;
      step <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      step <= 1'b0;
    end
  end

  initial assert (STEP_CYCLES >= 2) else $error("STEP_CYCLES must be at least 2");
endmodule
