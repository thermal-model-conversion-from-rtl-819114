// tb_ad_block - checks sampling, per-unit conversion and clamping of the
// A/D-block with the current scaling (1/128 A per code, 176 A base): random
// and corner codes, output held between strobes, valid one clock after sample.
module tb_ad_block;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0, valid, clamped;
  logic signed [15:0] x_raw = 0;
  logic [15:0] x_pu;
  int checks = 0, failures = 0, exp_v, nclamp = 0;
  localparam longint GAIN = 47663;

  ad_block #(.ADC_W(16), .GAIN(47663), .GFRAC(14)) dut (
    .clk(clk), .rst_n(rst_n), .sample(sample), .x_raw(x_raw),
    .x_pu(x_pu), .valid(valid), .clamped(clamped));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int code);
    @(negedge clk);
    x_raw = 16'(code);
    sample = 1;
    @(negedge clk);
    sample = 0;
    exp_v = ad(code, GAIN);
    checks++;
    if (!valid || x_pu != 16'(exp_v)) begin
      failures++;
      $display("code %0d: got %0d valid %0b, expected %0d", code, x_pu, valid, exp_v);
    end
    if (clamped) nclamp++;
    // hold: input changes without a strobe must not reach the output
    x_raw = ~x_raw;
    @(negedge clk);
    checks++;
    if (valid || x_pu != 16'(exp_v)) begin
      failures++;
      $display("output not held for code %0d", code);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0); one(1); one(-1); one(3968); one(-3968); one(22528); one(22527);
    one(22529); one(32767); one(-32768); one(11264);
    for (int n = 0; n < 2000; n++) one(int'($signed(16'($urandom))));
    checks++;
    if (nclamp == 0) begin failures++; $display("clamp never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
