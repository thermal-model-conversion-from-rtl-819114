// tb_cond_loss - conduction loss V_ce(I)*I for random and breakpoint currents
// against the reference model; out_valid must follow in_valid by one clock
// and p_con must hold while in_valid is low.
module tb_cond_loss;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pu_t i_pu = 0, p_con;
  int checks = 0, failures = 0, e;

  cond_loss dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .i_pu(i_pu),
                 .p_con(p_con), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int i);
    @(negedge clk);
    i_pu = 16'(i); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    e = tb_ref_pkg::p_con(i);
    checks++;
    if (!out_valid || int'(p_con) != e) begin
      failures++;
      $display("i=%0d got %0d (valid %0b) exp %0d", i, p_con, out_valid, e);
    end
    i_pu = ~i_pu;
    @(negedge clk);
    checks++;
    if (out_valid || int'(p_con) != e) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (VCE_X[k]) if (VCE_X[k] < 65536) one(int'(VCE_X[k]));
    one(65535); one(5638); one(1);
    for (int n = 0; n < 3000; n++) one(int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
