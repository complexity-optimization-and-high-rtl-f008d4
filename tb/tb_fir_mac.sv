// tb_fir_mac: feeds several sums of 250 random signed tap x coefficient
// products (extreme values included) and checks the accumulator against a
// testbench sum after each. Also checks that `clr` restarts the sum and
// that the accumulator holds while `en` is low.
module tb_fir_mac;
  import botm_pkg::*;
  localparam int ACC_W = TAP_W + COEF_W + 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, en = 0;
  logic signed [TAP_W-1:0] tap = 0;
  logic signed [COEF_W-1:0] coef = 0;
  logic signed [ACC_W-1:0] acc;
  fir_mac dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint s;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      s = 0;
      for (int i = 0; i < 250; i++) begin
        logic signed [TAP_W-1:0] t;
        logic signed [COEF_W-1:0] c;
        if (n == 0) begin t = {1'b1, {(TAP_W-1){1'b0}}}; c = {1'b1, {(COEF_W-1){1'b0}}}; end
        else begin t = TAP_W'($urandom); c = COEF_W'($urandom); end
        tap <= t; coef <= c; en <= 1; clr <= (i == 0);
        s += longint'(t) * longint'(c);
        @(posedge clk);
      end
      en <= 0;
      repeat (2) @(posedge clk); #1;
      checks++;
      if (longint'(acc) != s) begin failures++; $display("sum %0d exp %0d", acc, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
