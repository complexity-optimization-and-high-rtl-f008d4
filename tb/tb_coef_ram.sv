// tb_coef_ram: fills the coefficient memory with random words, drives the
// write bus with the enable low and reads every address back (one clock
// latency), then rewrites random entries while a
// read stream runs and checks that each read returns the newest value.
module tb_coef_ram;
  import botm_pkg::*;
  localparam int NP = 2, E = 2, T = 6, D = NP * E * T;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  logic [COEF_W-1:0] wr_data = 0, rd_data;
  coef_ram #(.N_P(NP), .E(E), .T(T)) dut (.*);
  logic [COEF_W-1:0] model [D];

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < D; a++) begin
      model[a] = COEF_W'($urandom);
      wr_en <= 1; wr_addr <= 5'(a); wr_data <= model[a];
      @(posedge clk);
    end
    // write enable low: the write bus changes but memory must not
    for (int a = 0; a < D; a++) begin
      wr_en <= 0; wr_addr <= 5'(a); wr_data <= ~model[a];
      @(posedge clk);
    end
    for (int a = 0; a < D; a++) begin
      rd_addr <= 5'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[a]) failures++;
    end
    for (int r = 0; r < 3 * D; r++) begin
      automatic int a = r % D;
      automatic int wa = $urandom % D;
      automatic logic [COEF_W-1:0] v = COEF_W'($urandom);
      rd_addr <= 5'(a);
      // concurrent write to another address (on-the-fly update)
      wr_en <= (wa != a); wr_addr <= 5'(wa); wr_data <= v;
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[a]) failures++;
      if (wa != a) model[wa] = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
