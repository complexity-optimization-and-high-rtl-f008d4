// tb_disc_unit: writes random constants for every (partition, filter),
// then for random FIR sums and shifts checks
//   d = sat13((sum >>> d_shift) + c)
// computed in the testbench, for each partition, including sums that
// saturate in both directions. The constant row is read one clock after
// the partition changes and `load` captures d on the following edge.
module tb_disc_unit;
  import botm_pkg::*;
  localparam int NP = 3, NF = 4, ACC_W = TAP_W + COEF_W + 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_wr_t cfg = '0;
  logic [1:0] part = 0;
  logic [NF-1:0][ACC_W-1:0] acc = '0;
  logic [5:0] d_shift = 0;
  logic load = 0;
  logic [NF-1:0][DISC_W-1:0] d;
  disc_unit #(.N_P(NP), .NF(NF)) dut (.*);
  logic signed [DISC_W-1:0] cm [NP][NF];

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) begin
      cm[p][j] = DISC_W'($urandom);
      cfg.we = 1; cfg.target = CFG_CONST; cfg.part = 8'(p); cfg.filt = 8'(j);
      cfg.data = 32'(cm[p][j]);
      @(posedge clk); #1;
    end
    cfg.we = 0;
    for (int n = 0; n < 60; n++) begin
      longint a [NF];
      int sh;
      sh = 10 + $urandom % 20;
      part = 2'($urandom % NP);
      for (int j = 0; j < NF; j++) begin
        case ($urandom % 4)
          0: a[j] = longint'($urandom % 32'h2000_0000) * 4096;            // large: may saturate
          1: a[j] = -longint'($urandom % 32'h2000_0000) * 4096;
          default: a[j] = longint'($signed($urandom)) >>> 2;
        endcase
        acc[j] = ACC_W'(a[j]);
      end
      d_shift = 6'(sh);
      @(posedge clk); #1;       // constant row follows `part`
      load = 1;
      @(posedge clk); #1;
      load = 0;
      for (int j = 0; j < NF; j++) begin
        automatic longint e = (a[j] >>> sh) + longint'(cm[part][j]);
        if (e > 4095) e = 4095;
        if (e < -4096) e = -4096;
        checks++;
        if (longint'(signed'(d[j])) != e) begin
          failures++;
          if (failures < 5) $display("j%0d got %0d exp %0d", j, signed'(d[j]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
