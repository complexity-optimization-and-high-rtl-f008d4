// tb_ppu: drives the partition-processing unit the way the folding
// controller does, for two partitions of three filter slots, with one
// product per MAC pass (tap = wanted response, coefficient = 1, shift 0) so
// that each discriminant is the response plus the slot's constant (-5).
// Scenario and expected reports, worked out by hand:
//  partition 0 (IDs 10, 11 close together, 12 far away): a spike seen by
//   all three closes its window at sample 7 -> ID 12 (max 85 at sample 6)
//   and ID 10 (max 55 at sample 5); ID 11 lies within R of ID 10 and is
//   suppressed. A long low response from sample 13 to 20 stretches a window
//   beyond its minimum and yields ID 10 at sample 13.
//  partition 1 (IDs 20, 21 far apart, slot 2 not valid): equal maxima at
//   sample 5 -> both reported, lower slot first; the invalid slot never is.
module tb_ppu;
  import botm_pkg::*;
  localparam int NP = 2, NF = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_wr_t cfg = '0;
  run_regs_t regs;
  logic [0:0] part = 0;
  logic [TS_W-1:0] ts = 0;
  logic mac_en = 0, mac_clr = 0, disc_load = 0, det_en = 0;
  logic [NF-1:0][TAP_W-1:0] taps = '0;
  logic [NF-1:0][COEF_W-1:0] coefs = '0;
  logic [NF-1:0] nvalid;
  logic [NF-1:0][GID_W-1:0] ngid;
  logic [NF-1:0][XY_W-1:0] nx, ny;
  logic rep_valid, loc_busy;
  spike_t rep;
  ppu #(.N_P(NP), .NF(NF)) dut (.*);

  spike_t got [$];
  always @(posedge clk) if (rst_n && rep_valid) got.push_back(rep);

  int resp [NP][32][NF];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    spike_t expq [$];
    regs.d_shift = 0; regs.l_dw_min = 3; regs.r = 70; regs.mwin = 3;
    for (int p = 0; p < NP; p++) for (int s = 0; s < 32; s++) for (int j = 0; j < NF; j++) resp[p][s][j] = 0;
    resp[0][4]  = '{20, 10, 0};
    resp[0][5]  = '{60, 40, 30};
    resp[0][6]  = '{30, 50, 90};
    for (int s = 13; s <= 20; s++) resp[0][s][0] = 10;
    resp[1][5]  = '{40, 40, 99};
    for (int s = 0; s < 32; s++) resp[1][s][2] = 200;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < NP; p++) for (int j = 0; j < NF; j++) begin
      cfg.we = 1; cfg.target = CFG_CONST; cfg.part = 8'(p); cfg.filt = 8'(j); cfg.data = -32'sd5;
      @(posedge clk); #1;
    end
    cfg.we = 0;
    for (int s = 0; s < 28; s++) begin
      for (int p = 0; p < NP; p++) begin
        int wait_c;
        part = 1'(p); ts = TS_W'(s);
        if (p == 0) begin
          nvalid = 3'b111; ngid = {10'd12, 10'd11, 10'd10};
          nx = {16'd400, 16'd130, 16'd100}; ny = {16'd400, 16'd100, 16'd100};
        end else begin
          nvalid = 3'b011; ngid = {10'd22, 10'd21, 10'd20};
          nx = {16'd500, 16'd1000, 16'd0}; ny = '0;
        end
        @(posedge clk); #1; @(posedge clk); #1;
        for (int j = 0; j < NF; j++) begin taps[j] = TAP_W'(resp[p][s][j]); coefs[j] = COEF_W'(1); end
        mac_en = 1; mac_clr = 1; @(posedge clk); #1;
        mac_en = 0; mac_clr = 0;
        disc_load = 1; @(posedge clk); #1; disc_load = 0;
        det_en = 1; @(posedge clk); #1; det_en = 0;
        wait_c = 0;
        while (loc_busy) begin @(posedge clk); #1; wait_c++; end
      end
    end
    expq.push_back('{gid: 10'd12, ts: 6,  part: 8'd0});
    expq.push_back('{gid: 10'd10, ts: 5,  part: 8'd0});
    expq.push_back('{gid: 10'd20, ts: 5,  part: 8'd1});
    expq.push_back('{gid: 10'd21, ts: 5,  part: 8'd1});
    expq.push_back('{gid: 10'd10, ts: 13, part: 8'd0});
    checks++;
    if (got.size() != expq.size()) begin failures++; $display("got %0d reports", got.size()); end
    for (int i = 0; i < expq.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != expq[i]) begin
        failures++;
        $display("report %0d: gid %0d ts %0d part %0d", i, got[i].gid, got[i].ts, got[i].part);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
