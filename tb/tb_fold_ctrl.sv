// tb_fold_ctrl: sends frames to the folding controller and follows its
// outputs clock by clock. Per fold it checks: E connectivity-map issues
// with slots 0..E-1, then E*T MAC reads in (slot, age) order with
// `mac_first` on the first, then one DISC and one DET clock, then LOC held
// for as long as the localizer reports busy. Per frame it checks the
// partition order, the total clock count N_P*(E*T+E+6) plus the busy
// clocks, the pointer moving back by one modulo T and the sample counter
// advancing. A frame sent while the folds run must set `overrun` and be
// processed afterwards.
module tb_fold_ctrl;
  import botm_pkg::*;
  localparam int NP = 3, E = 2, T = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic frame = 0, loc_busy = 0;
  phase_e phase;
  logic [1:0] part;
  logic [0:0] slot;
  logic [1:0] age, ptr;
  logic map_rd, mac_rd, mac_first, disc_load, det_en, busy, overrun;
  logic [TS_W-1:0] ts;
  fold_ctrl #(.N_P(NP), .E(E), .T(T)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // follows one frame; `lb` extra busy clocks in LOC of fold `lbp`
  task automatic run_frame(int lb, int lbp, bit send_extra);
    int cyc, loads, macs, exp_ptr, exp_ts, ps;
    exp_ptr = (int'(ptr) == 0) ? T - 1 : int'(ptr) - 1;
    exp_ts  = int'(ts) + 1;
    frame = 1; @(posedge clk); #1 frame = 0;
    cyc = 0;
    for (int p = 0; p < NP; p++) begin
      loads = 0; macs = 0;
      while (phase == PH_LOAD) begin
        chk(int'(part) == p, "partition order");
        if (map_rd) begin chk(int'(slot) == loads, "load slot"); loads++; end
        @(posedge clk); #1; cyc++;
      end
      chk(loads == E, "load count");
      while (phase == PH_MAC) begin
        if (mac_rd) begin
          chk(int'(slot) == macs / T && int'(age) == macs % T, "mac order");
          chk(mac_first == (macs == 0), "mac_first");
          macs++;
        end
        if (send_extra && p == 1 && macs == 3) begin frame = 1; @(posedge clk); #1 frame = 0; cyc++; continue; end
        @(posedge clk); #1; cyc++;
      end
      chk(macs == E * T, "mac count");
      chk(phase == PH_DISC && disc_load, "disc"); @(posedge clk); #1; cyc++;
      chk(phase == PH_DET && det_en, "det"); @(posedge clk); #1; cyc++;
      chk(phase == PH_LOC, "loc");
      ps = 0;
      if (p == lbp) begin
        loc_busy = 1;
        repeat (lb) begin @(posedge clk); #1; cyc++; chk(phase == PH_LOC, "loc held"); end
        loc_busy = 0;
      end
      @(posedge clk); #1; cyc++;
    end
    chk(cyc == NP * (E * T + E + 6) + lb, "frame length");
    chk(int'(ptr) == exp_ptr && int'(ts) == exp_ts, "pointer / time stamp");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(!busy && phase == PH_IDLE, "idle after reset");
    for (int f = 0; f < 6; f++) begin
      run_frame(f, f % NP, 0);
      chk(!busy && !overrun, "idle between frames");
      repeat (3) @(posedge clk); #1;
    end
    // a frame arriving during processing
    run_frame(0, 0, 1);
    chk(overrun, "overrun flagged");
    // the pending frame starts by itself one clock later
    @(posedge clk); #1;
    chk(phase == PH_LOAD || busy, "pending frame started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
