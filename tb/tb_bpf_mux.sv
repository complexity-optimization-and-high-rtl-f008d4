// tb_bpf_mux: self-checking test of the multiplexed band-pass filter.
// Four electrodes are interleaved in the stream. (1) Random samples are
// compared word by word with a direct evaluation of the DF-II recursion
// kept per electrode in the testbench. (2) With the default 500 Hz-3 kHz
// coefficients, a constant (DC) input must decay to nearly zero and a
// 1.2 kHz sine at 20 kHz sampling must pass with a gain close to one, while
// electrodes keep independent states. One output per clock, latency 1.
module tb_bpf_mux;
  import botm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [1:0] in_elec = 0;
  logic signed [ADC_W-1:0] in_data = 0;
  logic out_valid;
  logic [1:0] out_elec;
  logic signed [TAP_W-1:0] out_data;
  logic signed [BQ_W-1:0] b0 = BQ_B0_D, b1 = BQ_B1_D, b2 = BQ_B2_D, a1 = BQ_A1_D, a2 = BQ_A2_D;

  bpf_mux #(.N_ELEC(N)) dut (.*);

  longint rw1 [N], rw2 [N];
  function automatic longint sat(longint v, int bits);
    longint hi = (longint'(1) <<< (bits-1)) - 1;
    if (v > hi) return hi;
    if (v < -hi-1) return -hi-1;
    return v;
  endfunction
  function automatic longint ref_step(int e, longint x);
    longint w, y;
    w = sat(((x <<< 22) - (longint'(a1) * rw1[e] + longint'(a2) * rw2[e])) >>> 14, BQ_ST_W);
    y = sat((longint'(b0) * w + longint'(b1) * rw1[e] + longint'(b2) * rw2[e]) >>> 14, TAP_W);
    rw2[e] = rw1[e]; rw1[e] = w;
    return y;
  endfunction

  longint exp_y; int exp_e; bit exp_v;
  real peak [N];
  // drive one sample, check the previous one on the same edge
  task automatic push(int e, longint x);
    in_valid <= 1; in_elec <= 2'(e); in_data <= ADC_W'(x);
    @(posedge clk); #1;
    exp_y = ref_step(e, x); exp_e = e;
    checks++;
    if (!out_valid || out_elec != 2'(e) || longint'(out_data) != exp_y) begin
      failures++;
      if (failures < 10) $display("mismatch e=%0d got %0d exp %0d", e, out_data, exp_y);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < N; e++) begin rw1[e] = 0; rw2[e] = 0; end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // random exact comparison
    for (int n = 0; n < 300; n++)
      for (int e = 0; e < N; e++) push(e, longint'($signed(10'($urandom))));
    // reset state by flushing with zeros isn't exact; re-reset instead
    in_valid <= 0; rst_n = 0; @(posedge clk); rst_n = 1; #1;
    for (int e = 0; e < N; e++) begin rw1[e] = 0; rw2[e] = 0; peak[e] = 0; end
    // e0: DC 300, e1: 1.2 kHz sine amplitude 400, e2: 200 Hz... e3: 8 kHz
    for (int n = 0; n < 400; n++) begin
      push(0, 300);
      push(1, longint'($rtoi(400.0 * $sin(2.0*3.14159265*1200.0*n/20000.0))));
      push(2, longint'($rtoi(400.0 * $sin(2.0*3.14159265*9000.0*n/20000.0))));
      push(3, 0);
      if (n == 399) begin
        checks++;
        if (out_data != 0) failures++; // e3 silent
      end
    end
    // measure the last period's amplitude by re-running the recursion
    begin
      longint y; real m0 = 0, m1 = 0, m2 = 0;
      for (int n = 400; n < 500; n++) begin
        y = ref_step(0, 300); if ($itor(y) > m0 || -$itor(y) > m0) m0 = (y < 0) ? -$itor(y) : $itor(y);
        y = ref_step(1, longint'($rtoi(400.0 * $sin(2.0*3.14159265*1200.0*n/20000.0))));
        if ((y < 0 ? -$itor(y) : $itor(y)) > m1) m1 = (y < 0) ? -$itor(y) : $itor(y);
        y = ref_step(2, longint'($rtoi(400.0 * $sin(2.0*3.14159265*9000.0*n/20000.0))));
        if ((y < 0 ? -$itor(y) : $itor(y)) > m2) m2 = (y < 0) ? -$itor(y) : $itor(y);
      end
      $display("DC residue %0f, 1.2kHz gain %0f, 9kHz gain %0f", m0/(300.0*256), m1/(400.0*256), m2/(400.0*256));
      checks++; if (m0/(300.0*256) > 0.02) failures++;
      checks++; if (m1/(400.0*256) < 0.9 || m1/(400.0*256) > 1.05) failures++;
      checks++; if (m2/(400.0*256) > 0.4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
