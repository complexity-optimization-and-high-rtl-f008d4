// tb_sample_buffer: checks the ping-pong electrode sample buffer. A frame
// is written into the write bank, the banks swap, and every read port then
// returns the frame's words (one clock latency) while the next frame is
// being written into the other bank without disturbing the reads.
module tb_sample_buffer;
  import botm_pkg::*;
  localparam int N = 8, NR = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, swap = 0;
  logic [2:0] wr_addr = 0;
  logic [TAP_W-1:0] wr_data = 0;
  logic [NR-1:0][2:0] rd_addr = '0;
  logic [NR-1:0][TAP_W-1:0] rd_data;
  sample_buffer #(.N_ELEC(N), .NR(NR)) dut (.*);

  logic [TAP_W-1:0] frame_v [3][N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++) for (int i = 0; i < N; i++) frame_v[f][i] = TAP_W'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      // write frame f; meanwhile read the previous frame on all ports
      for (int i = 0; i < N; i++) begin
        wr_en <= 1; wr_addr <= 3'(i); wr_data <= frame_v[f][i];
        swap <= (i == N - 1);
        for (int p = 0; p < NR; p++) rd_addr[p] <= 3'((i + p) % N);
        @(posedge clk); #1;
        if (f > 0) begin
          // data for the address presented one clock earlier
          for (int p = 0; p < NR; p++) begin
            checks++;
            if (rd_data[p] != frame_v[f-1][(i + p) % N]) failures++;
          end
        end
      end
      wr_en <= 0; swap <= 0;
      // after the swap: read the just-written frame
      for (int i = 0; i < N; i++) begin
        for (int p = 0; p < NR; p++) rd_addr[p] <= 3'((i * 3 + p) % N);
        @(posedge clk); #1;
        for (int p = 0; p < NR; p++) begin
          checks++;
          if (rd_data[p] != frame_v[f][(i * 3 + p) % N]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
