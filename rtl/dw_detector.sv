// dw_detector: zero-threshold detection and adjustable detection window (DW).
//
// Once per fold (`en`), the NF discriminant values of partition `part` are
// checked against zero. If no window is open for that partition and any
// valid neuron is above zero, a window opens. While it is open, each
// neuron's running maximum and the time stamp of that maximum are tracked.
// The window closes at the first sample, at least l_dw_min samples after it
// opened, on which every discriminant is at or below zero (minimal length
// fixed, end adaptive, as in the source design). On closing, `win_end`
// pulses for one clock together with the candidate mask (valid neurons whose
// maximum is above zero), the maxima and their time stamps.
// Window state is kept per partition in registers because each partition is
// revisited only once per sampling cycle. Outputs are registered (one clock
// after `en`). Counter width and saturation are this design's choice.
module dw_detector
  import botm_pkg::*;
#(
  parameter int unsigned N_P = N_P_D,
  parameter int unsigned NF  = NF_D,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [PW-1:0]              part,
  input  logic [NF-1:0][DISC_W-1:0]  d,
  input  logic [NF-1:0]              valid,
  input  logic [TS_W-1:0]            ts,
  input  logic [7:0]                 l_dw_min,
  output logic                       win_end,
  output logic [NF-1:0]              cand,
  output logic [NF-1:0][DISC_W-1:0] maxv,
  output logic [NF-1:0][TS_W-1:0]    pts
);
  logic [N_P-1:0]            active;
  logic [7:0]                cnt   [N_P];
  logic [NF-1:0][DISC_W-1:0] mx    [N_P];
  logic [NF-1:0][TS_W-1:0]   mt    [N_P];

  logic [NF-1:0] above, cand_n;
  logic          closing;
  always_comb begin
    for (int j = 0; j < NF; j++) begin
      above[j]  = valid[j] && (signed'(d[j]) > 0);
      cand_n[j] = valid[j] && (signed'(mx[part][j]) > 0);
    end
    closing = active[part] && (cnt[part] >= l_dw_min) && (above == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= '0;
      for (int p = 0; p < N_P; p++) cnt[p] <= '0;
      win_end <= 1'b0;
      cand    <= '0;
      maxv    <= '0;
      pts     <= '0;
    end else begin
      win_end <= 1'b0;
      if (en) begin
        if (!active[part]) begin
          if (above != '0) begin
            active[part] <= 1'b1;
            cnt[part]    <= 8'd1;
            mx[part]     <= d;
            for (int j = 0; j < NF; j++) mt[part][j] <= ts;
          end
        end else if (closing) begin
          active[part] <= 1'b0;
          win_end      <= 1'b1;
          cand         <= cand_n;
          maxv         <= mx[part];
          pts          <= mt[part];
        end else begin
          if (cnt[part] != 8'hFF) cnt[part] <= cnt[part] + 8'd1;
          for (int j = 0; j < NF; j++)
            if (signed'(d[j]) > signed'(mx[part][j])) begin
              mx[part][j] <= d[j];
              mt[part][j] <= ts;
            end
        end
      end
    end
  end
endmodule
