// bpf_mux: time-multiplexed second-order band-pass ("interpolation") filter.
//
// The electrode samples arrive as a stream, one electrode per clock. A single
// direct-form-II biquad serves all electrodes: the two state words of each
// electrode are kept in a register array indexed by the electrode number.
//   w[n] = x[n] - a1*w[n-1] - a2*w[n-2]
//   y[n] = b0*w[n] + b1*w[n-1] + b2*w[n-2]
// Coefficients are signed Q3.14 and may be changed at any time; the defaults
// give a 500 Hz - 3 kHz pass band at 20 kHz sampling, as in the published
// design. The 10-bit input is scaled by 2^8 so that the 20-bit output keeps
// eight fractional bits (the reason the stage exists is to reduce the
// quantisation error of the 10-bit samples). Output saturates to 20 bits.
// The structure (DF-II, multiplexed, per-electrode registers) follows the
// source design; the fixed-point formats are this design's choice.
// Timing: one sample per clock, out_* valid one clock after in_*.
module bpf_mux
  import botm_pkg::*;
#(
  parameter int unsigned N_ELEC = N_ELEC_D,
  localparam int unsigned EW = (N_ELEC > 1) ? $clog2(N_ELEC) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [EW-1:0]               in_elec,
  input  logic signed [ADC_W-1:0]     in_data,
  input  logic signed [BQ_W-1:0]      b0, b1, b2, a1, a2,
  output logic                        out_valid,
  output logic [EW-1:0]               out_elec,
  output logic signed [TAP_W-1:0]     out_data
);
  localparam int unsigned PW = BQ_ST_W + BQ_W; // product width

  logic signed [BQ_ST_W-1:0] w1 [N_ELEC];
  logic signed [BQ_ST_W-1:0] w2 [N_ELEC];

  logic signed [BQ_ST_W-1:0] s1, s2, x_s, w_n;
  logic signed [PW+2:0]      fb, ff;
  logic signed [PW+2:0]      w_full, y_full;

  function automatic logic signed [BQ_ST_W-1:0] sat_st(input logic signed [PW+2:0] v);
    logic signed [PW+2:0] hi, lo;
    hi = (PW+3)'((64'sd1 <<< (BQ_ST_W-1)) - 1);
    lo = -hi - 1;
    if (v > hi) return hi[BQ_ST_W-1:0];
    if (v < lo) return lo[BQ_ST_W-1:0];
    return v[BQ_ST_W-1:0];
  endfunction

  function automatic logic signed [TAP_W-1:0] sat_out(input logic signed [PW+2:0] v);
    logic signed [PW+2:0] hi, lo;
    hi = (PW+3)'((64'sd1 <<< (TAP_W-1)) - 1);
    lo = -hi - 1;
    if (v > hi) return hi[TAP_W-1:0];
    if (v < lo) return lo[TAP_W-1:0];
    return v[TAP_W-1:0];
  endfunction

  always_comb begin
    s1     = w1[in_elec];
    s2     = w2[in_elec];
    x_s    = BQ_ST_W'(in_data) <<< 8;
    fb     = (PW+3)'(a1 * s1) + (PW+3)'(a2 * s2);
    w_full = ((PW+3)'(x_s) <<< BQ_FRAC) - fb;
    w_n    = sat_st(w_full >>> BQ_FRAC);
    ff     = (PW+3)'(b0 * w_n) + (PW+3)'(b1 * s1) + (PW+3)'(b2 * s2);
    y_full = ff >>> BQ_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ELEC; i++) begin
        w1[i] <= '0;
        w2[i] <= '0;
      end
      out_valid <= 1'b0;
      out_elec  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w1[in_elec] <= w_n;
        w2[in_elec] <= s1;
        out_elec    <= in_elec;
        out_data    <= sat_out(y_full);
      end
    end
  end
endmodule
