// spike_localizer: splits the candidates of a closed detection window into
// spike regions and reports the dominant neuron of each.
//
// `start` (the detection window's end) loads the candidate mask with each
// candidate's maximum, its time stamp, global ID and coordinates. Then, one
// region per clock, the remaining candidate with the largest maximum (lowest
// slot on a tie) is reported, and every remaining candidate closer than R to
// it (dist_check, both axis differences below R) is removed, the reported
// one included. Distant neurons that spiked together (temporal overlaps)
// therefore each get a report, while neighbours that merely picked up the
// same spike are suppressed. Report-one-region-at-a-time and
// dominant = maximal discriminant follow the source design; the greedy
// order and tie rule are this design's choice.
// Timing: first report two edges after `start` is sampled (rep_valid is
// registered), then one per clock; `busy` is high from `start`
// (combinationally) until rep_valid of the last report is set.
module spike_localizer
  import botm_pkg::*;
#(
  parameter int unsigned NF = NF_D
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [7:0]                 part,
  input  logic [NF-1:0]              cand,
  input  logic [NF-1:0][DISC_W-1:0]  maxv,
  input  logic [NF-1:0][TS_W-1:0]    pts,
  input  logic [NF-1:0][GID_W-1:0]   gid,
  input  logic [NF-1:0][XY_W-1:0]    x,
  input  logic [NF-1:0][XY_W-1:0]    y,
  input  logic [XY_W-1:0]            r,
  output logic                       rep_valid,
  output spike_t                     rep,
  output logic                       busy
);
  localparam int unsigned JW = (NF > 1) ? $clog2(NF) : 1;

  logic [NF-1:0]             rem;
  logic [NF-1:0][DISC_W-1:0] mv;
  logic [NF-1:0][TS_W-1:0]   mts;
  logic [NF-1:0][GID_W-1:0]  mg;
  logic [NF-1:0][XY_W-1:0]   mx, my;
  logic [7:0]                mpart;
  logic                      run;

  // winner search
  logic [JW-1:0] w;
  always_comb begin
    logic found;
    found = 1'b0;
    w     = '0;
    for (int j = 0; j < NF; j++)
      if (rem[j] && (!found || signed'(mv[j]) > signed'(mv[w]))) begin
        w     = JW'(j);
        found = 1'b1;
      end
  end

  logic [NF-1:0] close;
  for (genvar j = 0; j < NF; j++) begin : g_dist
    dist_check u_dc (.xa(mx[w]), .ya(my[w]), .xb(mx[j]), .yb(my[j]), .r(r), .close(close[j]));
  end

  assign busy = run | start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem       <= '0;
      run       <= 1'b0;
      rep_valid <= 1'b0;
      rep       <= '0;
      mpart     <= '0;
    end else begin
      rep_valid <= 1'b0;
      if (start) begin
        rem   <= cand;
        mv    <= maxv;
        mts   <= pts;
        mg    <= gid;
        mx    <= x;
        my    <= y;
        mpart <= part;
        run   <= 1'b1;
      end else if (run) begin
        if (rem == '0) begin
          run <= 1'b0;
        end else begin
          rep_valid <= 1'b1;
          rep.gid   <= mg[w];
          rep.ts    <= mts[w];
          rep.part  <= mpart;
          rem       <= rem & ~close & ~(NF'(1) << w);
          if ((rem & ~close & ~(NF'(1) << w)) == '0) run <= 1'b0;
        end
      end
    end
  end
endmodule
