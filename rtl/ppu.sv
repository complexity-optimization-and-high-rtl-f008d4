// ppu: partition-processing unit, the folded core of the sorter.
//
// NF filters work in parallel, each evaluating the FIR response of the
// neuron it holds in the current partition with one multiplier (fir_mac)
// from tap and coefficient words read from its own memories, which sit
// outside this unit. The responses become discriminant functions
// (disc_unit, constants held inside), go through zero-threshold detection
// with an adaptive detection window (dw_detector) and, when a window closes,
// the candidates are split into spike regions and their dominant neurons
// are reported (spike_localizer). All sequencing comes from fold_ctrl:
//   mac_en/mac_clr one clock after the RAM reads were issued,
//   disc_load once the sums are complete, det_en one clock later.
// Reports leave on rep_valid/rep; loc_busy tells the controller when the
// fold's localization is finished. The division of work follows the source
// design's block diagram.
module ppu
  import botm_pkg::*;
#(
  parameter int unsigned N_P   = N_P_D,
  parameter int unsigned NF    = NF_D,
  parameter int unsigned ACC_W = TAP_W + COEF_W + 8,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  cfg_wr_t                    cfg,
  input  run_regs_t                  regs,
  input  logic [PW-1:0]              part,
  input  logic [TS_W-1:0]            ts,
  input  logic                       mac_en,
  input  logic                       mac_clr,
  input  logic [NF-1:0][TAP_W-1:0]   taps,
  input  logic [NF-1:0][COEF_W-1:0]  coefs,
  input  logic                       disc_load,
  input  logic                       det_en,
  input  logic [NF-1:0]              nvalid,
  input  logic [NF-1:0][GID_W-1:0]   ngid,
  input  logic [NF-1:0][XY_W-1:0]    nx,
  input  logic [NF-1:0][XY_W-1:0]    ny,
  output logic                       rep_valid,
  output spike_t                     rep,
  output logic                       loc_busy
);
  logic [NF-1:0][ACC_W-1:0]  acc;
  logic [NF-1:0][DISC_W-1:0] d;

  for (genvar j = 0; j < NF; j++) begin : g_mac
    logic signed [ACC_W-1:0] a;
    fir_mac #(.ACC_W(ACC_W)) u_mac (
      .clk, .rst_n, .clr(mac_clr), .en(mac_en),
      .tap(signed'(taps[j])), .coef(signed'(coefs[j])), .acc(a));
    assign acc[j] = a;
  end

  disc_unit #(.N_P(N_P), .NF(NF), .ACC_W(ACC_W)) u_disc (
    .clk, .rst_n, .cfg, .part, .acc, .d_shift(regs.d_shift), .load(disc_load), .d);

  logic                      win_end;
  logic [NF-1:0]             cand;
  logic [NF-1:0][DISC_W-1:0] maxv;
  logic [NF-1:0][TS_W-1:0]   pts;

  dw_detector #(.N_P(N_P), .NF(NF)) u_dw (
    .clk, .rst_n, .en(det_en), .part, .d, .valid(nvalid), .ts,
    .l_dw_min(regs.l_dw_min), .win_end, .cand, .maxv, .pts);

  spike_localizer #(.NF(NF)) u_loc (
    .clk, .rst_n, .start(win_end), .part(8'(part)), .cand, .maxv, .pts,
    .gid(ngid), .x(nx), .y(ny), .r(regs.r), .rep_valid, .rep, .busy(loc_busy));
endmodule
