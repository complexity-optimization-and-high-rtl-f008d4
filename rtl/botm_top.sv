// botm_top: real-time Bayes-optimal template-matching (BOTM) spike sorter
// for high-density multi-electrode arrays, folded over electrode partitions.
//
// Data flow (one sampling cycle):
//  1. The electrode samples arrive as a stream (in_valid/in_elec/in_data,
//     one electrode per clock, electrode N_ELEC-1 last). A shared
//     time-multiplexed biquad band-pass (bpf_mux) filters them into a
//     ping-pong sample buffer.
//  2. When the last electrode is written the buffer banks swap and
//     fold_ctrl runs the N_P folds on the completed frame. In each fold the
//     NF filters of the partition-processing unit (ppu) take the new sample
//     of each relevant electrode, chosen by the connectivity map, into
//     their tap memories, evaluate their E x T matched filters, form the
//     discriminant functions, update the partition's detection window and,
//     when it closes, report the dominant neuron of each spike region.
//  3. marginal_check accepts a marginal neuron's spike only when every
//     partition holding it has reported it; accepted spikes leave on
//     spk_valid/spk (global neuron ID, time stamp in samples, partition).
// All tables (coefficients, constants, connectivity map, neuron slots,
// marginal counts, band-pass coefficients, run-time registers) are written
// through the `cfg` port at any time, also while sorting runs.
// The source design uses four clock domains; here one clock with a frame
// strobe and a phase counter does the same job. Port timing: `cfg` writes
// take effect on the next edge; a frame needs N_P*(E*T+E+6) clocks plus
// localization reports and must finish before the next frame, else the
// sticky `overrun` is set.
module botm_top
  import botm_pkg::*;
#(
  parameter int unsigned N_ELEC = N_ELEC_D,
  parameter int unsigned N_P    = N_P_D,
  parameter int unsigned NF     = NF_D,
  parameter int unsigned E      = E_D,
  parameter int unsigned T      = T_D,
  localparam int unsigned EW = (N_ELEC > 1) ? $clog2(N_ELEC) : 1,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned KW = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned CDEPTH = N_P * E * T,
  localparam int unsigned CAW = (CDEPTH > 1) ? $clog2(CDEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [EW-1:0]           in_elec,
  input  logic signed [ADC_W-1:0] in_data,
  input  cfg_wr_t                 cfg,
  output logic                    spk_valid,
  output spike_t                  spk,
  output logic                    overrun,
  output logic                    busy
);
  // ---------------- run-time and band-pass registers ----------------------
  run_regs_t regs;
  logic signed [BQ_W-1:0] bq [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs.d_shift  <= 6'(DSHIFT_D);
      regs.l_dw_min <= 8'(L_DW_MIN_D);
      regs.r        <= XY_W'(R_D);
      regs.mwin     <= MWIN_W'(MWIN_D);
      bq[0] <= BQ_B0_D; bq[1] <= BQ_B1_D; bq[2] <= BQ_B2_D;
      bq[3] <= BQ_A1_D; bq[4] <= BQ_A2_D;
    end else if (cfg.we) begin
      if (cfg.target == CFG_REG) begin
        unique case (cfg.idx)
          16'd0:   regs.d_shift  <= cfg.data[5:0];
          16'd1:   regs.l_dw_min <= cfg.data[7:0];
          16'd2:   regs.r        <= cfg.data[XY_W-1:0];
          16'd3:   regs.mwin     <= cfg.data[MWIN_W-1:0];
          default: ;
        endcase
      end else if (cfg.target == CFG_BPF && cfg.idx < 16'd5) begin
        bq[cfg.idx[2:0]] <= cfg.data[BQ_W-1:0];
      end
    end
  end

  // ---------------- input band-pass and sample buffer --------------------
  logic                    bp_valid;
  logic [EW-1:0]           bp_elec;
  logic signed [TAP_W-1:0] bp_data;

  bpf_mux #(.N_ELEC(N_ELEC)) u_bpf (
    .clk, .rst_n, .in_valid, .in_elec, .in_data,
    .b0(bq[0]), .b1(bq[1]), .b2(bq[2]), .a1(bq[3]), .a2(bq[4]),
    .out_valid(bp_valid), .out_elec(bp_elec), .out_data(bp_data));

  logic frame;
  assign frame = bp_valid && (32'(bp_elec) == N_ELEC - 1);

  logic [NF-1:0][EW-1:0]    sb_addr;
  logic [NF-1:0][TAP_W-1:0] sb_data;

  sample_buffer #(.N_ELEC(N_ELEC), .NR(NF)) u_sbuf (
    .clk, .rst_n, .wr_en(bp_valid), .wr_addr(bp_elec), .wr_data(bp_data),
    .swap(frame), .rd_addr(sb_addr), .rd_data(sb_data));

  // ---------------- folding controller ----------------------------------
  phase_e          phase;
  logic [PW-1:0]   part;
  logic [SW-1:0]   slot;
  logic [KW-1:0]   age, ptr;
  logic            map_rd, mac_rd, mac_first, disc_load, det_en, loc_busy;
  logic [TS_W-1:0] ts;

  fold_ctrl #(.N_P(N_P), .E(E), .T(T)) u_ctrl (
    .clk, .rst_n, .frame, .loc_busy, .phase, .part, .slot, .age,
    .map_rd, .mac_rd, .mac_first, .disc_load, .det_en, .ptr, .ts,
    .busy, .overrun);

  // LOAD pipeline: map read (1 clk) -> sample buffer read (1 clk) -> tap write
  logic [1:0]          ld_v;
  logic [1:0][SW-1:0]  ld_slot;
  logic                mac_en, mac_clr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_v    <= '0;
      ld_slot <= '0;
      mac_en  <= 1'b0;
      mac_clr <= 1'b0;
    end else begin
      ld_v    <= {ld_v[0], map_rd};
      ld_slot <= {ld_slot[0], slot};
      mac_en  <= mac_rd;
      mac_clr <= mac_first;
    end
  end

  conn_map #(.N_ELEC(N_ELEC), .N_P(N_P), .NF(NF), .E(E)) u_map (
    .clk, .cfg, .rd_part(part), .rd_slot(slot), .rd_elec(sb_addr));

  // ---------------- per-filter tap and coefficient memories --------------
  logic [NF-1:0][TAP_W-1:0]  taps;
  logic [NF-1:0][COEF_W-1:0] coefs;
  logic [CAW-1:0]            c_raddr, c_waddr;

  assign c_raddr = CAW'((32'(part) * E + 32'(slot)) * T + 32'(age));
  assign c_waddr = CAW'((32'(cfg.part) * E + 32'(cfg.slot)) * T + 32'(cfg.idx));

  for (genvar j = 0; j < NF; j++) begin : g_filt
    tap_ram #(.N_P(N_P), .E(E), .T(T)) u_tap (
      .clk, .ptr, .wr_en(ld_v[1]), .wr_part(part), .wr_slot(ld_slot[1]),
      .wr_data(sb_data[j]), .rd_part(part), .rd_slot(slot), .rd_age(age),
      .rd_data(taps[j]));

    coef_ram #(.N_P(N_P), .E(E), .T(T)) u_coef (
      .clk,
      .wr_en(cfg.we && cfg.target == CFG_COEF && 32'(cfg.filt) == j &&
             32'(cfg.part) < N_P && 32'(cfg.slot) < E && 32'(cfg.idx) < T),
      .wr_addr(c_waddr), .wr_data(cfg.data[COEF_W-1:0]),
      .rd_addr(c_raddr), .rd_data(coefs[j]));
  end

  // ---------------- neuron slots and partition-processing unit -----------
  logic [NF-1:0]            nvalid;
  logic [NF-1:0][GID_W-1:0] ngid;
  logic [NF-1:0][XY_W-1:0]  nx, ny;

  neuron_table #(.N_P(N_P), .NF(NF)) u_ntab (
    .clk, .rst_n, .cfg, .rd_part(part), .valid(nvalid), .gid(ngid), .x(nx), .y(ny));

  logic   rep_valid;
  spike_t rep;

  ppu #(.N_P(N_P), .NF(NF)) u_ppu (
    .clk, .rst_n, .cfg, .regs, .part, .ts, .mac_en, .mac_clr, .taps, .coefs,
    .disc_load, .det_en, .nvalid, .ngid, .nx, .ny, .rep_valid, .rep, .loc_busy);

  // ---------------- cross-fold comparison of marginal neurons ------------
  marginal_check #(.N_P(N_P)) u_marg (
    .clk, .rst_n, .cfg, .in_valid(rep_valid), .in_rep(rep), .now(ts),
    .mwin(regs.mwin), .out_valid(spk_valid), .out(spk));
endmodule
