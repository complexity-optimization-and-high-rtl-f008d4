// marginal_check: cross-fold acceptance of spikes of marginal neurons.
//
// Neurons in the overlap ("marginal zone") between partitions are held in
// every partition that contains them, under one global ID. A spike of such a
// neuron is real only if every one of those partitions reports it; a report
// from just one partition is a false detection caused by a spiking
// neighbour in that partition. The host stores for each global ID how many
// partitions hold it (1 for ordinary neurons, 2..4 for marginal ones). For
// each ID the unit keeps a mask of the partitions that reported it and the
// sample count of the first report. A report within `mwin` samples of the
// first one adds its partition to the mask; a later one starts afresh. When
// the mask holds as many partitions as required, the spike is output (time
// stamp of the accepting report) and the entry is cleared. Ordinary neurons
// pass straight through. Reports are handled as they arrive, one per clock;
// output is registered (one clock). The acceptance rule and the short
// tolerance window follow the source design; the mask form is this design's.
module marginal_check
  import botm_pkg::*;
#(
  parameter int unsigned N_P   = N_P_D,
  parameter int unsigned N_GID = 1 << GID_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic            in_valid,
  input  spike_t          in_rep,
  input  logic [TS_W-1:0] now,
  input  logic [MWIN_W-1:0] mwin,
  output logic            out_valid,
  output spike_t          out
);
  logic [2:0]      need  [N_GID];
  logic [N_P-1:0]  mask  [N_GID];
  logic [TS_W-1:0] first [N_GID];

  logic [GID_W-1:0] g;
  logic [N_P-1:0]   m_old, m_new;
  logic             fresh;
  logic [3:0]       nrep;
  assign g = in_rep.gid;

  always_comb begin
    m_old = mask[g];
    fresh = (m_old == '0) || ((now - first[g]) > TS_W'(mwin));
    m_new = (fresh ? '0 : m_old) | (N_P'(1) << in_rep.part);
    nrep  = '0;
    for (int p = 0; p < N_P; p++) nrep = nrep + 4'(m_new[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_GID; i++) begin
        need[i] <= 3'd1;
        mask[i] <= '0;
      end
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cfg.we && cfg.target == CFG_MARG && 32'(cfg.idx) < N_GID)
        need[cfg.idx[GID_W-1:0]] <= cfg.data[2:0];
      if (in_valid) begin
        if ({1'b0, nrep} >= {2'b0, need[g]}) begin
          out_valid <= 1'b1;
          out       <= in_rep;
          mask[g]   <= '0;
        end else begin
          mask[g]   <= m_new;
          if (fresh) first[g] <= now;
        end
      end
    end
  end
endmodule
