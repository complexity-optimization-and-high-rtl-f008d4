// conn_map: connectivity map from (partition, filter, electrode slot) to the
// electrode whose band-passed sample feeds that subfilter.
//
// The host writes one entry per CFG_MAP write (part, filt, slot -> data);
// writes may happen while sorting runs. A read presents (partition, slot) and
// returns, one clock later, the electrode index for all NF filters at once, so
// every filter of the partition-processing unit is loaded in parallel.
// Table contents come from the host's electrode selection (highest template
// energy per neuron); the parallel-read organisation is this design's choice.
module conn_map
  import botm_pkg::*;
#(
  parameter int unsigned N_ELEC = N_ELEC_D,
  parameter int unsigned N_P    = N_P_D,
  parameter int unsigned NF     = NF_D,
  parameter int unsigned E      = E_D,
  localparam int unsigned EW = (N_ELEC > 1) ? $clog2(N_ELEC) : 1,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned FW = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                  clk,
  input  cfg_wr_t               cfg,
  input  logic [PW-1:0]         rd_part,
  input  logic [SW-1:0]         rd_slot,
  output logic [NF-1:0][EW-1:0] rd_elec
);
  logic [NF-1:0][EW-1:0] mem [N_P*E];

  logic cfg_hit;
  assign cfg_hit = cfg.we && cfg.target == CFG_MAP && 32'(cfg.part) < N_P &&
                   32'(cfg.filt) < NF && 32'(cfg.slot) < E;

  always_ff @(posedge clk) begin
    if (cfg_hit)
      mem[32'(cfg.part) * E + 32'(cfg.slot)][cfg.filt[FW-1:0]] <= cfg.data[EW-1:0];
    rd_elec <= mem[32'(rd_part) * E + 32'(rd_slot)];
  end
endmodule
