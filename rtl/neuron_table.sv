// neuron_table: description of the neuron held in each filter slot of each
// partition: a valid flag, a global neuron ID and the neuron's X/Y position
// in the multiplier-free coordinate system used by the distance test.
// A marginal neuron appears in several partitions under the same global ID.
// Written by the host (CFG_NID, CFG_NXY) at any time; the row of partition
// `rd_part` is output one clock after the address. Valid flags reset to 0,
// so unconfigured slots never report. The use of global IDs for marginal
// neurons is this design's choice.
module neuron_table
  import botm_pkg::*;
#(
  parameter int unsigned N_P = N_P_D,
  parameter int unsigned NF  = NF_D,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned FW = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cfg_wr_t                   cfg,
  input  logic [PW-1:0]             rd_part,
  output logic [NF-1:0]             valid,
  output logic [NF-1:0][GID_W-1:0]  gid,
  output logic [NF-1:0][XY_W-1:0]   x,
  output logic [NF-1:0][XY_W-1:0]   y
);
  logic [NF-1:0]            vmem [N_P];
  logic [NF-1:0][GID_W-1:0] gmem [N_P];
  logic [NF-1:0][XY_W-1:0]  xmem [N_P];
  logic [NF-1:0][XY_W-1:0]  ymem [N_P];

  logic hit;
  assign hit = cfg.we && 32'(cfg.part) < N_P && 32'(cfg.filt) < NF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_P; p++) vmem[p] <= '0;
    end else if (hit && cfg.target == CFG_NID) begin
      vmem[cfg.part[PW-1:0]][cfg.filt[FW-1:0]] <= cfg.data[GID_W];
    end
  end

  always_ff @(posedge clk) begin
    if (hit && cfg.target == CFG_NID) gmem[cfg.part[PW-1:0]][cfg.filt[FW-1:0]] <= cfg.data[GID_W-1:0];
    if (hit && cfg.target == CFG_NXY) begin
      xmem[cfg.part[PW-1:0]][cfg.filt[FW-1:0]] <= cfg.data[31:16];
      ymem[cfg.part[PW-1:0]][cfg.filt[FW-1:0]] <= cfg.data[15:0];
    end
    valid <= vmem[rd_part];
    gid   <= gmem[rd_part];
    x     <= xmem[rd_part];
    y     <= ymem[rd_part];
  end
endmodule
