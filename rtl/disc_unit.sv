// disc_unit: forms the discriminant functions of all filters of a partition.
//
//   d_i = sat_DISC_W( (sum_i >>> d_shift) + c_i )
// where sum_i is the FIR response of neuron i and c_i its constant (log spike
// probability minus half the template energy, computed by the host). The
// constants of all partitions are held in one dedicated memory, one row of NF
// constants per partition, written by the host with CFG_CONST (part, filt)
// at any time. The row of the current partition is read one clock after
// `part` changes; `load` captures the NF results into `d` on the next edge.
// The formula and the 13-bit width follow the source design; the run-time
// right shift that brings the 42-bit sum to the 13-bit scale and the
// saturation are this design's choice.
module disc_unit
  import botm_pkg::*;
#(
  parameter int unsigned N_P   = N_P_D,
  parameter int unsigned NF    = NF_D,
  parameter int unsigned ACC_W = TAP_W + COEF_W + 8,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned FW = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  cfg_wr_t                         cfg,
  input  logic [PW-1:0]                   part,
  input  logic [NF-1:0][ACC_W-1:0]        acc,
  input  logic [5:0]                      d_shift,
  input  logic                            load,
  output logic [NF-1:0][DISC_W-1:0]       d
);
  logic [NF-1:0][DISC_W-1:0] cmem [N_P];
  logic [NF-1:0][DISC_W-1:0] crow;

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.target == CFG_CONST && 32'(cfg.part) < N_P && 32'(cfg.filt) < NF)
      cmem[cfg.part[PW-1:0]][cfg.filt[FW-1:0]] <= cfg.data[DISC_W-1:0];
    crow <= cmem[part];
  end

  localparam logic signed [ACC_W:0] DMAX = (ACC_W+1)'((1 << (DISC_W-1)) - 1);
  localparam logic signed [ACC_W:0] DMIN = -DMAX - 1;

  logic [NF-1:0][DISC_W-1:0] d_n;
  always_comb begin
    for (int j = 0; j < NF; j++) begin
      logic signed [ACC_W:0] v;
      v = ((ACC_W+1)'(signed'(acc[j])) >>> d_shift) + (ACC_W+1)'(signed'(crow[j]));
      if (v > DMAX)      d_n[j] = DMAX[DISC_W-1:0];
      else if (v < DMIN) d_n[j] = DMIN[DISC_W-1:0];
      else               d_n[j] = v[DISC_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    d <= '0;
    else if (load) d <= d_n;
  end
endmodule
