// coef_ram: FIR coefficient memory of one filter.
//
// Holds the E x T matched-filter coefficients of the neuron this filter
// serves in each of the N_P partitions, at address (p*E + e)*T + k, where
// coefficient k multiplies the sample of age k. The host write port is
// independent of the read port, so coefficients can be replaced while
// sorting runs (on-the-fly adaptation, one word per clock). Read data
// appear one clock after the address. Coefficients are 14-bit signed, as in
// the source design; the address layout is this design's choice.
module coef_ram
  import botm_pkg::*;
#(
  parameter int unsigned N_P = N_P_D,
  parameter int unsigned E   = E_D,
  parameter int unsigned T   = T_D,
  localparam int unsigned DEPTH = N_P * E * T,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [COEF_W-1:0] wr_data,
  input  logic [AW-1:0]     rd_addr,
  output logic [COEF_W-1:0] rd_data
);
  logic [COEF_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
