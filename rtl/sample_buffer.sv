// sample_buffer: ping-pong store of the latest band-passed sample of every
// electrode.
//
// The band-pass stage writes the current sampling cycle into one bank while
// the folds of the previous sampling cycle read the other bank; `swap` (the
// end of an input frame) exchanges the banks. This is the synchronisation
// between the input-stream rate and the folding rate; the source design
// names such an overhead but not its structure, so the ping-pong form is this
// design's choice. NR independent read ports (one per FIR filter of the
// partition-processing unit) return data one clock after the address.
module sample_buffer
  import botm_pkg::*;
#(
  parameter int unsigned N_ELEC = N_ELEC_D,
  parameter int unsigned NR     = NF_D,
  localparam int unsigned EW = (N_ELEC > 1) ? $clog2(N_ELEC) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [EW-1:0]            wr_addr,
  input  logic [TAP_W-1:0]         wr_data,
  input  logic                     swap,
  input  logic [NR-1:0][EW-1:0]    rd_addr,
  output logic [NR-1:0][TAP_W-1:0] rd_data
);
  logic [TAP_W-1:0] mem [2][N_ELEC];
  logic             wbank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wbank][wr_addr] <= wr_data;
    for (int i = 0; i < NR; i++) rd_data[i] <= mem[~wbank][rd_addr[i]];
  end
endmodule
