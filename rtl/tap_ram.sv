// tap_ram: FIR tap memory of one filter, organised as circular buffers.
//
// One filter of the partition-processing unit serves one neuron in each of
// the N_P partitions, so its memory holds N_P x E circular buffers of T
// samples (one per partition and relevant electrode). A single first-tap
// pointer `ptr`, shared by all buffers and moved once per sampling cycle,
// marks where the newest sample is written; the sample of age k (k = 0 newest)
// sits at (ptr + k) mod T. The host never writes here.
// Write and read are independent ports; the read returns data one clock after
// the address. The FIFO-with-pointer form follows the source design.
module tap_ram
  import botm_pkg::*;
#(
  parameter int unsigned N_P = N_P_D,
  parameter int unsigned E   = E_D,
  parameter int unsigned T   = T_D,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned KW = (T > 1) ? $clog2(T) : 1
) (
  input  logic             clk,
  input  logic [KW-1:0]    ptr,
  input  logic             wr_en,
  input  logic [PW-1:0]    wr_part,
  input  logic [SW-1:0]    wr_slot,
  input  logic [TAP_W-1:0] wr_data,
  input  logic [PW-1:0]    rd_part,
  input  logic [SW-1:0]    rd_slot,
  input  logic [KW-1:0]    rd_age,
  output logic [TAP_W-1:0] rd_data
);
  localparam int unsigned DEPTH = N_P * E * T;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [TAP_W-1:0] mem [DEPTH];
  logic [KW:0]      rpos;
  logic [KW-1:0]    rpos_m;
  logic [AW-1:0]    waddr, raddr;

  always_comb begin
    rpos   = {1'b0, ptr} + {1'b0, rd_age};
    rpos_m = (32'(rpos) >= T) ? KW'(32'(rpos) - T) : rpos[KW-1:0];
    waddr  = AW'((32'(wr_part) * E + 32'(wr_slot)) * T + 32'(ptr));
    raddr  = AW'((32'(rd_part) * E + 32'(rd_slot)) * T + 32'(rpos_m));
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[waddr] <= wr_data;
    rd_data <= mem[raddr];
  end
endmodule
