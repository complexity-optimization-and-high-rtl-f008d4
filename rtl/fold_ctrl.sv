// fold_ctrl: folding controller of the partition-processing unit.
//
// Each sampling cycle (`frame` pulse: a complete frame of band-passed
// samples is ready) the controller walks the N_P partitions one after the
// other, and for each one runs the phases
//   LOAD  E+2 clocks : slot e = 0..E-1 issued to the connectivity map; the
//                      caller delays the issue by two clocks (map read, sample
//                      buffer read) and writes the new sample into the taps
//   MAC   E*T+1 clocks: tap/coefficient reads issued for (e, k) in order,
//                      the multiply-accumulate trails them by one clock
//   DISC  1 clock    : discriminant functions captured
//   DET   1 clock    : threshold / detection window update
//   LOC   >=1 clock  : waits until the spike localizer is idle
// After the last partition the shared first-tap pointer moves back by one
// (mod T) and the sample counter `ts` advances. A fold without spikes takes
// E*T+E+6 clocks, so a sampling cycle takes N_P*(E*T+E+6) clocks plus the
// localization reports. A frame that arrives while the folds still run sets
// the sticky `overrun` flag and is processed right after.
// The folded schedule follows the source design; the phase lengths are set
// by this implementation's pipeline.
module fold_ctrl
  import botm_pkg::*;
#(
  parameter int unsigned N_P = N_P_D,
  parameter int unsigned E   = E_D,
  parameter int unsigned T   = T_D,
  localparam int unsigned PW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned SW = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned KW = (T > 1) ? $clog2(T) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame,
  input  logic            loc_busy,
  output phase_e          phase,
  output logic [PW-1:0]   part,
  output logic [SW-1:0]   slot,
  output logic [KW-1:0]   age,
  output logic            map_rd,    // LOAD issue for slot
  output logic            mac_rd,    // MAC read issue for (slot, age)
  output logic            mac_first, // first MAC read of the fold
  output logic            disc_load,
  output logic            det_en,
  output logic [KW-1:0]   ptr,
  output logic [TS_W-1:0] ts,
  output logic            busy,
  output logic            overrun
);
  logic [15:0] cyc;
  logic        pending;

  always_comb begin
    map_rd    = (phase == PH_LOAD) && (32'(cyc) < E);
    mac_rd    = (phase == PH_MAC) && (32'(cyc) < E * T);
    mac_first = mac_rd && (cyc == '0);
    disc_load = (phase == PH_DISC);
    det_en    = (phase == PH_DET);
    busy      = (phase != PH_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      part    <= '0;
      slot    <= '0;
      age     <= '0;
      cyc     <= '0;
      ptr     <= '0;
      ts      <= '0;
      pending <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (frame && (phase != PH_IDLE || pending)) begin
        overrun <= 1'b1;
      end
      if (frame && phase != PH_IDLE) pending <= 1'b1;
      unique case (phase)
        PH_IDLE: begin
          if (frame || pending) begin
            pending <= 1'b0;
            phase   <= PH_LOAD;
            part    <= '0;
            cyc     <= '0;
            slot    <= '0;
          end
        end
        PH_LOAD: begin
          cyc <= cyc + 16'd1;
          if (32'(cyc) < E - 1) slot <= slot + SW'(1);
          if (32'(cyc) == E + 1) begin
            phase <= PH_MAC;
            cyc   <= '0;
            slot  <= '0;
            age   <= '0;
          end
        end
        PH_MAC: begin
          cyc <= cyc + 16'd1;
          if (32'(cyc) < E * T - 1) begin
            if (32'(age) == T - 1) begin
              age  <= '0;
              slot <= slot + SW'(1);
            end else begin
              age <= age + KW'(1);
            end
          end
          if (32'(cyc) == E * T) phase <= PH_DISC;
        end
        PH_DISC: phase <= PH_DET;
        PH_DET:  phase <= PH_LOC;
        PH_LOC: begin
          if (!loc_busy) begin
            cyc  <= '0;
            slot <= '0;
            if (32'(part) == N_P - 1) begin
              phase <= PH_IDLE;
              part  <= '0;
              ptr   <= (ptr == '0) ? KW'(T - 1) : ptr - KW'(1);
              ts    <= ts + 1;
            end else begin
              part  <= part + PW'(1);
              phase <= PH_LOAD;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end
endmodule
