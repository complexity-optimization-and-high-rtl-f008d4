// botm_pkg: types and constants shared by the Bayes-optimal template-matching
// (BOTM) spike sorter.
//
// The default sizes describe the main configuration: 8 folds (electrode
// partitions) processed by one partition-processing unit with 82 parallel FIR
// filters (8 x 82 = 656 neuron slots, enough for the ~650 neurons of the
// eight-fold build), 5 relevant electrodes per neuron and 50-sample
// single-electrode templates (FIR order 49). Word widths follow the published
// figures: 10-bit electrode samples, 20-bit filter taps, 14-bit filter
// coefficients and 13-bit discriminant functions. The electrode count, the
// global neuron-ID width, the coordinate width and the host configuration bus
// are this design's own choices.
package botm_pkg;

  // ---------------- array and algorithm sizes --------------------------------
  localparam int unsigned N_ELEC_D = 1024; // recording electrodes in the stream
  localparam int unsigned N_P_D    = 8;    // partitions = folds
  localparam int unsigned NF_D     = 82;   // FIR filters in the PPU (neurons per partition)
  localparam int unsigned E_D      = 5;    // relevant electrodes per neuron
  localparam int unsigned T_D      = 50;   // single-electrode template length

  // ---------------- word widths ------------------------------------------------
  localparam int unsigned ADC_W  = 10;  // raw electrode sample
  localparam int unsigned TAP_W  = 20;  // band-passed sample / FIR tap
  localparam int unsigned COEF_W = 14;  // FIR coefficient
  localparam int unsigned DISC_W = 13;  // discriminant function / constant c_i
  localparam int unsigned BQ_W   = 18;  // band-pass coefficient, Q3.14
  localparam int unsigned BQ_FRAC = 14;
  localparam int unsigned BQ_ST_W = 26; // band-pass filter state
  localparam int unsigned GID_W  = 10;  // global neuron ID
  localparam int unsigned XY_W   = 16;  // neuron coordinate (um)
  localparam int unsigned TS_W   = 32;  // sample counter / time stamp
  localparam int unsigned MWIN_W = 4;   // marginal acceptance window (samples)

  // ---------------- run-time register defaults --------------------------------
  localparam int unsigned L_DW_MIN_D = 10;  // minimal detection window (samples)
  localparam int unsigned R_D        = 70;  // critical distance R (um)
  localparam int unsigned MWIN_D     = 3;   // marginal report window (samples)
  localparam int unsigned DSHIFT_D   = 20;  // FIR sum scaling before adding c_i

  // Band-pass 500 Hz - 3 kHz at 20 kHz, RBJ band-pass biquad, Q3.14.
  localparam logic signed [BQ_W-1:0] BQ_B0_D = 18'sd4538;
  localparam logic signed [BQ_W-1:0] BQ_B1_D = 18'sd0;
  localparam logic signed [BQ_W-1:0] BQ_B2_D = -18'sd4538;
  localparam logic signed [BQ_W-1:0] BQ_A1_D = -18'sd21960;
  localparam logic signed [BQ_W-1:0] BQ_A2_D = 18'sd7308;

  // ---------------- host configuration bus ------------------------------------
  // One write per clock; every table is dual-ported, so writes may happen
  // while sorting runs ("on the fly").
  typedef enum logic [2:0] {
    CFG_COEF   = 3'd0, // FIR coefficient: part, filt, slot=electrode, idx=tap k
    CFG_CONST  = 3'd1, // discriminant constant c_i: part, filt
    CFG_MAP    = 3'd2, // connectivity map: part, filt, slot -> electrode (data)
    CFG_NID    = 3'd3, // neuron slot: data[GID_W]=valid, data[GID_W-1:0]=global ID
    CFG_NXY    = 3'd4, // neuron slot: data[31:16]=X, data[15:0]=Y
    CFG_MARG   = 3'd5, // marginal table: idx=global ID, data[2:0]=partitions
    CFG_BPF    = 3'd6, // band-pass: idx 0..4 = b0,b1,b2,a1,a2
    CFG_REG    = 3'd7  // idx 0=d_shift 1=L_DW_min 2=R 3=marginal window
  } cfg_target_e;

  typedef struct packed {
    logic        we;
    cfg_target_e target;
    logic [7:0]  part;
    logic [7:0]  filt;
    logic [3:0]  slot;
    logic [15:0] idx;
    logic [31:0] data;
  } cfg_wr_t;

  // Run-time registers.
  typedef struct packed {
    logic [5:0]        d_shift;
    logic [7:0]        l_dw_min;
    logic [XY_W-1:0]   r;
    logic [MWIN_W-1:0] mwin;
  } run_regs_t;

  // One classified spike: global ID, time stamp of the discriminant maximum,
  // and the partition (fold) that reported it.
  typedef struct packed {
    logic [GID_W-1:0] gid;
    logic [TS_W-1:0]  ts;
    logic [7:0]       part;
  } spike_t;

  // Phases of one fold (one partition) in the folding controller.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_LOAD = 3'd1, // connectivity map -> sample buffer -> tap RAM write
    PH_MAC  = 3'd2, // E*T sequential multiply-accumulates per filter
    PH_DISC = 3'd3, // add constant, scale, saturate
    PH_DET  = 3'd4, // threshold / detection window
    PH_LOC  = 3'd5  // spike-region localization, one candidate per clock
  } phase_e;

endpackage
