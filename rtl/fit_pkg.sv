// fit_pkg - widths, constants and record types shared by the FIT readout
// and trigger logic.
//
// Time units: the FPGA coarse TDC counts bins of 1/2400 MHz = 416.7 ps
// (four phases of a 600 MHz clock, both edges); a 25 ns bunch period is
// exactly 60 such bins. The external TDC counts 13 ps LSBs; 32 of them make
// one coarse bin. The merged channel time is in 13 ps LSBs.
// Channel count per Processing Module (12) and the PM counts per side
// (8 on A, 10 on C) follow the system description; every width below that
// is not a direct consequence of those numbers is a choice of this design.
package fit_pkg;

  // Processing Module geometry
  localparam int unsigned PM_CHANNELS   = 12;  // analog inputs per PM
  localparam int unsigned N_PM_A        = 8;   // PMs on the A side
  localparam int unsigned N_PM_C        = 10;  // PMs on the C side

  // Coarse (FPGA) TDC
  localparam int unsigned SAMPLES_PER_CLK = 8;  // 2.4 GS/s over a 300 MHz word
  localparam int unsigned CNT_W           = 4;  // free-running 300 MHz cycle counter
  localparam int unsigned STAMP_W         = 7;  // {counter, sample position}
  localparam int unsigned COARSE_W        = 6;  // bins inside one 25 ns period
  localparam int unsigned BINS_PER_BC     = 60; // 25 ns / 416.7 ps

  // Fine (external) TDC
  localparam int unsigned FINE_RAW_W      = 8;  // 8-bit mode
  localparam int unsigned FINE_W          = 7;  // bits kept by the shift register
  localparam int unsigned OVERLAP_W       = 2;  // bits shared by both TDCs

  // Channel time and charge
  localparam int unsigned TIME_W          = 12; // channel time, 13 ps LSB
  localparam int unsigned WINDOW_W        = 7;  // half width of the time window
  localparam int unsigned ADC_W           = 12; // charge ADC
  localparam int unsigned CHARGE_W        = 13; // CPLD data word: {adc_id, adc}

  // Pre-trigger sums
  localparam int unsigned NACT_W          = $clog2(PM_CHANNELS + 1);         // 4
  localparam int unsigned PM_AMP_W        = ADC_W + $clog2(PM_CHANNELS);     // 16
  localparam int unsigned PM_TIME_W       = TIME_W + $clog2(PM_CHANNELS);    // 16

  // Word a Processing Module sends to the TCM once per bunch crossing.
  typedef struct packed {
    logic                        valid;     // one frame per bunch crossing
    logic [PM_AMP_W-1:0]         amp_sum;   // sum of charges seen this bunch
    logic signed [PM_TIME_W-1:0] time_sum;  // sum of in-window channel times
    logic [NACT_W-1:0]           n_active;  // channels inside the time window
  } pretrig_t;

  // Trigger outputs of the TCM, sent to the Central Trigger Processor.
  typedef struct packed {
    logic ora;          // at least one in-window channel on side A
    logic orc;          // at least one in-window channel on side C
    logic tvx;          // vertex inside the selected interval
    logic central;      // charge sum above the central threshold
    logic semicentral;  // charge sum above the semi-central threshold
  } trig_t;

  localparam int unsigned N_TRIG = 5;

  // Slow-control settings of the TCM.
  typedef struct packed {
    logic signed [TIME_W:0]  vtx_low;     // lowest accepted avgA - avgC
    logic signed [TIME_W:0]  vtx_high;    // highest accepted avgA - avgC
    logic [31:0]             thr_central; // charge sum must exceed this
    logic [31:0]             thr_semicentral;
  } tcm_cfg_t;

endpackage
