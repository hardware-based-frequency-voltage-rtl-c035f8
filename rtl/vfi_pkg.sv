// vfi_pkg: types, constants and the frequency-level selection shared by the
// voltage/frequency island (VFI) control logic.
//
// Each island runs at one of NUM_LEVELS discrete (frequency, voltage) pairs.
// Levels are numbered in ascending frequency: level 0 is the slowest pair and
// level NUM_LEVELS-1 the fastest.  Two level tables are provided, the six
// pairs used for the software-radio experiment (SH3-class core, 23..60 MHz,
// 1.3..3.3 V) and the six pairs used for the MPEG-2 encoder experiment
// (ARM-class core, 54..133 MHz, 0.65..1.6 V).  The software-radio table is
// the default of every module.  Frequencies are in MHz, voltages in mV.
//
// pick_level() turns an ideal frequency, given as the fraction num/den MHz,
// into the slowest available level whose frequency is not below it: the
// "closest, largest" available frequency, so that rounding to a discrete
// level never costs throughput.  When no level is fast enough (or den is 0,
// an infinite requirement) the fastest level is returned.
package vfi_pkg;

  localparam int unsigned NUM_LEVELS = 6;
  localparam int unsigned LVL_W      = $clog2(NUM_LEVELS);

  typedef int unsigned level_table_t [NUM_LEVELS];

  // Software radio operating points, ascending.
  localparam level_table_t SDR_FREQ_MHZ  = '{23, 31, 38, 45, 52, 60};
  localparam level_table_t SDR_VOLT_MV   = '{1300, 1700, 2100, 2500, 2900, 3300};
  // MPEG-2 encoder operating points, ascending.
  localparam level_table_t MPEG_FREQ_MHZ = '{54, 70, 83, 100, 117, 133};
  localparam level_table_t MPEG_VOLT_MV  = '{650, 850, 1000, 1200, 1400, 1600};

  // Sampling window of the stall monitors, in cycles of the island clock.
  localparam int unsigned T_SAMPLE_DEFAULT = 5000;

  // Scaling state of one producer or consumer port of a FIFO link.
  typedef enum logic {
    PORT_FIXED   = 1'b0,   // port does not influence its island's speed
    PORT_DVFS_EN = 1'b1    // dvfs_en_prod / dvfs_en_cons
  } port_state_e;

  typedef logic [LVL_W-1:0] level_t;

  // Slowest level L with freq[L] * den >= num, else the fastest level.
  function automatic level_t pick_level(input level_table_t freq,
                                        input longint unsigned num,
                                        input longint unsigned den);
    level_t sel;
    logic   found;
    sel   = level_t'(NUM_LEVELS - 1);
    found = 1'b0;
    for (int l = 0; l < NUM_LEVELS; l++) begin
      if (!found && den != 0 &&
          64'(freq[l]) * den >= num) begin
        sel   = level_t'(l);
        found = 1'b1;
      end
    end
    return sel;
  endfunction

endpackage
