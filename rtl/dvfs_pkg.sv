// dvfs_pkg: number formats shared by the queue-utilization DVFS controller.
//
// Frequencies are unsigned words in kHz (20 bits reach about 1 GHz).
// Feedback gains are signed fixed point with GAIN_FRAC fractional bits,
// in kHz per queue entry. Queue occupancies are unsigned entry counts.
// Voltages are unsigned words in mV. None of these formats is given by the
// design's source; they are chosen so that the 100 MHz / 32 MHz islands and
// the 100 us control interval of the reference configuration fit comfortably.
package dvfs_pkg;

  localparam int FREQ_W    = 20;  // kHz
  localparam int GAIN_W    = 24;  // signed, kHz per entry
  localparam int GAIN_FRAC = 8;   // fractional bits of a gain
  localparam int INTEG_W   = 24;  // signed integrator state, entry x intervals
  localparam int VOLT_W    = 12;  // mV

  typedef logic        [FREQ_W-1:0]  freq_t;
  typedef logic signed [GAIN_W-1:0]  gain_t;
  typedef logic signed [INTEG_W-1:0] integ_t;
  typedef logic        [VOLT_W-1:0]  volt_t;

  // Controller operating mode (regulation around nominal values, or tracking
  // with an integrator stage and independent frequency inputs).
  typedef enum logic {
    MODE_REGULATE = 1'b0,
    MODE_TRACK    = 1'b1
  } ctrl_mode_e;

endpackage
