// llrf_pkg: types and constants shared by the direct-sampling LLRF loop.
//
// The loop runs in one clock domain, the ADC sample clock f_s = 8*f_RF/14
// (95.2 MHz for f_RF = 166.6 MHz). At that ratio every ADC sample advances
// the RF phase by 1.75 turns, i.e. 270 degrees, and the DAC, clocked at
// 8*f_RF, takes 14 samples per f_s clock. Those ratios follow from the
// clocking of the system; all word widths and number formats here are this
// design's own choices.
//
// Number formats:
//   I/Q samples     signed IQ_W bits, in units of ADC counts times two
//   phase           unsigned PH_W bits, 2**PH_W = one full turn
//   DAC drive       signed DAC_W bits
package llrf_pkg;

  localparam int ADC_W      = 16;  // 16-bit ADCs
  localparam int DAC_W      = 16;  // 16-bit DAC
  localparam int IQ_W       = 18;  // I/Q word inside the loop
  localparam int PH_W       = 16;  // phase word, 2**16 = 360 degrees
  localparam int DAC_LANES  = 14;  // DAC samples per f_s clock (f_DAC / f_s)
  localparam int DAC_PHASES = 8;   // DAC samples per RF period (f_DAC / f_RF)
  localparam int DEMOD_STEP_Q = 3; // RF phase step per ADC sample, quarter turns (270 deg)

  // CORDIC internal angle word: PH_W + 6 guard bits, 2**CORDIC_ZW = 360 degrees.
  localparam int CORDIC_ZW  = PH_W + 6;
  // 1/K for 16 or more CORDIC iterations, K = prod sqrt(1 + 2**(-2i)) = 1.64676,
  // as an unsigned Q1.17 fraction: round(2**17 / K).
  localparam logic [17:0] CORDIC_INV_K = 18'd79594;

  typedef logic [PH_W-1:0] phase_t;

  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  typedef struct packed {
    logic signed [DAC_W-1:0] i;
    logic signed [DAC_W-1:0] q;
  } drive_t;

  // Slow-control settings, written by the control processor.
  typedef struct packed {
    logic [IQ_W-2:0] sp_amp;       // amplitude set point, same units as I/Q
    phase_t          sp_phase;     // phase set point
    phase_t          rot_offset;   // pickup rotation (loop phase calibration)
    logic            ref_track_en; // subtract the measured reference phase
    logic            loop_closed;  // 1: PI feedback on, 0: feed-forward only
    logic [15:0]     kp;           // proportional gain, unsigned Q8.8
    logic [15:0]     ki;           // integral gain, unsigned, scale 2**-12
    drive_t          ff;           // feed-forward (open-loop) drive
  } llrf_ctrl_t;

  // Monitor outputs, updated at the filtered (decimated) rate.
  typedef struct packed {
    iq_t                    cav_iq;    // filtered, rotated pickup vector
    logic [IQ_W-1:0]        cav_amp;   // its amplitude
    phase_t                 cav_phase; // its phase
    logic signed [IQ_W:0]   err_amp;   // cav_amp - sp_amp
    phase_t                 err_phase; // cav_phase - sp_phase (wraps)
    logic [IQ_W-1:0]        ref_amp;   // measured reference amplitude
    phase_t                 ref_phase; // measured reference phase
    drive_t                 drive;     // drive sent to the modulator
    logic                   pi_sat;    // PI output clipped
    logic                   valid;     // amplitude/phase monitor updated
  } llrf_mon_t;

  // atan(2**-i) as a fraction of a full turn, scaled by 2**CORDIC_ZW:
  // round(atan(2**-i) / (2*pi) * 2**22), for i < 20.
  function automatic logic [CORDIC_ZW-1:0] cordic_atan(input int i);
    case (i)
      0:  return 22'd524288;
      1:  return 22'd309505;
      2:  return 22'd163534;
      3:  return 22'd83012;
      4:  return 22'd41667;
      5:  return 22'd20854;
      6:  return 22'd10430;
      7:  return 22'd5215;
      8:  return 22'd2608;
      9:  return 22'd1304;
      10: return 22'd652;
      11: return 22'd326;
      12: return 22'd163;
      13: return 22'd81;
      14: return 22'd41;
      15: return 22'd20;
      16: return 22'd10;
      17: return 22'd5;
      18: return 22'd3;
      19: return 22'd1;
      default: return '0;
    endcase
  endfunction

endpackage
