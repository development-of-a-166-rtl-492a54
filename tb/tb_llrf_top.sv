// tb_llrf_top: end-to-end closed-loop test of llrf_top at its default sizes.
//
// A behavioural cavity closes the loop around the design. Each clock it
// demodulates the first eight DAC lanes (one RF period) into a baseband drive
// D, using the test's own time base, and advances a first-order cavity
//     V += a * (G * exp(j*phi_c) * D - V),  a = 2*pi*40 kHz / 95.2 MHz
// (an 80 kHz loaded bandwidth, as for the warm test cavity). From V it
// produces the next pickup ADC sample Re(V * exp(j*n*270deg)) plus +-3
// counts of noise, clipped to the 16-bit range, and a reference sample of fixed amplitude and phase.
//
// A fixed tone on ADC channel 3 checks that the other channels are
// demodulated as well.
//
// Sequence and checks (all amplitudes in the design's 2x ADC units):
//  1. open loop, feed-forward drive: the measured amplitude equals 2*|V|
//     of the model within 0.1 %; its phase gives the loop phase, which is
//     written to the rotation offset (loop-phase calibration);
//  2. loop closed with set point 0.8 of full scale: amplitude within
//     +-0.1 % and phase within +-0.1 deg of the set point, in the monitors
//     and in the model's own field;
//  3. set-point phase step of 30 deg: the model's field turns by 30 deg;
//  4. reference phase step of 20 deg with reference tracking: the field
//     follows the reference by 20 deg;
//  5. set point beyond the drive range: the PI output saturates; back at
//     0.8 the loop regulates again (anti-windup);
//  6. post-mortem trigger: the buffer freezes, and its newest words hold
//     the regulated field and a drive of the expected size.
// Each mechanism (open/closed switch, calibration, phase step, reference
// step, saturation, logger freeze) is counted and must occur.
module tb_llrf_top;
  import llrf_pkg::*;

  localparam real PI     = 3.14159265358979;
  localparam real ALPHA  = 2.0 * PI * 40.0e3 / 95.2e6;
  localparam real GAIN   = 0.9;                 // DAC count -> ADC count
  localparam real PHI_C  = 30.0 * PI / 180.0;   // drive-to-pickup phase
  localparam real REF_A  = 20000.0;
  localparam real AUX_A  = 10000.0;              // tone on an unused channel
  localparam real AUX_PH = -70.0 * PI / 180.0;
  localparam int  PH_DEG = 65536 / 360;         // ~182 counts per degree
  localparam int  SP_AMP = 52427;               // 0.8 of 2*32767

  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_pickup, adc_ref, adc_aux;
  logic [9:0][ADC_W-1:0] adc;
  iq_t  [9:0] chan_iq;

  // pickup on ADC1, reference on ADC8, a fixed tone on channel 3, others idle
  always_comb begin
    adc    = '0;
    adc[0] = adc_pickup;
    adc[7] = adc_ref;
    adc[3] = adc_aux;
  end
  llrf_ctrl_t ctrl;
  logic [DAC_LANES-1:0][DAC_W-1:0] dac_lanes;
  logic [2:0] dac_lane0_phase;
  llrf_mon_t mon;
  logic pm_trigger, pm_rearm, pm_frozen;
  logic [11:0] pm_rd_addr;
  logic [2*IQ_W+2*DAC_W-1:0] pm_rd_data;
  int checks = 0, failures = 0;
  int n_switch = 0, n_cal = 0, n_phstep = 0, n_refstep = 0, n_sat = 0, n_freeze = 0;

  llrf_top dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // wrap an angle difference in radians to (-pi, pi]
  function automatic real wrap(real a);
    while (a > PI)   a -= 2.0 * PI;
    while (a <= -PI) a += 2.0 * PI;
    return a;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural cavity and ADCs ----------------
  function automatic logic signed [15:0] adc_clip(int v);
    if (v > 32767)  return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  real    vr = 0.0, vi = 0.0;        // cavity field, ADC counts
  real    ref_ph = 50.0 * PI / 180.0;
  longint n = 0;

  always @(posedge clk) begin
    real di, dq, a, y, tr, ti, q;
    if (!rst_n) n = 0;
    else        n = n + 1;
    di = 0.0; dq = 0.0;
    for (int l = 0; l < 8; l++) begin
      a  = real'((6 * n + longint'(l)) % 8) * PI / 4.0;
      y  = real'($signed(dac_lanes[l]));
      di += y * $cos(a);
      dq -= y * $sin(a);
    end
    di = di / 4.0; dq = dq / 4.0;
    tr = GAIN * (di * $cos(PHI_C) - dq * $sin(PHI_C));
    ti = GAIN * (di * $sin(PHI_C) + dq * $cos(PHI_C));
    vr = vr + ALPHA * (tr - vr);
    vi = vi + ALPHA * (ti - vi);
    q  = real'((3 * n) % 4) * PI / 2.0;
    adc_pickup <= adc_clip($rtoi($floor(vr * $cos(q) - vi * $sin(q) + 0.5)) + int'($urandom_range(6, 0)) - 3);
    adc_ref    <= 16'($rtoi($floor(REF_A * $cos(q + ref_ph) + 0.5)));
    adc_aux    <= 16'($rtoi($floor(AUX_A * $cos(q + AUX_PH) + 0.5)));
  end

  // ---------------- helpers ----------------
  task automatic wait_clk(int c);
    repeat (c) @(posedge clk);
    #1;
  endtask

  real model_amp, model_ph;
  task automatic sample_model();
    model_amp = 2.0 * $sqrt(vr * vr + vi * vi);
    model_ph  = $atan2(vi, vr);
  endtask

  function automatic int ph_diff(phase_t a, phase_t b);
    return int'($signed(16'(a - b)));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // regulation within the +-0.1 % / +-0.1 deg field-stability specification
  task automatic check_regulated(string what);
    sample_model();
    check(rabs(real'(mon.err_amp)) <= 0.001 * SP_AMP,
          $sformatf("%s: amplitude error %0d", what, mon.err_amp));
    check(rabs(real'(ph_diff(mon.cav_phase, ctrl.sp_phase))) <= 0.1 * PH_DEG,
          $sformatf("%s: phase error %0d counts", what, ph_diff(mon.cav_phase, ctrl.sp_phase)));
    check(rabs(model_amp - SP_AMP) <= 0.001 * SP_AMP,
          $sformatf("%s: cavity amplitude %f", what, model_amp));
  endtask

  always @(posedge clk) if (mon.pi_sat) n_sat++;

  initial begin
    real ph0, ph1, ph2, pm_amp, dr_amp;
    int  loop_ph;
    ctrl = '0;
    ctrl.ref_track_en = 1'b1;
    ctrl.kp = 16'd256;
    ctrl.ki = 16'd64;
    ctrl.sp_amp = 17'(SP_AMP);
    ctrl.ff.i = 16'sd20000;
    pm_trigger = 0; pm_rearm = 0; pm_rd_addr = '0;
    wait_clk(5);
    rst_n = 1;

    // 1. open loop and loop-phase calibration
    wait_clk(8000);
    sample_model();
    check(rabs(real'(mon.cav_amp) - model_amp) <= 0.001 * model_amp,
          $sformatf("open loop: measured %0d model %f", mon.cav_amp, model_amp));
    check(rabs(model_amp - 2.0 * GAIN * 20000.0) <= 0.002 * model_amp,
          $sformatf("open loop: model amplitude %f", model_amp));
    check(mon.ref_amp > 39900 && mon.ref_amp < 40100,
          $sformatf("reference amplitude %0d", mon.ref_amp));
    // an auxiliary channel is demodulated too: 2*A*(cos, sin) of its tone
    check(rabs(real'(chan_iq[3].i) - 2.0 * AUX_A * $cos(AUX_PH)) <= 3.0 &&
          rabs(real'(chan_iq[3].q) - 2.0 * AUX_A * $sin(AUX_PH)) <= 3.0,
          $sformatf("auxiliary channel I/Q %0d %0d", chan_iq[3].i, chan_iq[3].q));
    loop_ph = int'(mon.cav_phase);
    ctrl.rot_offset = phase_t'(-loop_ph);
    n_cal++;
    wait_clk(100);
    check(rabs(real'(ph_diff(mon.cav_phase, 16'd0))) <= 0.1 * PH_DEG,
          $sformatf("calibrated phase %0d", mon.cav_phase));

    // 2. close the loop
    ctrl.loop_closed = 1'b1;
    n_switch++;
    wait_clk(30000);
    check_regulated("closed loop");
    ph0 = model_ph;

    // 3. set-point phase step
    ctrl.sp_phase = phase_t'(30 * 65536 / 360);
    n_phstep++;
    wait_clk(30000);
    check_regulated("phase step");
    ph1 = model_ph;
    check(rabs(wrap(ph1 - ph0) - 30.0 * PI / 180.0) <= 0.1 * PI / 180.0,
          $sformatf("phase step moved the field by %f deg", wrap(ph1 - ph0) * 180.0 / PI));

    // 4. reference phase step: the field follows the reference
    ref_ph = ref_ph + 20.0 * PI / 180.0;
    n_refstep++;
    wait_clk(30000);
    check_regulated("reference step");
    ph2 = model_ph;
    check(rabs(wrap(ph2 - ph1) - 20.0 * PI / 180.0) <= 0.1 * PI / 180.0,
          $sformatf("reference step moved the field by %f deg", wrap(ph2 - ph1) * 180.0 / PI));

    // 5. saturation and recovery
    ctrl.sp_amp = 17'd80000;
    wait_clk(20000);
    check(n_sat > 0, "PI output never saturated");
    check(mon.pi_sat, "PI output not saturated with unreachable set point");
    ctrl.sp_amp = 17'(SP_AMP);
    wait_clk(30000);
    check(!mon.pi_sat, "PI output still saturated");
    check_regulated("after saturation");

    // 6. post-mortem freeze and read-back
    check(!pm_frozen, "logger frozen before trigger");
    pm_trigger = 1; wait_clk(1); pm_trigger = 0;
    wait_clk(1024 * 8 + 100);
    check(pm_frozen, "logger not frozen");
    if (pm_frozen) n_freeze++;
    for (int a = 4095; a > 4095 - 64; a--) begin
      logic signed [IQ_W-1:0]  ci, cq;
      logic signed [DAC_W-1:0] di, dq;
      pm_rd_addr = 12'(a);
      wait_clk(2);
      {ci, cq, di, dq} = pm_rd_data;
      pm_amp = $sqrt(real'(ci) * real'(ci) + real'(cq) * real'(cq));
      dr_amp = $sqrt(real'(di) * real'(di) + real'(dq) * real'(dq));
      check(rabs(pm_amp - SP_AMP) <= 0.002 * SP_AMP,
            $sformatf("logged field amplitude %f at %0d", pm_amp, a));
      check(rabs(dr_amp - SP_AMP / (2.0 * GAIN)) <= 0.01 * SP_AMP,
            $sformatf("logged drive amplitude %f at %0d", dr_amp, a));
    end
    pm_rearm = 1; wait_clk(1); pm_rearm = 0;
    wait_clk(2);
    check(!pm_frozen, "logger not re-armed");

    $display("mechanisms: loop switch %0d, calibration %0d, phase step %0d, reference step %0d, saturated clocks %0d, logger freeze %0d",
             n_switch, n_cal, n_phstep, n_refstep, n_sat, n_freeze);
    check(n_switch > 0 && n_cal > 0 && n_phstep > 0 && n_refstep > 0 && n_sat > 0 && n_freeze > 0,
          "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
