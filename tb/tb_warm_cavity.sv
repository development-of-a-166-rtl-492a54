// tb_warm_cavity: field-stability workload on llrf_top at its default sizes.
//
// Reproduces the warm-cavity bench test in simulation: a cavity of 80 kHz
// loaded bandwidth (behavioural, first order) is driven by the DAC lanes and
// read back through the pickup ADC with +-6 counts of uniform noise, and the
// loop regulates it at an amplitude set point of 0.8 of full scale. After
// loop-phase calibration in open loop and settling in closed loop, the
// amplitude and phase errors are recorded for 0.68 ms (64,736 clocks at
// 95.2 MHz, the short-term window of the bench measurement), both from the
// design's monitors and from the model's own field. Checks: peak-to-peak
// amplitude error within +-0.1 % and phase error within +-0.1 deg (the
// field-stability specification). The rms values are printed.
module tb_warm_cavity;
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
    adc_pickup <= adc_clip($rtoi($floor(vr * $cos(q) - vi * $sin(q) + 0.5)) + int'($urandom_range(12, 0)) - 6);
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


  // statistics over the measurement window
  bit  measuring = 0;
  int  n_meas = 0;
  real a_min = 1e9, a_max = -1e9, p_min = 1e9, p_max = -1e9, a_sq = 0.0, p_sq = 0.0;
  real ma_min = 1e9, ma_max = -1e9, mp_min = 1e9, mp_max = -1e9, mp_ref = 0.0;
  bit  have_ref = 0;

  always @(posedge clk) begin
    if (measuring && mon.valid) begin
      real ea, ep, ma, mp;
      ea = 100.0 * real'(mon.err_amp) / real'(SP_AMP);                 // percent
      ep = 360.0 * real'(ph_diff(mon.cav_phase, ctrl.sp_phase)) / 65536.0;  // degrees
      sample_model();
      ma = 100.0 * (model_amp - real'(SP_AMP)) / real'(SP_AMP);
      if (!have_ref) begin mp_ref = model_ph - ref_ph; have_ref = 1; end
      mp = wrap(model_ph - ref_ph - mp_ref) * 180.0 / PI;
      if (ea < a_min) a_min = ea;
      if (ea > a_max) a_max = ea;
      if (ep < p_min) p_min = ep;
      if (ep > p_max) p_max = ep;
      if (ma < ma_min) ma_min = ma;
      if (ma > ma_max) ma_max = ma;
      if (mp < mp_min) mp_min = mp;
      if (mp > mp_max) mp_max = mp;
      a_sq += ea * ea;
      p_sq += ep * ep;
      n_meas++;
    end
  end

  initial begin
    int loop_ph;
    ctrl = '0;
    ctrl.ref_track_en = 1'b1;
    ctrl.kp = 16'd256;
    ctrl.ki = 16'd64;
    ctrl.sp_amp = 17'(SP_AMP);
    ctrl.ff.i = 16'sd20000;
    pm_trigger = 0; pm_rearm = 0; pm_rd_addr = '0;
    wait_clk(5);
    rst_n = 1;
    wait_clk(8000);
    loop_ph = int'(mon.cav_phase);
    ctrl.rot_offset = phase_t'(-loop_ph);
    wait_clk(100);
    ctrl.loop_closed = 1'b1;
    wait_clk(40000);
    measuring = 1;
    wait_clk(64736);
    measuring = 0;
    $display("window: %0d monitor samples", n_meas);
    $display("monitor: amplitude error %f .. %f %% (rms %f %%), phase error %f .. %f deg (rms %f deg)",
             a_min, a_max, $sqrt(a_sq / n_meas), p_min, p_max, $sqrt(p_sq / n_meas));
    $display("cavity model: amplitude error %f .. %f %%, phase variation %f .. %f deg",
             ma_min, ma_max, mp_min, mp_max);
    check(n_meas >= 64736 / 8 - 2, "too few monitor samples in the window");
    check(a_min >= -0.1 && a_max <= 0.1, "monitored amplitude error outside +-0.1 %");
    check(p_min >= -0.1 && p_max <= 0.1, "monitored phase error outside +-0.1 deg");
    check(ma_min >= -0.1 && ma_max <= 0.1, "cavity amplitude error outside +-0.1 %");
    check(mp_max - mp_min <= 0.2, "cavity phase variation beyond 0.2 deg peak to peak");
    check(!mon.pi_sat, "drive saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
