// llrf_top: FPGA signal processing of the direct-sampling LLRF feedback loop.
//
// All ADC_CH = 10 ADC channels are sampled directly at f_s = 8*f_RF/14,
// without down-conversion, and demodulated to I/Q (chan_iq). The cavity
// pickup (channel PICKUP_CH, ADC1) and the RF reference (REF_CH, ADC8) feed
// the loop. In signal order:
//
//   pickup ADC -> iq_demod -> cordic_rotate (angle = rot_offset - ref phase)
//              -> cic_filter (I and Q) -> error = set point - pickup
//              -> pi_controller (I and Q) -> dac_modulator -> 14 DAC lanes
//   ref ADC    -> iq_demod -> cordic_vector -> reference phase (and monitor)
//   set point (amplitude, phase) -> cordic_rotate -> I/Q set point
//   filtered pickup -> cordic_vector -> amplitude/phase and their errors
//   filtered pickup + drive -> pm_logger (post-mortem buffer)
//
// Reference tracking (ctrl.ref_track_en) subtracts the measured reference
// phase from the pickup rotation, so the loop holds the cavity phase
// relative to the RF reference; rot_offset calibrates the loop phase. With
// ctrl.loop_closed = 0 the DAC is driven by the feed-forward value alone.
//
// Interface: everything runs on `clk` = the ADC sample clock, one sample per
// channel per clock. The DAC receives DAC_LANES samples per clock at
// 8*f_RF, lane 0 first; dac_lane0_phase gives lane 0's RF phase in 45 degree
// steps. Control settings are static inputs (set by the slow-control
// processor). Monitors in `mon` update at f_s/CIC_R, marked by mon.valid.
// Reset is synchronous, active low.
//
// The chain order, the direct sampling at 8*f_RF/14, the CIC low-pass and the
// I/Q PI control follow the system description. The use of the reference
// channel, the CORDIC set-point conversion and monitors, the feed-forward
// mode, all widths and the filter and logger sizes are this design's choices.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int ADC_CH    = 10,  // five 2-channel ADCs
  parameter int PICKUP_CH = 0,   // ADC1
  parameter int REF_CH    = 7,   // ADC8
  parameter int CIC_N    = 3,
  parameter int CIC_R    = 8,
  parameter int PM_DEPTH = 4096,
  parameter int PM_POST  = 1024
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [ADC_CH-1:0][ADC_W-1:0]   adc,
  output iq_t  [ADC_CH-1:0]               chan_iq,
  input  llrf_ctrl_t                      ctrl,
  output logic [DAC_LANES-1:0][DAC_W-1:0] dac_lanes,
  output logic [2:0]                      dac_lane0_phase,
  output llrf_mon_t                       mon,
  input  logic                            pm_trigger,
  input  logic                            pm_rearm,
  input  logic [$clog2(PM_DEPTH)-1:0]     pm_rd_addr,
  output logic [2*IQ_W+2*DAC_W-1:0]       pm_rd_data,
  output logic                            pm_frozen
);

  localparam logic signed [IQ_W-1:0] IQ_MAX = IQ_W'((1 <<< (IQ_W-1)) - 1);

  // ---------------- demodulation ----------------
  // Every ADC channel is demodulated; the pickup and the reference feed the
  // loop, the I/Q of all channels are brought out for monitoring.
  iq_t  [ADC_CH-1:0] ch_iq;
  logic [ADC_CH-1:0] ch_v;
  iq_t  pu_iq, rf_iq;
  logic pu_v, rf_v;

  for (genvar c = 0; c < ADC_CH; c++) begin : g_demod
    iq_demod #(.ADC_W(ADC_W), .IQ_W(IQ_W), .PH_STEP_Q(DEMOD_STEP_Q)) u_dem (
      .clk, .rst_n, .adc(signed'(adc[c])), .i_out(ch_iq[c].i), .q_out(ch_iq[c].q),
      .iq_valid(ch_v[c]));
  end

  assign chan_iq = ch_iq;
  assign pu_iq   = ch_iq[PICKUP_CH];
  assign pu_v    = ch_v[PICKUP_CH];
  assign rf_iq   = ch_iq[REF_CH];
  assign rf_v    = ch_v[REF_CH];

  // ---------------- reference phase ----------------
  logic            refm_v;
  logic [IQ_W-1:0] ref_amp;
  phase_t          ref_phase;

  cordic_vector #(.W(IQ_W)) u_ref_meas (
    .clk, .rst_n, .in_valid(rf_v), .x_in(rf_iq.i), .y_in(rf_iq.q),
    .out_valid(refm_v), .amp(ref_amp), .phase(ref_phase));

  phase_t rot_angle;
  always_ff @(posedge clk) begin
    if (!rst_n)                            rot_angle <= '0;
    else if (ctrl.ref_track_en && refm_v)  rot_angle <= ctrl.rot_offset - ref_phase;
    else if (!ctrl.ref_track_en)           rot_angle <= ctrl.rot_offset;
  end

  // ---------------- pickup rotation ----------------
  iq_t  rot_iq;
  logic rot_v;

  cordic_rotate #(.W(IQ_W)) u_rot (
    .clk, .rst_n, .in_valid(pu_v), .x_in(pu_iq.i), .y_in(pu_iq.q), .angle(rot_angle),
    .out_valid(rot_v), .x_out(rot_iq.i), .y_out(rot_iq.q));

  // ---------------- CIC low pass ----------------
  iq_t  cav_iq;
  logic cav_v, cav_vq;

  cic_filter #(.W(IQ_W), .N(CIC_N), .R(CIC_R)) u_cic_i (
    .clk, .rst_n, .in_valid(rot_v), .din(rot_iq.i), .out_valid(cav_v), .dout(cav_iq.i));
  cic_filter #(.W(IQ_W), .N(CIC_N), .R(CIC_R)) u_cic_q (
    .clk, .rst_n, .in_valid(rot_v), .din(rot_iq.q), .out_valid(cav_vq), .dout(cav_iq.q));

  // ---------------- set point ----------------
  iq_t  sp_iq;
  logic sp_v;

  cordic_rotate #(.W(IQ_W)) u_sp (
    .clk, .rst_n, .in_valid(1'b1), .x_in(signed'({1'b0, ctrl.sp_amp})), .y_in('0),
    .angle(ctrl.sp_phase), .out_valid(sp_v), .x_out(sp_iq.i), .y_out(sp_iq.q));

  // ---------------- error ----------------
  function automatic logic signed [IQ_W-1:0] sat_iq(input logic signed [IQ_W:0] v);
    if (v > (IQ_W+1)'(IQ_MAX))  return IQ_MAX;
    if (v < -(IQ_W+1)'(IQ_MAX)) return -IQ_MAX;
    return IQ_W'(v);
  endfunction

  iq_t  err_iq;
  logic err_v;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_iq <= '0;
      err_v  <= 1'b0;
    end else begin
      err_v <= cav_v && cav_vq && sp_v;
      if (cav_v) begin
        err_iq.i <= sat_iq((IQ_W+1)'(sp_iq.i) - (IQ_W+1)'(cav_iq.i));
        err_iq.q <= sat_iq((IQ_W+1)'(sp_iq.q) - (IQ_W+1)'(cav_iq.q));
      end
    end
  end

  // ---------------- PI controller ----------------
  drive_t drive;
  logic   drive_v, pi_sat;

  pi_controller #(.W(IQ_W), .OUT_W(DAC_W)) u_pi (
    .clk, .rst_n, .in_valid(err_v), .err_i(err_iq.i), .err_q(err_iq.q),
    .kp(ctrl.kp), .ki(ctrl.ki), .loop_closed(ctrl.loop_closed),
    .ff_i(ctrl.ff.i), .ff_q(ctrl.ff.q),
    .drive_i(drive.i), .drive_q(drive.q), .drive_valid(drive_v), .sat(pi_sat));

  // ---------------- direct digital modulation ----------------
  dac_modulator #(.LANES(DAC_LANES), .DAC_W(DAC_W)) u_dac (
    .clk, .rst_n, .drive_i(drive.i), .drive_q(drive.q),
    .lanes(dac_lanes), .lane0_phase(dac_lane0_phase));

  // ---------------- amplitude / phase monitor ----------------
  logic            mon_v;
  logic [IQ_W-1:0] cav_amp;
  phase_t          cav_phase;

  cordic_vector #(.W(IQ_W)) u_mon (
    .clk, .rst_n, .in_valid(cav_v), .x_in(cav_iq.i), .y_in(cav_iq.q),
    .out_valid(mon_v), .amp(cav_amp), .phase(cav_phase));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mon <= '0;
    end else begin
      mon.valid  <= mon_v;
      mon.drive  <= drive;
      mon.pi_sat <= pi_sat;
      if (refm_v) begin
        mon.ref_amp   <= ref_amp;
        mon.ref_phase <= ref_phase;
      end
      if (cav_v) mon.cav_iq <= cav_iq;
      if (mon_v) begin
        mon.cav_amp   <= cav_amp;
        mon.cav_phase <= cav_phase;
        mon.err_amp   <= (IQ_W+1)'(cav_amp) - (IQ_W+1)'(ctrl.sp_amp);
        mon.err_phase <= cav_phase - ctrl.sp_phase;
      end
    end
  end

  // ---------------- post-mortem logger ----------------
  pm_logger #(.DEPTH(PM_DEPTH), .DW(2*IQ_W+2*DAC_W), .POST(PM_POST)) u_pm (
    .clk, .rst_n, .wr_valid(drive_v), .wr_data({cav_iq, drive}),
    .trigger(pm_trigger), .rearm(pm_rearm), .rd_addr(pm_rd_addr),
    .rd_data(pm_rd_data), .frozen(pm_frozen));

endmodule
