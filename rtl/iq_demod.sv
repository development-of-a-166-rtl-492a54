// iq_demod: I/Q demodulation of a directly sampled (undersampled) RF signal.
//
// The ADC samples the 166.6 MHz RF at f_s = 8*f_RF/14, so consecutive
// samples are PH_STEP_Q quarter turns of RF phase apart (3, i.e. 270 deg).
// Writing the input as x[n] = I*cos(n*phi) - Q*sin(n*phi), a sample taken at
// quarter-turn index k = n*PH_STEP_Q mod 4 equals +I, -Q, -I, +Q for
// k = 0, 1, 2, 3. Each sample is stored in the slot of its index; every clock
// the last four samples give
//     I2 = s0 - s2,   Q2 = s3 - s1
// i.e. twice the I and Q of the window. Differences of opposite samples cancel
// any ADC offset. The output is not halved, so I/Q carry 2x ADC counts.
//
// Interface: one ADC sample per clock on `adc`. `iq_valid` rises once four
// samples have been taken after reset and stays high; the I/Q output lags the
// newest sample by two clocks. The phase reference (n = 0) is the first
// sample after reset.
//
// The demodulation itself and the sample-rate ratio follow the system
// description; the four-sample window, the 2x scale and the widths are this
// design's choices.
module iq_demod #(
  parameter int          ADC_W     = 16,
  parameter int          IQ_W      = 18,
  parameter int unsigned PH_STEP_Q = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [ADC_W-1:0] adc,
  output logic signed [IQ_W-1:0]  i_out,
  output logic signed [IQ_W-1:0]  q_out,
  output logic                    iq_valid
);

  logic signed [ADC_W-1:0] slot [4];
  logic [1:0]              k;      // quarter-turn index of the incoming sample
  logic [2:0]              fill;   // samples taken, saturates at 4
  logic signed [ADC_W:0]   i2, q2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) slot[s] <= '0;
      k    <= '0;
      fill <= '0;
    end else begin
      slot[k] <= adc;
      k       <= k + 2'(PH_STEP_Q);
      if (fill != 3'd4) fill <= fill + 3'd1;
    end
  end

  always_comb begin
    i2 = (ADC_W+1)'(slot[0]) - (ADC_W+1)'(slot[2]);
    q2 = (ADC_W+1)'(slot[3]) - (ADC_W+1)'(slot[1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out    <= '0;
      q_out    <= '0;
      iq_valid <= 1'b0;
    end else begin
      i_out    <= IQ_W'(i2);
      q_out    <= IQ_W'(q2);
      iq_valid <= (fill == 3'd4);
    end
  end

endmodule
