// dac_modulator: direct digital modulation of the I/Q drive onto the RF.
//
// The DAC generates the 166.6 MHz drive directly. It is clocked at 8*f_RF,
// so one RF period holds 8 DAC samples 45 degrees apart, and one f_s clock
// (f_s = 8*f_RF/14) carries LANES = 14 samples. DAC sample m is
//     y[m] = I*cos(m*45deg) - Q*sin(m*45deg)
// which, with cos/sin in {0, +-1, +-c}, c = cos 45deg, needs only the two
// products I*c and Q*c per clock:
//     phase 0..7:  I, c(I-Q), -Q, -c(I+Q), -I, c(Q-I), Q, c(I+Q)
// The phase of lane 0 advances by LANES mod 8 = 6 per clock. Sums are
// saturated to DAC_W bits, so drive vectors longer than full scale along a
// diagonal are clipped.
//
// Interface: drive I/Q (signed DAC_W bits) in every clock; `lanes[l]` is
// the l-th sample of the clock in time order, `lane0_phase` the phase index
// (0..7, units of 45 deg) of lane 0. Latency two clocks. The phase
// reference is the first output word after reset (lane0_phase = 0).
//
// Generating the RF directly in the DAC follows the system description;
// the DAC rate of 8*f_RF, the lane layout and the phase convention are this
// design's choices.
module dac_modulator #(
  parameter int LANES = 14,
  parameter int DAC_W = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic signed [DAC_W-1:0]             drive_i,
  input  logic signed [DAC_W-1:0]             drive_q,
  output logic [LANES-1:0][DAC_W-1:0]         lanes,
  output logic [2:0]                          lane0_phase
);

  // cos(45 deg) in Q1.15: round(2**15 / sqrt(2)).
  localparam logic signed [16:0] C45 = 17'sd23170;
  localparam logic [2:0] ADV = 3'(LANES % 8);
  localparam int SW = DAC_W + 2;
  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (DAC_W-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -MAXV;

  logic signed [SW-1:0] i1, q1, ic1, qc1;
  logic [2:0]           ph, ph1;

  // Stage 1: products with cos 45deg.
  always_ff @(posedge clk) begin
    logic signed [DAC_W+17:0] pi_, pq_;
    if (!rst_n) begin
      ph  <= '0;
      ph1 <= '0;
      i1  <= '0;
      q1  <= '0;
      ic1 <= '0;
      qc1 <= '0;
    end else begin
      pi_ = (DAC_W+18)'(drive_i) * (DAC_W+18)'(C45);
      pq_ = (DAC_W+18)'(drive_q) * (DAC_W+18)'(C45);
      ic1 <= SW'((pi_ + (DAC_W+18)'(1 <<< 14)) >>> 15);
      qc1 <= SW'((pq_ + (DAC_W+18)'(1 <<< 14)) >>> 15);
      i1  <= SW'(drive_i);
      q1  <= SW'(drive_q);
      ph1 <= ph;
      ph  <= ph + ADV;
    end
  end

  function automatic logic [DAC_W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > MAXV) return DAC_W'(MAXV);
    if (v < MINV) return DAC_W'(MINV);
    return DAC_W'(v);
  endfunction

  // Stage 2: pick the sample of each lane.
  always_ff @(posedge clk) begin
    logic [2:0]           p;
    logic signed [SW-1:0] y;
    if (!rst_n) begin
      lanes       <= '0;
      lane0_phase <= '0;
    end else begin
      lane0_phase <= ph1;
      for (int l = 0; l < LANES; l++) begin
        p = ph1 + 3'(l);
        case (p)
          3'd0:    y = i1;
          3'd1:    y = ic1 - qc1;
          3'd2:    y = -q1;
          3'd3:    y = -ic1 - qc1;
          3'd4:    y = -i1;
          3'd5:    y = qc1 - ic1;
          3'd6:    y = q1;
          default: y = ic1 + qc1;
        endcase
        lanes[l] <= sat(y);
      end
    end
  end

endmodule
