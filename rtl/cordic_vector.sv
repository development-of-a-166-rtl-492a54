// cordic_vector: amplitude and phase of an I/Q vector (pipelined CORDIC).
//
// Measures the phase of the RF reference channel, which the loop uses to
// rotate the pickup into the reference frame, and the amplitude and phase of
// the filtered cavity vector for the field-error monitors.
//
// How it works: the vector gets six fractional guard bits and two integer
// bits. A vector in the left half plane is negated and its angle
// preset to 180 degrees. ITER micro-rotations by -+atan(2**-i) then turn the
// vector onto the positive I axis while accumulating the angle. The remaining
// I component times 1/K (K = 1.64676) is the amplitude.
//
// Interface: one vector per clock may enter (in_valid). Latency ITER + 2
// clocks. `amp` is unsigned, W bits (a full-scale diagonal vector still
// fits); `phase` is PH_W bits, 2**PH_W = one turn, rounded.
//
// Where the amplitude and phase are computed is not described in the system
// description; a CORDIC in the loop FPGA, its widths and iteration count are
// this design's choices.
module cordic_vector
  import llrf_pkg::*;
#(
  parameter int W    = 18,
  parameter int ITER = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                out_valid,
  output logic [W-1:0]        amp,
  output phase_t              phase
);

  localparam int GB = 6;              // fractional guard bits
  localparam int XW = W + 2 + GB;     // room for the CORDIC gain and negation
  localparam int ZW = CORDIC_ZW;

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [ITER+1:0]      vld;

  always_ff @(posedge clk) begin
    if (x_in < 0) begin
      xs[0] <= -(XW'(x_in) <<< GB);
      ys[0] <= -(XW'(y_in) <<< GB);
      zs[0] <= signed'(ZW'(1) <<< (ZW-1));   // 180 degrees
    end else begin
      xs[0] <= (XW'(x_in) <<< GB);
      ys[0] <= (XW'(y_in) <<< GB);
      zs[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN = signed'(cordic_atan(i));
    always_ff @(posedge clk) begin
      if (ys[i][XW-1]) begin           // below the axis: turn up
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN;
      end
    end
  end

  always_ff @(posedge clk) begin
    logic [XW+17:0] p;
    logic [XW-1:0]  a;
    p  = (XW+18)'(unsigned'(xs[ITER])) * (XW+18)'(CORDIC_INV_K);
    a  = XW'((p + ((XW+18)'(1) << (16 + GB))) >> (17 + GB));
    amp <= (a >= XW'(1 << W)) ? '1 : W'(a);
    phase <= PH_W'((unsigned'(zs[ITER]) + ZW'(1 << (ZW - PH_W - 1))) >> (ZW - PH_W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ITER:0], in_valid};
  end
  assign out_valid = vld[ITER+1];

endmodule
