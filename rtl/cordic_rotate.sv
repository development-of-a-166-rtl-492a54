// cordic_rotate: rotates an I/Q vector by an angle (pipelined CORDIC).
//
// Used twice in the loop: to rotate the pickup vector into the reference
// frame (calibration offset minus measured reference phase) and to turn the
// amplitude/phase set point into an I/Q set point (input vector (amp, 0)).
//
// How it works: the angle (2**PH_W = one turn) is widened by six guard bits
// and the vector gets six fractional guard bits and two integer bits.
// If it lies between 90 and 270 degrees, the vector is negated and the angle
// reduced by 180 degrees, leaving a residual within +-90 degrees. ITER
// shift-and-add micro-rotations by +-atan(2**-i) then drive the residual
// angle to zero. A final multiply by 1/K (K = 1.64676) removes the CORDIC
// gain and the result is saturated to W bits.
//
// Interface: a new vector and angle may be given every clock (in_valid).
// Latency ITER + 2 clocks (ITER up to 20, the length of the angle table);
// out_valid follows in_valid with that delay.
// Convention: (x, y) = (I, Q); a positive angle turns I towards Q.
//
// The rotation of the pickup vector is part of the described loop; doing it
// with a CORDIC, the word widths and the iteration count are this design's
// choices.
module cordic_rotate
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
  input  phase_t              angle,
  output logic                out_valid,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  localparam int GB = 6;              // fractional guard bits
  localparam int XW = W + 2 + GB;     // room for the CORDIC gain and negation
  localparam int ZW = CORDIC_ZW;

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [ITER+1:0]      vld;

  // Stage 0: quadrant folding.
  always_ff @(posedge clk) begin
    logic [ZW-1:0] z;
    z = {angle, (ZW-PH_W)'(0)};
    if (z[ZW-1] != z[ZW-2]) begin    // 90..270 degrees
      xs[0] <= -(XW'(x_in) <<< GB);
      ys[0] <= -(XW'(y_in) <<< GB);
      zs[0] <= signed'({~z[ZW-1], z[ZW-2:0]});
    end else begin
      xs[0] <= (XW'(x_in) <<< GB);
      ys[0] <= (XW'(y_in) <<< GB);
      zs[0] <= signed'(z);
    end
  end

  // Stages 1..ITER: micro-rotations.
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN = signed'(cordic_atan(i));
    always_ff @(posedge clk) begin
      if (!zs[i][ZW-1]) begin
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

  // Gain correction and saturation.
  function automatic logic signed [W-1:0] scale_sat(input logic signed [XW-1:0] v);
    logic signed [XW+19:0] p;
    logic signed [XW+2:0]  r;
    p = (XW+20)'(v) * (XW+20)'(signed'({1'b0, CORDIC_INV_K}));
    r = (XW+3)'((p + ((XW+20)'(1) <<< (16 + GB))) >>> (17 + GB));
    if (r > (XW+3)'((1 <<< (W-1)) - 1))   return W'((1 <<< (W-1)) - 1);
    if (r < -(XW+3)'((1 <<< (W-1)) - 1))  return -W'((1 <<< (W-1)) - 1);
    return W'(r);
  endfunction

  always_ff @(posedge clk) begin
    x_out <= scale_sat(xs[ITER]);
    y_out <= scale_sat(ys[ITER]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ITER:0], in_valid};
  end
  assign out_valid = vld[ITER+1];

endmodule
