// pi_controller: proportional-integral feedback for the I and Q components.
//
// The error between the I/Q set point and the filtered pickup drives two
// identical PI controllers, one for I and one for Q. Their outputs are the
// I/Q drive of the direct digital modulator.
//
// How it works (per component, on each in_valid):
//   stage 1:  p = err*kp / 2**KP_SHIFT,  d = err*ki
//   stage 2:  acc = clamp(acc + d)              (closed loop)
//             drive = clamp(ff + p + acc / 2**KI_SHIFT)
// The integrator keeps KI_SHIFT fractional bits, so small errors still
// integrate (no dead band and no truncation bias). It is clamped to the
// output range (anti-windup), and `sat`
// is set while either output component is clipped. With loop_closed = 0
// the integrator is held at zero and the drive is the feed-forward value
// ff, which is the open-loop mode used to start up a cavity.
//
// Interface: err is signed W bits; kp and ki are unsigned 16-bit gains
// (kp in Q8.8 with the default KP_SHIFT = 8); the drive is OUT_W bits.
// drive_valid follows in_valid by two clocks.
//
// Separate PI control of I and Q follows the system description; the gain
// formats, the saturation, the anti-windup and the open-loop mode are this
// design's choices.
module pi_controller #(
  parameter int W        = 18,
  parameter int OUT_W    = 16,
  parameter int KP_SHIFT = 8,
  parameter int KI_SHIFT = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     err_i,
  input  logic signed [W-1:0]     err_q,
  input  logic [15:0]             kp,
  input  logic [15:0]             ki,
  input  logic                    loop_closed,
  input  logic signed [OUT_W-1:0] ff_i,
  input  logic signed [OUT_W-1:0] ff_q,
  output logic signed [OUT_W-1:0] drive_i,
  output logic signed [OUT_W-1:0] drive_q,
  output logic                    drive_valid,
  output logic                    sat
);

  localparam int PW = W + 17;                      // product width
  localparam int AW = OUT_W + 2;                   // accumulator/sum width
  localparam logic signed [AW-1:0] MAXV = AW'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [AW-1:0] MINV = -MAXV;
  localparam int IW = AW + KI_SHIFT;               // integrator width
  localparam logic signed [IW-1:0] IMAX = IW'(MAXV) <<< KI_SHIFT;
  localparam logic signed [IW-1:0] IMIN = -IMAX;

  function automatic logic signed [AW-1:0] clamp_p(input logic signed [PW-1:0] v);
    if (v > PW'(MAXV)) return MAXV;
    if (v < PW'(MINV)) return MINV;
    return AW'(v);
  endfunction

  logic signed [W-1:0]  err [2];
  logic signed [OUT_W-1:0] ff [2];
  logic signed [AW-1:0] p [2];
  logic signed [IW-1:0] d [2];
  logic signed [IW-1:0] acc [2];
  logic signed [OUT_W-1:0] drv [2];
  logic [1:0]           clip;
  logic                 v1;

  assign err[0] = err_i;
  assign err[1] = err_q;
  assign ff[0]  = ff_i;
  assign ff[1]  = ff_q;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    always_ff @(posedge clk) begin
      logic signed [PW-1:0] prod;
      logic signed [IW+1:0] a;
      logic signed [AW+1:0] s;
      if (!rst_n) begin
        p[c]    <= '0;
        d[c]    <= '0;
        acc[c]  <= '0;
        drv[c]  <= '0;
        clip[c] <= 1'b0;
      end else begin
        if (in_valid) begin
          prod = PW'(err[c]) * PW'(signed'({1'b0, kp}));
          p[c] <= clamp_p(prod >>> KP_SHIFT);
          prod = PW'(err[c]) * PW'(signed'({1'b0, ki}));
          if (prod > PW'(IMAX))      d[c] <= IMAX;
          else if (prod < PW'(IMIN)) d[c] <= IMIN;
          else                       d[c] <= IW'(prod);
        end
        if (v1) begin
          if (loop_closed) begin
            a = (IW+2)'(acc[c]) + (IW+2)'(d[c]);
            if (a > (IW+2)'(IMAX)) a = (IW+2)'(IMAX);
            if (a < (IW+2)'(IMIN)) a = (IW+2)'(IMIN);
            acc[c] <= IW'(a);
            s = (AW+2)'(ff[c]) + (AW+2)'(p[c]) + (AW+2)'(a >>> KI_SHIFT);
          end else begin
            acc[c] <= '0;
            s = (AW+2)'(ff[c]);
          end
          if (s > (AW+2)'(MAXV)) begin
            drv[c] <= OUT_W'(MAXV);  clip[c] <= 1'b1;
          end else if (s < (AW+2)'(MINV)) begin
            drv[c] <= OUT_W'(MINV);  clip[c] <= 1'b1;
          end else begin
            drv[c] <= OUT_W'(s);     clip[c] <= 1'b0;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1          <= 1'b0;
      drive_valid <= 1'b0;
    end else begin
      v1          <= in_valid;
      drive_valid <= v1;
    end
  end

  assign drive_i = drv[0];
  assign drive_q = drv[1];
  assign sat     = |clip;

endmodule
