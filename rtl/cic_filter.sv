// cic_filter: decimating cascaded integrator-comb low-pass filter, one channel.
//
// The loop filters the rotated pickup I and Q each with one of these before
// the set-point comparison; it sets the loop's narrow detection bandwidth.
//
// How it works: N integrators run at the input rate on a word of
// W + N*log2(R) bits (wrap-around arithmetic is harmless in a CIC). Every
// R-th input the last integrator is sampled and passed through N combs of
// differential delay 1. The comb result is divided by R**N (a right shift),
// so the DC gain is one. The integrators are pipelined, which only adds
// N-1 clocks of delay.
//
// Interface: in_valid marks an input sample; out_valid pulses for one clock
// every R accepted inputs with dout. R must be a power of two. An assertion
// checks that outputs are never back to back.
//
// Using a CIC as the loop's low-pass filter follows the system description;
// its order N = 3, decimation R = 8 and widths are this design's choices.
module cic_filter #(
  parameter int W = 18,
  parameter int N = 3,
  parameter int R = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int RLOG = $clog2(R);
  localparam int GW   = W + N * RLOG;

  logic signed [GW-1:0] integ [N];
  logic signed [GW-1:0] dly   [N];
  logic signed [GW-1:0] samp;
  logic                 samp_vld;
  logic [RLOG-1:0]      cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) integ[s] <= '0;
      cnt      <= '0;
      samp     <= '0;
      samp_vld <= 1'b0;
    end else begin
      samp_vld <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + GW'(din);
        for (int s = 1; s < N; s++) integ[s] <= integ[s] + integ[s-1];
        cnt <= cnt + 1'b1;
        if (cnt == RLOG'(R - 1)) begin
          samp     <= integ[N-1];
          samp_vld <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    logic signed [GW-1:0] c;
    if (!rst_n) begin
      for (int s = 0; s < N; s++) dly[s] <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= samp_vld;
      if (samp_vld) begin
        c = samp;
        for (int s = 0; s < N; s++) begin
          dly[s] <= c;
          c = c - dly[s];
        end
        dout <= W'(c >>> (N * RLOG));
      end
    end
  end

  // One output per R inputs: never two in consecutive clocks.
  if (R > 1) begin : g_chk
    a_out_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                    out_valid |=> !out_valid);
  end

endmodule
