// tb_dac_modulator: self-checking testbench for dac_modulator.
//
// Applies random I/Q drives (and full-scale ones that clip) and checks all
// 14 lanes against y[m] = I*cos(m*45deg) - Q*sin(m*45deg), computed in real
// arithmetic and clipped to +-32767 (tolerance 2 counts), where m is the
// running DAC sample index since reset. This also checks that lane0_phase
// starts at 0 and advances by 14 mod 8 = 6 per clock, and the latency of
// two clocks.
module tb_dac_modulator;
  localparam real PI = 3.14159265358979;
  localparam int LANES = 14, DAC_W = 16;

  logic clk = 0, rst_n = 0;
  logic signed [DAC_W-1:0] drive_i = '0, drive_q = '0;
  logic [LANES-1:0][DAC_W-1:0] lanes;
  logic [2:0] lane0_phase;
  int checks = 0, failures = 0;

  dac_modulator #(.LANES(LANES), .DAC_W(DAC_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hi [int], hq [int];
  int  cyc = 0;   // clocks since reset release

  always @(posedge clk) begin
    if (rst_n) begin
      hi[cyc] = real'(drive_i);
      hq[cyc] = real'(drive_q);
      #1;
      if (cyc >= 1) begin
        int  c;
        longint m0;
        c  = cyc - 1;                 // drive sampled two edges ago
        m0 = longint'(c) * LANES;
        checks++;
        if (int'(lane0_phase) != int'(m0 % 8)) begin
          failures++;
          $display("FAIL lane0_phase %0d exp %0d", lane0_phase, m0 % 8);
        end
        for (int l = 0; l < LANES; l++) begin
          real a, e;
          a = real'((m0 + longint'(l)) % 8) * PI / 4.0;
          e = hi[c] * $cos(a) - hq[c] * $sin(a);
          if (e > 32767.0) e = 32767.0;
          if (e < -32767.0) e = -32767.0;
          checks++;
          if (rabs(real'($signed(lanes[l])) - e) > 2.0) begin
            failures++;
            if (failures < 10)
              $display("FAIL cyc %0d lane %0d: got %0d exp %f", cyc, l, $signed(lanes[l]), e);
          end
        end
      end
      cyc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 2000; k++) begin
      if (k % 10 == 9) begin
        drive_i <= 16'sd32767; drive_q <= -16'sd32767;   // clips on the diagonals
      end else begin
        drive_i <= 16'($urandom_range(46000, 0)) - 16'sd23000;
        drive_q <= 16'($urandom_range(46000, 0)) - 16'sd23000;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
