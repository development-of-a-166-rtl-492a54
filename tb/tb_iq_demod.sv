// tb_iq_demod: self-checking testbench for iq_demod.
//
// Feeds a sampled RF tone x[n] = round(A*cos(n*270deg + theta)) + offset, as
// the ADC sees 166.6 MHz sampled at 8*f_RF/14, for several amplitudes,
// phases and DC offsets. Expected output (computed with real arithmetic):
// I = 2*A*cos(theta), Q = 2*A*sin(theta), within +-2 counts, on every clock
// once the four-sample window holds only the current tone. Also checks that
// iq_valid rises exactly five clocks after reset is released.
module tb_iq_demod;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] adc = '0;
  logic signed [17:0] i_out, q_out;
  logic iq_valid;
  int checks = 0, failures = 0;
  int n = 0;

  iq_demod #(.ADC_W(16), .IQ_W(18), .PH_STEP_Q(3)) dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] tone(int idx, real a, real th, int off);
    return 16'($rtoi($floor(a * $cos(idx * 1.5 * PI + th) + off + 0.5)));
  endfunction

  task automatic run_tone(real a, real th_deg, int off);
    real th, ei, eq;
    th = th_deg * PI / 180.0;
    ei = 2.0 * a * $cos(th);
    eq = 2.0 * a * $sin(th);
    for (int c = 0; c < 40; c++) begin
      adc <= tone(n, a, th, off);
      n++;
      @(posedge clk);
      #1;
      if (c >= 6) begin
        checks++;
        if (rabs(real'(i_out) - ei) > 2.0 || rabs(real'(q_out) - eq) > 2.0) begin
          failures++;
          if (failures < 10)
            $display("FAIL A=%f th=%f: got I=%0d Q=%0d exp %f %f", a, th_deg, i_out, q_out, ei, eq);
        end
      end
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    // Valid timing: first sample enters on the first clock with rst_n high.
    adc <= tone(0, 1000.0, 0.0, 0);
    rst_n <= 1;
    cyc = 0;
    while (!iq_valid && cyc < 20) begin
      @(posedge clk); #1; cyc++;
      adc <= tone(cyc, 1000.0, 0.0, 0);
    end
    n = cyc;
    checks++;
    if (cyc != 5) begin
      failures++;
      $display("FAIL iq_valid after %0d clocks, expected 5", cyc);
    end
    @(negedge clk);
    run_tone(1000.0, 0.0, 0);
    run_tone(30000.0, 37.0, 0);
    run_tone(20000.0, 123.0, 500);
    run_tone(12345.0, -100.0, -1200);
    run_tone(32000.0, 271.0, 0);
    for (int k = 0; k < 20; k++)
      run_tone(real'($urandom_range(30000, 100)), real'($urandom_range(359, 0)),
               int'($urandom_range(1000, 0)) - 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
