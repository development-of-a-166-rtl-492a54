// tb_pi_controller: self-checking testbench for pi_controller.
//
// Applies random errors (in bursts of in_valid) with random gains in open and
// closed loop and compares each drive with a reference model written with
// integers: p = floor(err*kp/2**8), acc = clamp(acc + err*ki) to
// +-32767*2**12, drive = clamp(ff + p + floor(acc/2**12)). Checks the sat flag, that the open
// loop clears the integrator, that drive_valid follows in_valid by two
// clocks, and that saturation occurs and is left again.
module tb_pi_controller;
  localparam int W = 18, OUT_W = 16;
  localparam longint MAXV = 32767;

  logic clk = 0, rst_n = 0, in_valid = 0, loop_closed = 0, drive_valid, sat;
  logic signed [W-1:0] err_i = '0, err_q = '0;
  logic [15:0] kp = '0, ki = '0;
  logic signed [OUT_W-1:0] ff_i = '0, ff_q = '0, drive_i, drive_q;
  int checks = 0, failures = 0, n_sat = 0;

  pi_controller #(.W(W), .OUT_W(OUT_W), .KP_SHIFT(8), .KI_SHIFT(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampv(longint v);
    if (v > MAXV) return MAXV;
    if (v < -MAXV) return -MAXV;
    return v;
  endfunction

  function automatic longint clampi(longint v);   // integrator range, 12 fraction bits
    if (v > (MAXV << 12)) return MAXV << 12;
    if (v < -(MAXV << 12)) return -(MAXV << 12);
    return v;
  endfunction

  function automatic longint fdiv(longint a, int sh);   // floor division by 2**sh
    longint d = longint'(1) << sh;
    longint q = a / d;
    if (a % d != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  longint acc [2] = '{0, 0};
  longint exp_d [2];
  logic   exp_sat;
  logic   vpipe [2] = '{0, 0};

  // Reference model, evaluated when a sample is accepted.
  task automatic model(longint ei, longint eq);
    longint e [2], f [2], s;
    e[0] = ei; e[1] = eq; f[0] = longint'(ff_i); f[1] = longint'(ff_q);
    exp_sat = 0;
    for (int c = 0; c < 2; c++) begin
      if (loop_closed) begin
        acc[c] = clampi(acc[c] + clampi(e[c] * ki));
        s = f[c] + clampv(fdiv(e[c] * kp, 8)) + fdiv(acc[c], 12);
      end else begin
        acc[c] = 0;
        s = f[c];
      end
      if (s > MAXV || s < -MAXV) exp_sat = 1;
      exp_d[c] = clampv(s);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (drive_valid !== vpipe[1]) begin
        failures++;
        $display("FAIL drive_valid timing");
      end
      if (drive_valid) begin
        checks++;
        if (longint'(drive_i) != exp_d[0] || longint'(drive_q) != exp_d[1] || sat !== exp_sat) begin
          failures++;
          if (failures < 10)
            $display("FAIL drive (%0d,%0d) sat %0d exp (%0d,%0d) %0d",
                     drive_i, drive_q, sat, exp_d[0], exp_d[1], exp_sat);
        end
        if (sat) n_sat++;
      end
    end
  end

  always @(posedge clk) begin
    vpipe[1] <= vpipe[0];
    vpipe[0] <= in_valid && rst_n;
  end

  // One accepted sample every 8 clocks, as at the CIC output rate.
  task automatic step(logic signed [W-1:0] ei, logic signed [W-1:0] eq);
    err_i <= ei; err_q <= eq; in_valid <= 1;
    @(posedge clk);
    model(longint'(ei), longint'(eq));
    in_valid <= 0;
    repeat (7) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // open loop: feed-forward only
    ff_i <= 16'sd1000; ff_q <= -16'sd2000; kp <= 16'd256; ki <= 16'd64;
    for (int k = 0; k < 20; k++) step(18'($urandom), 18'($urandom));
    // closed loop, random errors and gains
    loop_closed <= 1;
    for (int k = 0; k < 2000; k++) begin
      if (k % 100 == 0) begin
        kp <= 16'($urandom_range(1024, 0)); ki <= 16'($urandom_range(512, 0));
        ff_i <= 16'($urandom_range(8000, 0)) - 16'sd4000;
        ff_q <= 16'($urandom_range(8000, 0)) - 16'sd4000;
      end
      step(18'($urandom_range(4000, 0)) - 18'sd2000, 18'($urandom_range(4000, 0)) - 18'sd2000);
    end
    // drive into saturation with a large constant error, then back
    kp <= 16'd256; ki <= 16'd4000;
    for (int k = 0; k < 50; k++) step(18'sd60000, -18'sd60000);
    for (int k = 0; k < 200; k++) step(-18'sd3000, 18'sd3000);
    // back to open loop: integrator cleared
    loop_closed <= 0;
    for (int k = 0; k < 5; k++) step(18'sd500, 18'sd500);
    loop_closed <= 1;
    kp <= 16'd0; ki <= 16'd0;
    step(18'sd0, 18'sd0);
    repeat (4) @(posedge clk);
    checks++;
    if (longint'(drive_i) != longint'(ff_i) || n_sat == 0 || sat) begin
      failures++;
      $display("FAIL integrator not cleared or saturation not seen (%0d)", n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
