// tb_cordic_rotate: self-checking testbench for cordic_rotate.
//
// Streams random vectors and angles, one per clock with random gaps, and
// compares each result with x*cos(a) - y*sin(a), x*sin(a) + y*cos(a)
// computed in real arithmetic (tolerance 4 counts), including saturation
// of results beyond full scale. Checks the latency of ITER + 2 clocks by
// matching each output to the input issued that many clocks earlier.
module tb_cordic_rotate;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  W = 18, ITER = 18, LAT = ITER + 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] x_in = '0, y_in = '0, x_out, y_out;
  phase_t angle = '0;
  int checks = 0, failures = 0;

  cordic_rotate #(.W(W), .ITER(ITER)) dut (.*);

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

  // input history, indexed by cycle
  real hx [int], hy [int], ha [int];
  logic hv [int];
  int cyc = 0;

  function automatic real clip(real v);
    real m = real'((1 << (W-1)) - 1);
    if (v > m) return m;
    if (v < -m) return -m;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      hv[cyc] = in_valid;
      hx[cyc] = real'(x_in);
      hy[cyc] = real'(y_in);
      ha[cyc] = real'(angle) * 2.0 * PI / 65536.0;
      #1;
      if (cyc >= LAT) begin
        if (out_valid !== hv[cyc-LAT+1]) begin
          failures++;
          $display("FAIL out_valid at cycle %0d", cyc);
        end
        if (out_valid) begin
          real ex, ey, a;
          int  c;
          c  = cyc - LAT + 1;
          a  = ha[c];
          ex = clip(hx[c] * $cos(a) - hy[c] * $sin(a));
          ey = clip(hx[c] * $sin(a) + hy[c] * $cos(a));
          checks++;
          if (rabs(real'(x_out) - ex) > 4.0 || rabs(real'(y_out) - ey) > 4.0) begin
            failures++;
            if (failures < 10)
              $display("FAIL in (%f,%f) a=%f: got (%0d,%0d) exp (%f,%f)",
                       hx[c], hy[c], a, x_out, y_out, ex, ey);
          end
        end
      end
      cyc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3000; k++) begin
      in_valid <= ($urandom_range(3, 0) != 0);
      if (k < 8) begin
        // axes and the quadrant boundaries
        x_in  <= 18'sd100000; y_in <= 18'sd0;
        angle <= 16'(k * 8192);
      end else if (k < 1000) begin
        x_in  <= 18'($urandom_range(180000, 0)) - 18'sd90000;
        y_in  <= 18'($urandom_range(180000, 0)) - 18'sd90000;
        angle <= 16'($urandom);
      end else begin
        x_in  <= 18'($urandom);
        y_in  <= 18'($urandom);
        angle <= 16'($urandom);
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
