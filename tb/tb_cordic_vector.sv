// tb_cordic_vector: self-checking testbench for cordic_vector.
//
// Streams random vectors (all four quadrants, the axes and near-zero
// lengths) and compares amp with sqrt(x^2 + y^2) (tolerance 4 counts) and
// phase with atan2(y, x) scaled to 2**16 per turn (tolerance 3 counts,
// taken modulo one turn, widened by 2000/length counts for short vectors;
// skipped for vectors shorter than 64 counts, whose
// angle is not defined to that precision). Checks out_valid timing
// (latency ITER + 2).
module tb_cordic_vector;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  W = 18, ITER = 18, LAT = ITER + 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] x_in = '0, y_in = '0;
  logic [W-1:0] amp;
  phase_t phase;
  int checks = 0, failures = 0;

  cordic_vector #(.W(W), .ITER(ITER)) dut (.*);

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

  real hx [int], hy [int];
  logic hv [int];
  int cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      hv[cyc] = in_valid;
      hx[cyc] = real'(x_in);
      hy[cyc] = real'(y_in);
      #1;
      if (cyc >= LAT) begin
        if (out_valid !== hv[cyc-LAT+1]) begin
          failures++;
          $display("FAIL out_valid at cycle %0d", cyc);
        end
        if (out_valid) begin
          real ea, ep, dp;
          int  c;
          c  = cyc - LAT + 1;
          ea = $sqrt(hx[c] * hx[c] + hy[c] * hy[c]);
          ep = $atan2(hy[c], hx[c]) / (2.0 * PI) * 65536.0;
          dp = real'(phase) - ep;
          while (dp > 32768.0)  dp -= 65536.0;
          while (dp < -32768.0) dp += 65536.0;
          checks++;
          if (rabs(real'(amp) - ea) > 4.0 || (ea > 64.0 && rabs(dp) > 3.0 + 2000.0 / ea)) begin
            failures++;
            if (failures < 10)
              $display("FAIL in (%f,%f): got amp %0d ph %0d exp %f %f",
                       hx[c], hy[c], amp, phase, ea, ep);
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
      case (k % 8)
        0: begin x_in <= 18'sd50000;  y_in <= 18'sd0; end
        1: begin x_in <= -18'sd50000; y_in <= 18'sd0; end
        2: begin x_in <= 18'sd0;      y_in <= 18'($urandom_range(131071, 1)); end
        3: begin x_in <= 18'sd0;      y_in <= -18'($urandom_range(131071, 1)); end
        4: begin x_in <= 18'($urandom_range(40, 0)) - 18'sd20; y_in <= 18'($urandom_range(40, 0)) - 18'sd20; end
        default: begin x_in <= 18'($urandom); y_in <= 18'($urandom); end
      endcase
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
