// tb_cic_filter: self-checking testbench for cic_filter.
//
// Drives random samples (with random gaps in in_valid, steps and full-scale
// values) and checks every output against an independent model: the input
// stream passed N times through a length-R moving sum, taken at input index
// j*R + R - 1 - N for the j-th output (the integrator pipeline adds N-1
// samples of delay), divided by R**N with an arithmetic shift. The match
// must be exact, and the number of outputs must be inputs / R.
module tb_cic_filter;
  localparam int W = 18, N = 3, R = 8;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  cic_filter #(.W(W), .N(N), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint x [$];      // accepted inputs
  int     nout = 0;

  // N-fold moving sum of length R at index t (zero before index 0).
  function automatic longint boxn(int t, int stages);
    longint s = 0;
    if (t < 0) return 0;
    if (stages == 0) return x[t];
    for (int k = 0; k < R; k++) s += boxn(t - k, stages - 1);
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) x.push_back(longint'(din));
    if (rst_n && out_valid) begin
      longint e;
      e = boxn(nout * R + R - 1 - N, N) >>> (N * $clog2(R));
      checks++;
      if (longint'(dout) != e) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d: got %0d exp %0d", nout, dout, e);
      end
      nout++;
    end
  end

  initial begin
    int nin;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    nin = 0;
    for (int k = 0; k < 4000; k++) begin
      in_valid <= ($urandom_range(4, 0) != 0);
      if (k < 1000)       din <= 18'sd100000;                       // step
      else if (k < 1500)  din <= -18'sd131072;                      // negative full scale
      else                din <= 18'($urandom);
      @(posedge clk);
      if (in_valid) nin++;
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != nin / R) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", nout, nin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
