// tb_pm_logger: self-checking testbench for pm_logger.
//
// Uses DEPTH = 16, POST = 5. Writes a running count (with gaps in
// wr_valid), triggers, and checks that the buffer freezes after exactly POST
// further writes, ignores writes while frozen, and reads back the last
// DEPTH words, oldest first, with the trigger word at DEPTH-1-POST. Then
// re-arms, checks that a trigger early in the next recording is handled
// the same way, and that a second trigger during the post-trigger count is
// ignored.
module tb_pm_logger;
  localparam int DEPTH = 16, DW = 32, POST = 5;

  logic clk = 0, rst_n = 0, wr_valid = 0, trigger = 0, rearm = 0, frozen;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH)-1:0] rd_addr = '0;
  int checks = 0, failures = 0;

  pm_logger #(.DEPTH(DEPTH), .DW(DW), .POST(POST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cnt = 0;
  int unsigned written [$];

  task automatic write_one();
    logic was_frozen;
    wr_valid = 1; wr_data = cnt;
    was_frozen = frozen;
    @(posedge clk); #1;
    if (!was_frozen) written.push_back(cnt);
    cnt++;
    wr_valid = 0;
    if ($urandom_range(1, 0) != 0) begin @(posedge clk); #1; end
  endtask

  task automatic run_case(int pre);
    int unsigned trig_word;
    for (int k = 0; k < pre; k++) write_one();
    // trigger together with a write
    trigger = 1; wr_valid = 1; wr_data = cnt;
    @(posedge clk); #1;
    written.push_back(cnt); trig_word = cnt; cnt++;
    trigger = 0; wr_valid = 0;
    for (int k = 0; k < POST; k++) begin
      checks++;
      if (frozen) begin failures++; $display("FAIL frozen early at %0d", k); end
      if (k == 2) trigger = 1;          // ignored: not armed
      write_one();
      trigger = 0;
    end
    @(posedge clk); #1;
    checks++;
    if (!frozen) begin failures++; $display("FAIL not frozen after POST writes"); end
    for (int k = 0; k < 7; k++) write_one();       // ignored
    for (int a = 0; a < DEPTH; a++) begin
      int unsigned e;
      rd_addr = a[$clog2(DEPTH)-1:0];
      @(posedge clk); #1; @(posedge clk); #1;
      e = (written.size() >= DEPTH - a) ? written[written.size() - DEPTH + a] : rd_data;
      checks++;
      if (rd_data != e) begin
        failures++;
        $display("FAIL addr %0d: got %0d exp %0d (cnt %0d)", a, rd_data, e, cnt);
      end
      if (a == DEPTH - 1 - POST) begin
        checks++;
        if (rd_data != trig_word) begin
          failures++; $display("FAIL trigger word %0d exp %0d", rd_data, trig_word);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n <= 1;
    @(posedge clk); #1;
    run_case(40);
    rearm = 1; @(posedge clk); #1; rearm = 0;
    checks++;
    if (frozen) begin failures++; $display("FAIL still frozen after rearm"); end
    run_case(23);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
