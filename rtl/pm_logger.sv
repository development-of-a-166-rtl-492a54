// pm_logger: post-mortem data logger (circular buffer with trigger freeze).
//
// Records loop signals continuously so that the history before an
// interlock or beam loss can be read out afterwards.
//
// How it works: every wr_valid word is written at wr_ptr, which wraps over
// DEPTH entries, so the buffer always holds the last DEPTH words. A trigger
// while ARMED starts a count of POST further words; when it runs out the
// buffer is FROZEN and ignores writes until `rearm`. In the frozen buffer
// the oldest word is at wr_ptr, so reads are addressed relative to it:
// rd_addr = 0 is the oldest word, DEPTH-1 the newest. The trigger itself
// was the word at rd_addr = DEPTH-1-POST.
//
// Interface: rd_data is registered (one clock after rd_addr). `frozen`
// is high in the FROZEN state. A trigger while not ARMED is ignored. An
// assertion checks that a frozen buffer stays frozen until re-armed.
//
// Fast data logging for post-mortem analysis is a function named in the
// system description; the depth, word layout, trigger handling and
// read-out are this design's choices.
module pm_logger #(
  parameter int DEPTH = 4096,
  parameter int DW    = 68,
  parameter int POST  = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  input  logic [DW-1:0]            wr_data,
  input  logic                     trigger,
  input  logic                     rearm,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data,
  output logic                     frozen
);

  localparam int AW = $clog2(DEPTH);

  typedef enum logic [1:0] {ARMED, POSTTRIG, FROZEN} state_t;

  state_t          state;
  logic [AW-1:0]   wr_ptr;
  logic [AW:0]     post_cnt;
  logic [DW-1:0]   mem [DEPTH];
  logic            we;

  assign we     = wr_valid && (state != FROZEN);
  assign frozen = (state == FROZEN);

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ARMED;
      wr_ptr   <= '0;
      post_cnt <= '0;
    end else begin
      if (we) wr_ptr <= wr_ptr + 1'b1;
      unique case (state)
        ARMED: if (trigger) begin
          state    <= POSTTRIG;
          post_cnt <= (AW+1)'(POST);
        end
        POSTTRIG: if (we) begin
          if (post_cnt <= (AW+1)'(1)) state <= FROZEN;
          post_cnt <= post_cnt - 1'b1;
        end
        FROZEN: ;
        default: state <= ARMED;
      endcase
      if (rearm) state <= ARMED;
    end
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[wr_ptr + rd_addr];
  end

  // A frozen buffer keeps its contents until re-armed.
  a_frozen_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  frozen && !rearm |=> frozen && $stable(wr_ptr));

endmodule
