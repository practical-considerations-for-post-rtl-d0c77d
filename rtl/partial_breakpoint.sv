// partial_breakpoint: one partial breakpoint circuit with a match counter.
//
// A target state register and a mask register (W bits each) are compared
// with W monitored state bits by bp_comparator. A compare hit ("partial
// match") increments a 32-bit match counter. The breakpoint output is raised
// on a partial match once the number of matches counted so far, this one
// included, is greater than or equal to the counter match register; so with
// the counter match register at n the circuit fires on the n-th partial
// match of the run. A flip-flop keeps the partial match of the previous
// cycle ("counterless delayed breakpoint"), which the two-circuit scheme ANDs
// with the other circuit's breakpoint.
//
// Interface: the host writes the target and mask registers one WORD_W-bit
// word at a time: every word whose bit in wsel is 1 takes wdata_target and
// wdata_mask in that cycle. cnt_target_we loads the counter match register.
// clear starts a run (counter and delayed flag to 0). hold (breakpoint
// already taken) stops counting and freezes the delayed flag; stop_now (the
// breakpoint is being taken this cycle) freezes the delayed flag only, so
// the hit of the breakpoint cycle is still counted.
//
// Timing: pmatch and brk follow the state by PIPE cycles; delayed follows
// pmatch by one cycle.
//
// Target register, counter, counter match register, >= comparator and the
// delayed flip-flop follow the described circuit. The mask register, the
// reset values (mask all ones, counter match register 1) and the word-wise
// load are choices of this design, the load taken from the prototype's
// 64-bit host writes.
module partial_breakpoint
  import bs_pkg::*;
#(
  parameter int unsigned W       = 3007,
  parameter int unsigned WORD_W  = 64,
  parameter int unsigned GROUP_W = 64,
  parameter bit          PIPE    = 1'b0,
  localparam int unsigned NW     = (W + WORD_W - 1) / WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      state_bits,
  // host load
  input  logic [NW-1:0]     wsel,
  input  logic [WORD_W-1:0] wdata_target,
  input  logic [WORD_W-1:0] wdata_mask,
  input  logic              cnt_target_we,
  input  logic [CNT_W-1:0]  cnt_target_wdata,
  // run control
  input  logic              clear,
  input  logic              hold,
  input  logic              stop_now,
  // results
  output logic              pmatch,
  output logic              brk,
  output logic              delayed,
  output logic [CNT_W-1:0]  count,
  output logic [CNT_W-1:0]  cnt_target,
  output logic [W-1:0]      target_q,
  output logic [W-1:0]      mask_q
);
  logic [W-1:0] target_r, mask_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target_r <= '0;
      mask_r   <= '1;
    end else begin
      for (int unsigned i = 0; i < W; i++) begin
        if (wsel[i / WORD_W]) begin
          target_r[i] <= wdata_target[i % WORD_W];
          mask_r[i]   <= wdata_mask[i % WORD_W];
        end
      end
    end
  end

  assign target_q = target_r;
  assign mask_q   = mask_r;

  bp_comparator #(.W(W), .GROUP_W(GROUP_W), .PIPE(PIPE)) u_cmp (
    .clk        (clk),
    .rst_n      (rst_n),
    .state_bits (state_bits),
    .target_bits(target_q),
    .mask_bits  (mask_q),
    .match      (pmatch)
  );

  logic [CNT_W-1:0] count_inc;
  assign count_inc = count + CNT_W'(1);

  // >= comparator between the match count (this hit included) and the
  // counter match register.
  assign brk = pmatch && (count_inc >= cnt_target);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_target <= CNT_W'(1);
    end else if (cnt_target_we) begin
      cnt_target <= cnt_target_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      delayed <= 1'b0;
    end else if (clear) begin
      count   <= '0;
      delayed <= 1'b0;
    end else begin
      if (pmatch && !hold)          count   <= count_inc;
      if (!hold && !stop_now)       delayed <= pmatch;
    end
  end

endmodule
