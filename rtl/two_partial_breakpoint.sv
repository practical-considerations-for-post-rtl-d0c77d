// two_partial_breakpoint: breakpoint circuit made of two partial breakpoint
// circuits, A and B, and a two-bit mode register.
//
// Mode 1 (MODE_A): A's counted breakpoint, ANDed with B's partial match of
//   the previous cycle, stops the chip; B counts its own hits.
// Mode 2 (MODE_B): the same with A and B exchanged.
// Mode 3 (MODE_EXT, and MODE_OFF): neither circuit stops the chip; the
//   external breakpoint input (for instance a crash detector) does, and both
//   count their hits until then.
// The AND with the other circuit's delayed match makes the other circuit's
// target state occur exactly one cycle before the breakpoint state. Writing
// an all-zero mask into the idle circuit makes it match every cycle, which
// turns that AND off.
//
// Once taken, the breakpoint is held (sticky) until `clear`; the counters
// stop and the delayed flags keep the values they had in the breakpoint
// cycle, so the host can read them. The freeze output, which stops the
// circuit under debug and the signature buffer, is the breakpoint passed
// through DIST_STAGES flip-flops (pipelined distribution across the chip).
// The external breakpoint is delayed by PIPE cycles so that it lines up with
// the pipelined comparators.
//
// Timing: a state that triggers the breakpoint at clock cycle t is followed
// by freeze at cycle t + PIPE + DIST_STAGES; the state then frozen is
// PIPE + DIST_STAGES cycles after the breakpoint state (zero with both 0).
//
// The two circuits, the three modes, the two-bit mode register, the
// multiplexer and the cross ANDs follow the described architecture. The
// sticky hold, the alignment of the external breakpoint and the mode
// encoding are choices of this design.
module two_partial_breakpoint
  import bs_pkg::*;
#(
  parameter int unsigned W           = 3007,
  parameter int unsigned WORD_W      = 64,
  parameter int unsigned GROUP_W     = 64,
  parameter bit          PIPE        = 1'b0,
  parameter int unsigned DIST_STAGES = 0,
  localparam int unsigned NW         = (W + WORD_W - 1) / WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      state_bits,
  input  logic              ext_bp,
  // host programming
  input  bp_mode_e          mode,
  input  logic              sel_b,         // 0: writes go to A, 1: to B
  input  logic [NW-1:0]     wsel,
  input  logic [WORD_W-1:0] wdata_target,
  input  logic [WORD_W-1:0] wdata_mask,
  input  logic              cnt_target_we,
  input  logic [CNT_W-1:0]  cnt_target_wdata,
  input  logic              clear,
  // status
  output logic              bp_hit,        // sticky breakpoint
  output logic              bp_now,        // breakpoint raised this cycle
  output logic              freeze,        // distributed breakpoint
  output logic              pmatch_a,
  output logic              pmatch_b,
  output logic              delayed_a,
  output logic              delayed_b,
  output logic [CNT_W-1:0]  count_a,
  output logic [CNT_W-1:0]  count_b,
  output logic [CNT_W-1:0]  cnt_target_a,
  output logic [CNT_W-1:0]  cnt_target_b,
  output logic [W-1:0]      target_a,
  output logic [W-1:0]      target_b,
  output logic [W-1:0]      mask_a,
  output logic [W-1:0]      mask_b
);
  logic brk_a, brk_b, ext_al;

  partial_breakpoint #(.W(W), .WORD_W(WORD_W), .GROUP_W(GROUP_W), .PIPE(PIPE)) u_a (
    .clk, .rst_n, .state_bits,
    .wsel            (sel_b ? '0 : wsel),
    .wdata_target, .wdata_mask,
    .cnt_target_we   (cnt_target_we && !sel_b),
    .cnt_target_wdata,
    .clear,
    .hold            (bp_hit),
    .stop_now        (bp_now),
    .pmatch          (pmatch_a),
    .brk             (brk_a),
    .delayed         (delayed_a),
    .count           (count_a),
    .cnt_target      (cnt_target_a),
    .target_q        (target_a),
    .mask_q          (mask_a)
  );

  partial_breakpoint #(.W(W), .WORD_W(WORD_W), .GROUP_W(GROUP_W), .PIPE(PIPE)) u_b (
    .clk, .rst_n, .state_bits,
    .wsel            (sel_b ? wsel : '0),
    .wdata_target, .wdata_mask,
    .cnt_target_we   (cnt_target_we && sel_b),
    .cnt_target_wdata,
    .clear,
    .hold            (bp_hit),
    .stop_now        (bp_now),
    .pmatch          (pmatch_b),
    .brk             (brk_b),
    .delayed         (delayed_b),
    .count           (count_b),
    .cnt_target      (cnt_target_b),
    .target_q        (target_b),
    .mask_q          (mask_b)
  );

  // Align the external breakpoint with the comparator latency.
  if (PIPE) begin : g_ext_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ext_al <= 1'b0;
      else        ext_al <= ext_bp;
    end
  end else begin : g_ext_comb
    assign ext_al = ext_bp;
  end

  // 3:1 multiplexer selecting the breakpoint source.
  always_comb begin
    unique case (mode)
      MODE_A:  bp_now = brk_a && delayed_b;
      MODE_B:  bp_now = brk_b && delayed_a;
      default: bp_now = ext_al;
    endcase
    bp_now = bp_now && !bp_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bp_hit <= 1'b0;
    else if (clear)  bp_hit <= 1'b0;
    else if (bp_now) bp_hit <= 1'b1;
  end

  // Pipelined distribution of the breakpoint to the frozen flip-flops.
  logic freeze_src;
  assign freeze_src = bp_hit || bp_now;

  if (DIST_STAGES == 0) begin : g_dist0
    assign freeze = freeze_src;
  end else begin : g_dist
    logic [DIST_STAGES-1:0] dist_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     dist_q <= '0;
      else if (clear) dist_q <= '0;
      else begin
        dist_q[0] <= freeze_src;
        for (int unsigned i = 1; i < DIST_STAGES; i++) dist_q[i] <= dist_q[i-1];
      end
    end
    assign freeze = dist_q[DIST_STAGES-1];
  end

endmodule
