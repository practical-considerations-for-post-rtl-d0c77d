// backspace_debug_top: on-chip debug architecture for BackSpace-style
// post-silicon debug.
//
// The block is attached to the N_MON state flip-flops of a circuit under
// debug (CUD). It stops the CUD at a programmed state and records what the
// off-chip pre-image computation needs to step back one state at a time:
//  * two_partial_breakpoint - two partial breakpoint circuits (target,
//    mask, match counter) and the mode logic; its freeze output is the
//    breakpoint, pipelined, and goes to the CUD's hold / scan enable so that
//    the frozen state can be scanned out;
//  * signature creation    - SIG_SCHEME selects hard-wired bits (the low
//    S_WIDTH state bits), a programmable concentrator or a hash;
//  * signature_collection  - C_CYCLES signatures before the freeze;
//  * hamming_monitor       - closest approach of the run to the target
//    state of the selected circuit (measurement aid);
//  * debug_regs            - the host's 32 x 32-bit software registers.
//
// Interface: state_bits come from the CUD; freeze goes back to it and must
// hold its state while high. ext_bp is the external breakpoint used in
// mode 3 (for instance a crash detector). The host uses wr_en / addr /
// wdata / rdata. conc_cfg_* load the concentrator configuration (only used
// with SIG_SCHEME = SIG_CONC).
//
// Timing: the state that triggers the breakpoint is followed
// PIPE + DIST_STAGES cycles later by the frozen state. The newest trace
// buffer entry is the signature of the state just before the frozen one.
// All logic is on one clock.
//
// The three-part structure, the two partial breakpoints with their modes,
// the prototype sizes (3007 state bits, one cycle of signatures of all state
// bits, 64-bit host loads) and the register list follow the described
// design. One clock for CUD and debug logic, the hard-wired bit choice and
// the defaults of PIPE, DIST_STAGES and GROUP_W are this design's choices.
module backspace_debug_top
  import bs_pkg::*;
#(
  parameter int unsigned N_MON       = 3007,
  parameter sig_scheme_e SIG_SCHEME  = SIG_HARDWIRED,
  parameter int unsigned S_WIDTH     = 3007,
  parameter int unsigned C_CYCLES    = 1,
  parameter bit          PIPE        = 1'b0,
  parameter int unsigned DIST_STAGES = 0,
  parameter int unsigned GROUP_W     = 64,
  parameter int unsigned HASH_SEED   = 1,
  parameter int unsigned HASH_PPM    = 15000,
  localparam int unsigned WORD_W     = 64,
  localparam int unsigned NW         = (N_MON + WORD_W - 1) / WORD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // circuit under debug
  input  logic [N_MON-1:0]   state_bits,
  input  logic               ext_bp,
  output logic               freeze,
  output logic               bp_hit,
  // host software registers
  input  logic               wr_en,
  input  logic [4:0]         addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  // concentrator configuration chain
  input  logic               conc_cfg_shift,
  input  logic               conc_cfg_in,
  output logic               conc_cfg_out
);
  localparam int unsigned AW = (C_CYCLES > 1) ? $clog2(C_CYCLES) : 1;
  localparam int unsigned HW = $clog2(N_MON + 1);

  // ---------------------------------------------------------------- host
  bp_mode_e            mode;
  logic                sel_b, cnt_target_we, clear;
  logic [NW-1:0]       bp_wsel;
  logic [WORD_W-1:0]   bp_wdata, mask_wdata;
  logic [CNT_W-1:0]    cnt_target_wdata;
  logic [AW-1:0]       trace_age;

  // ----------------------------------------------------- breakpoint side
  logic                bp_now, pmatch_a, pmatch_b, delayed_a, delayed_b;
  logic [CNT_W-1:0]    count_a, count_b, cnt_target_a, cnt_target_b;
  logic [N_MON-1:0]    target_a, target_b, mask_a, mask_b;

  two_partial_breakpoint #(
    .W(N_MON), .WORD_W(WORD_W), .GROUP_W(GROUP_W), .PIPE(PIPE), .DIST_STAGES(DIST_STAGES)
  ) u_bp (
    .clk, .rst_n, .state_bits, .ext_bp,
    .mode, .sel_b,
    .wsel(bp_wsel), .wdata_target(bp_wdata), .wdata_mask(mask_wdata),
    .cnt_target_we, .cnt_target_wdata, .clear,
    .bp_hit, .bp_now, .freeze,
    .pmatch_a, .pmatch_b, .delayed_a, .delayed_b,
    .count_a, .count_b, .cnt_target_a, .cnt_target_b,
    .target_a, .target_b, .mask_a, .mask_b
  );

  // --------------------------------------------------- signature creation
  logic [S_WIDTH-1:0] signature;

  if (SIG_SCHEME == SIG_CONC) begin : g_conc
    concentrator #(.N(N_MON), .M(S_WIDTH), .K(1)) u_sig (
      .clk, .rst_n,
      .cfg_shift(conc_cfg_shift), .cfg_in(conc_cfg_in), .cfg_out(conc_cfg_out),
      .state_bits, .signature
    );
  end else if (SIG_SCHEME == SIG_HASH) begin : g_hash
    hash_signature #(.N(N_MON), .M(S_WIDTH), .ONES_PPM(HASH_PPM), .SEED(HASH_SEED)) u_sig (
      .state_bits, .signature
    );
    assign conc_cfg_out = 1'b0;
  end else begin : g_hard
    // Hard-wired bits: no logic, the low S_WIDTH state bits.
    assign signature    = state_bits[S_WIDTH-1:0];
    assign conc_cfg_out = 1'b0;
  end

  // ------------------------------------------------- signature collection
  logic [S_WIDTH-1:0] trace_data;
  logic [AW:0]        trace_filled;

  signature_collection #(.S_WIDTH(S_WIDTH), .C_CYCLES(C_CYCLES)) u_trace (
    .clk, .rst_n, .clear, .stop(freeze),
    .sig_in(signature), .rd_age(trace_age), .rd_data(trace_data), .filled(trace_filled)
  );

  // ------------------------------------------------------ Hamming monitor
  logic [HW-1:0]    ham, min_ham;
  logic [N_MON-1:0] ham_state;

  hamming_monitor #(.W(N_MON)) u_ham (
    .clk, .rst_n, .clear, .enable(!freeze),
    .state_bits,
    .target_bits(sel_b ? target_b : target_a),
    .mask_bits  (sel_b ? mask_b   : mask_a),
    .ham, .min_ham, .ham_state
  );

  // ------------------------------------------------------ register file
  debug_regs #(.W(N_MON), .S_WIDTH(S_WIDTH), .C_CYCLES(C_CYCLES)) u_regs (
    .clk, .rst_n,
    .wr_en, .addr, .wdata, .rdata,
    .mode, .sel_b, .bp_wsel, .bp_wdata, .mask_wdata,
    .cnt_target_we, .cnt_target_wdata, .clear, .trace_age,
    .freeze, .bp_hit, .delayed_a, .delayed_b,
    .count_sel     (sel_b ? count_b : count_a),
    .cnt_target_sel(sel_b ? cnt_target_b : cnt_target_a),
    .target_sel    (sel_b ? target_b : target_a),
    .state_bits, .ham_state, .min_ham, .trace_data
  );

endmodule
