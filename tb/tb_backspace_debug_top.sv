// tb_backspace_debug_top: end-to-end test of backspace_debug_top at its
// default size (3007 state bits, hard-wired signature of all state bits,
// one cycle of signature history), running the two-partial-breakpoint debug
// flow against the cud_model circuit under debug.
//
// The host side is written here with the software registers only:
//  1. Crash run in mode 3 (the crash detector drives ext_bp): scan out the
//     frozen crash state and the signature, which with all state bits
//     hard-wired is the full predecessor state.
//  2. For each step back, the candidates are the signature state and a
//     decoy (the same state with an unreachable pc), tried in random order.
//     Count run: the candidate goes into the free circuit X with the 46
//     breakpoint bits of the mask (pc, stall and copies of them), the other
//     circuit Y keeps the last confirmed state and its match count. Step 1
//     runs in mode 3 and checks X's delayed flag; later steps run with Y
//     active, so Y only fires if X matched the cycle before. X's match
//     count is read out. Confirm run: Y is made transparent (mask 0), X
//     becomes active with that count, the chip stops on X, the frozen state
//     is scanned out and compared with the candidate (false matches on
//     non-deterministic runs are caught here and re-run), and the new
//     signature gives the next pre-image.
//  One run in three, picked at random, takes the model's other path (its
//  third memory load stalls one cycle longer), so spurious runs, temporal and spatial false matches and
//  timeouts all occur; a run is retried up to 20 times. At the end the trace of confirmed states is checked
//  to be a valid path of the model ending in the crash state, and every
//  mechanism must have been seen at least once.
module tb_backspace_debug_top;
  import bs_pkg::*;
  localparam int unsigned N    = 3007;
  localparam int unsigned NWD  = (N + 63) / 64;
  localparam int unsigned CORE = 38;
  localparam int STEPS   = 8;
  localparam int TIMEOUT = 200;

  logic clk = 1'b0, rst_n = 1'b0, cud_rst_n = 1'b0;
  logic [N-1:0] state_bits;
  logic crash, freeze, bp_hit;
  logic wr_en;
  logic [4:0] addr;
  logic [31:0] wdata, rdata;
  logic cfg_out;
  int extra_at = -1;

  backspace_debug_top dut (
    .clk, .rst_n, .state_bits, .ext_bp(crash), .freeze, .bp_hit,
    .wr_en, .addr, .wdata, .rdata,
    .conc_cfg_shift(1'b0), .conc_cfg_in(1'b0), .conc_cfg_out(cfg_out));

  cud_model #(.N(N)) cud (
    .clk, .rst_n(cud_rst_n), .freeze, .extra_at, .state_bits, .crash);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_crash_run = 0, n_mode_a = 0, n_mode_b = 0, n_mode_ext = 0, n_temporal = 0;
  int n_spurious = 0, n_timeout = 0, n_decoy_rejected = 0, n_nd_runs = 0;
  int n_ham_zero = 0, n_ham_nonzero = 0, n_words = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------- host accesses
  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    addr = a; wdata = d; wr_en = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    addr = a;
    #1;
    d = rdata;
  endtask

  task automatic sel_word(input reg_addr_e lo, input int w);
    wr(lo, (w < 32) ? (32'd1 << w) : 32'd0);
    wr(reg_addr_e'(lo + 1), (w >= 32) ? (32'd1 << (w - 32)) : 32'd0);
  endtask

  task automatic set_ctrl(input bp_mode_e m, input logic b);
    wr(R_CTRL, {29'd0, b, m});
  endtask

  // Load target, mask and counter match register of circuit b.
  task automatic load_bp(input logic b, input logic [N-1:0] t, input logic [N-1:0] m,
                         input logic [31:0] n, input bp_mode_e mode_now);
    set_ctrl(mode_now, b);
    for (int w = 0; w < NWD; w++) begin
      logic [63:0] tw, mw;
      tw = '0; mw = '0;
      for (int i = 0; i < 64; i++) if (w*64 + i < N) begin tw[i] = t[w*64+i]; mw[i] = m[w*64+i]; end
      wr(R_BPDATA_LO, tw[31:0]); wr(R_BPDATA_HI, tw[63:32]);
      wr(R_MASK_LO, mw[31:0]);   wr(R_MASK_HI, mw[63:32]);
      sel_word(R_BPWSEL_LO, w);
      sel_word(R_BPWSEL_LO, 64);   // select nothing
      n_words++;
    end
    wr(R_CNT_TARGET, n);
  endtask

  task automatic read_state(output logic [N-1:0] v);
    logic [31:0] lo, hi;
    for (int w = 0; w < NWD; w++) begin
      sel_word(R_STSEL_LO, w);
      rd(R_STATE_LO, lo); rd(R_STATE_HI, hi);
      for (int i = 0; i < 64; i++) if (w*64 + i < N) v[w*64+i] = (i < 32) ? lo[i] : hi[i-32];
    end
    sel_word(R_STSEL_LO, 64);
  endtask

  task automatic read_sig(output logic [N-1:0] v);
    logic [31:0] lo, hi;
    wr(R_TRACE_ADDR, 32'd0);
    for (int w = 0; w < NWD; w++) begin
      sel_word(R_RDSEL_LO, w);
      rd(R_TRACE_LO, lo); rd(R_TRACE_HI, hi);
      for (int i = 0; i < 64; i++) if (w*64 + i < N) v[w*64+i] = (i < 32) ? lo[i] : hi[i-32];
    end
    sel_word(R_RDSEL_LO, 64);
  endtask

  task automatic read_target(output logic [N-1:0] v);
    logic [31:0] lo, hi;
    for (int w = 0; w < NWD; w++) begin
      sel_word(R_RDSEL_LO, w);
      rd(R_BPREAD_LO, lo); rd(R_BPREAD_HI, hi);
      for (int i = 0; i < 64; i++) if (w*64 + i < N) v[w*64+i] = (i < 32) ? lo[i] : hi[i-32];
    end
    sel_word(R_RDSEL_LO, 64);
  endtask

  // One run of the chip from reset; returns whether it froze.
  task automatic run(output bit froze, output logic [N-1:0] prev_state);
    int c;
    extra_at = ($urandom_range(2, 0) == 0) ? 2 : -1;
    if (extra_at >= 0) n_nd_runs++;
    cud_rst_n = 1'b0;
    wr(R_RESET_BP, 32'd1);
    cud_rst_n = 1'b1;
    c = 0;
    prev_state = '0;
    while (!freeze && c < TIMEOUT) begin
      prev_state = state_bits;
      @(negedge clk);
      c++;
    end
    froze = freeze;
  endtask

  // ------------------------------------------------ model of the CUD core
  typedef struct packed {
    logic [3:0]  timer;
    logic [1:0]  stall;
    logic [7:0]  iter;
    logic [15:0] acc;
    logic [7:0]  pc;
  } core_t;

  function automatic core_t succ(input core_t s, input bit extra);
    core_t n;
    n = s;
    n.timer = s.timer + 4'd1;
    if (s.stall != 0) n.stall = s.stall - 2'd1;
    else begin
      n.acc = s.acc * 16'd5 + 16'(s.pc) + 16'd1;
      if (s.pc % 4 == 3) n.stall = extra ? 2'd2 : 2'd1;
      if (s.pc == 8'd11) begin n.pc = '0; n.iter = s.iter + 8'd1; end
      else n.pc = s.pc + 8'd1;
    end
    return n;
  endfunction

  function automatic logic [N-1:0] expand(input core_t c);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++)
      v[i] = (i < CORE) ? c[i] : (c[(i - CORE) % CORE] ^ (((i / CORE) % 2) == 1));
    return v;
  endfunction

  // -------------------------------------------------------------- flow
  logic [N-1:0] bp_mask;

  initial begin
    logic [N-1:0] trace [$];
    logic [N-1:0] frozen, sig, prev, cand, rb;
    logic [N-1:0] cands [$];
    logic [31:0] r, n_hold, n_new;
    bit froze, ok, is_decoy;
    bit hold_b;          // circuit holding the last confirmed state
    int nbits;

    wr_en = 0; addr = '0; wdata = '0;
    // breakpoint bits: pc and stall of the core and their copies, 46 bits
    bp_mask = '0; nbits = 0;
    for (int i = 0; i < N && nbits < 46; i++) begin
      int k;
      k = i % CORE;
      if (k < 8 || k == 32 || k == 33) begin bp_mask[i] = 1'b1; nbits++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- 1. crash run, mode 3
    set_ctrl(MODE_EXT, 1'b0);
    run(froze, prev);
    n_crash_run++;
    chk(froze, "crash run stops on the crash detector");
    if (froze) n_mode_ext++;
    read_state(frozen);
    chk(frozen == state_bits, "scan-out of the frozen state");
    chk(crash, "frozen in the crash state");
    read_sig(sig);
    chk(sig == prev, "signature is the predecessor of the frozen state");
    rd(R_CYC_LO, r);
    chk(r > 40 && r < TIMEOUT, "cycle counter");
    trace.push_back(frozen);

    hold_b = 1'b1;       // circuit B will "hold" the crash state (mode 3 first)
    n_hold = 0;
    for (int step = 1; step <= STEPS; step++) begin
      logic x;           // circuit receiving the candidate
      bp_mode_e m_count, m_conf;
      bit done;
      x = !hold_b;
      // pre-image: the exact predecessor plus a decoy, random order
      cand = sig;
      cands.delete();
      cands.push_back(sig);
      cand[7:0] = 8'd200;                    // pc never reached
      for (int i = CORE; i < N; i++) if ((i % CORE) < 8) cand[i] = cand[i % CORE] ^ (((i / CORE) % 2) == 1);
      if ($urandom_range(1, 0)) cands.push_front(cand); else cands.push_back(cand);
      m_count = (step == 1) ? MODE_EXT : (hold_b ? MODE_B : MODE_A);
      m_conf  = x ? MODE_B : MODE_A;
      done = 0;
      for (int ci = 0; ci < cands.size() && !done; ci++) begin
        is_decoy = (cands[ci] != sig);
        // ---- count run (retry spurious runs)
        ok = 0;
        for (int attempt = 0; attempt < 20 && !ok; attempt++) begin
          load_bp(x, cands[ci], bp_mask, 32'hFFFF_FFFF, m_count);
          if (attempt == 0) begin
            read_target(rb);
            chk(rb == cands[ci], "target register read-back");
          end
          set_ctrl(m_count, x);
          run(froze, prev);
          rd(R_MIN_HAM, r);
          if (r == 0) n_ham_zero++; else n_ham_nonzero++;
          if (is_decoy) chk(r != 0, "decoy never reached (Hamming)");
          if (!froze) begin
            n_timeout++;
            chk(step > 1, "mode 3 run always stops");
            if (is_decoy) break;
            continue;
          end
          read_state(frozen);
          if (frozen != trace[$]) begin
            // stopped on a state equal to the confirmed one on the
            // breakpoint bits only: a false match on a spurious run
            n_spurious++;
            continue;
          end
          if (step == 1) begin
            n_mode_ext++;
            rd(R_BP_SIGNAL, r);
            if (!(x ? r[2] : r[1])) begin
              n_decoy_rejected++;
              chk(is_decoy, "true predecessor matched the cycle before the crash");
              break;
            end
          end else begin
            if (hold_b) n_mode_b++; else n_mode_a++;
          end
          rd(R_CNT_READ, n_new);
          ok = 1;
        end
        if (!ok) begin
          if (is_decoy) n_decoy_rejected++;
          else chk(0, "true predecessor never confirmed by a count run");
          continue;
        end
        chk(!is_decoy, "decoy accepted");
        if (n_new > 1) n_temporal++;
        // ---- confirm run: X active with its count, Y transparent
        ok = 0;
        for (int attempt = 0; attempt < 20 && !ok; attempt++) begin
          load_bp(!x, '0, '0, 32'd1, m_conf);
          set_ctrl(m_conf, x);
          wr(R_CNT_TARGET, n_new);
          run(froze, prev);
          if (!froze) begin n_timeout++; continue; end
          if (x) n_mode_b++; else n_mode_a++;
          read_state(frozen);
          if (frozen != cands[ci]) begin n_spurious++; continue; end
          read_sig(sig);
          chk(sig == prev, "signature is the predecessor of the frozen state");
          ok = 1;
        end
        chk(ok, "confirm run reached the candidate");
        if (ok) begin
          trace.push_back(cands[ci]);
          // the confirmed state and its count now sit in X
          load_bp(x, cands[ci], bp_mask, n_new, m_conf);
          hold_b = x;
          n_hold = n_new;
          done = 1;
        end
      end
      chk(done, "a predecessor was confirmed");
      if (!done) break;
    end

    // ---- the trace must be a valid path of the model ending in the crash
    chk(trace.size() == STEPS + 1, "trace length");
    for (int k = 1; k < trace.size(); k++) begin
      core_t older, newer;
      older = trace[k][CORE-1:0];
      newer = trace[k-1][CORE-1:0];
      chk(expand(older) == trace[k], "trace state is a consistent model state");
      chk(succ(older, 1'b0) == newer || succ(older, 1'b1) == newer, "trace step is a model transition");
    end
    $display("trace of %0d states back from the crash: pc sequence", trace.size());
    foreach (trace[k]) $write(" %0d", trace[k][7:0]);
    $display("");
    $display("crash_runs=%0d mode1_breaks=%0d mode2_breaks=%0d mode3_breaks=%0d",
             n_crash_run, n_mode_a, n_mode_b, n_mode_ext);
    $display("temporal_false_matches_skipped=%0d spatial_false_matches=%0d timeouts=%0d",
             n_temporal, n_spurious, n_timeout);
    $display("decoys_rejected=%0d nondeterministic_runs=%0d ham_zero=%0d ham_nonzero=%0d words_loaded=%0d",
             n_decoy_rejected, n_nd_runs, n_ham_zero, n_ham_nonzero, n_words);
    chk(n_mode_a > 0, "mechanism: mode 1 breakpoint");
    chk(n_mode_b > 0, "mechanism: mode 2 breakpoint");
    chk(n_mode_ext > 0, "mechanism: mode 3 (external) breakpoint");
    chk(n_temporal > 0, "mechanism: temporal false matches counted past");
    chk(n_spurious > 0, "mechanism: spatial false match caught by scan-out");
    chk(n_timeout > 0, "mechanism: timeout");
    chk(n_decoy_rejected > 0, "mechanism: wrong candidate rejected");
    chk(n_nd_runs > 0, "mechanism: non-deterministic run");
    chk(n_ham_zero > 0 && n_ham_nonzero > 0, "mechanism: Hamming minimum zero and non-zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
