// tb_delayed_flow: end-to-end test of backspace_debug_top with a pipelined
// breakpoint (one comparator stage, PIPE = 1, and one distribution stage,
// DIST_STAGES = 1, so the chip freezes D = 2 cycles after the breakpoint
// state) and a trace buffer of C_CYCLES = 4 signatures of all state bits,
// on a 152-bit version of the cud_model circuit under debug.
//
// Because the frozen state is no longer the breakpoint state, the host
// checks each run differently from the single-cycle flow:
//  * the frozen state is compared with the state D positions nearer the
//    crash in the trace already built (the "test state"), when there is one;
//  * the trace buffer entries, which reach back past the breakpoint state,
//    are compared with the known trace states they must equal;
//  * for the first D - 1 steps before the crash the frozen state lies past
//    the crash, where no trace exists (the blind spot); only the trace
//    entries are checked there;
//  * the signature of the new candidate's predecessor is entry D of the
//    trace buffer.
// The run sequence is the same as in tb_backspace_debug_top: a crash run in
// mode 3, then a count run and a confirm run per step, alternating modes 1
// and 2, with decoy candidates and random non-repeatable runs. The recovered
// trace must be a valid path of the model, and every mechanism (modes 1-3,
// spurious runs caught, blind-spot steps, test-state checks, timeouts,
// decoys rejected, temporal matches counted past) must occur.
module tb_delayed_flow;
  import bs_pkg::*;
  localparam int unsigned N    = 152;
  localparam int unsigned NWD  = (N + 63) / 64;
  localparam int unsigned CORE = 38;
  localparam int unsigned CC   = 4;
  localparam int          D    = 2;
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

  backspace_debug_top #(
    .N_MON(N), .S_WIDTH(N), .C_CYCLES(CC), .PIPE(1'b1), .DIST_STAGES(1), .GROUP_W(16)
  ) dut (
    .clk, .rst_n, .state_bits, .ext_bp(crash), .freeze, .bp_hit,
    .wr_en, .addr, .wdata, .rdata,
    .conc_cfg_shift(1'b0), .conc_cfg_in(1'b0), .conc_cfg_out(cfg_out));

  cud_model #(.N(N)) cud (
    .clk, .rst_n(cud_rst_n), .freeze, .extra_at, .state_bits, .crash);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mode_a = 0, n_mode_b = 0, n_mode_ext = 0, n_temporal = 0;
  int n_spurious = 0, n_timeout = 0, n_decoy_rejected = 0, n_nd_runs = 0;
  int n_blind = 0, n_test_state = 0, n_ham_zero = 0, n_ham_nonzero = 0, n_words = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic read_entry(input int age, output logic [N-1:0] v);
    logic [31:0] lo, hi;
    wr(R_TRACE_ADDR, age);
    for (int w = 0; w < NWD; w++) begin
      sel_word(R_RDSEL_LO, w);
      rd(R_TRACE_LO, lo); rd(R_TRACE_HI, hi);
      for (int i = 0; i < 64; i++) if (w*64 + i < N) v[w*64+i] = (i < 32) ? lo[i] : hi[i-32];
    end
    sel_word(R_RDSEL_LO, 64);
  endtask

  logic [N-1:0] trace [$];   // trace[k]: k states before the crash
  logic [N-1:0] ent [CC];

  // Check a frozen run whose breakpoint state is trace index b (the
  // candidate, if b == trace.size()): entry a holds index b - D + 1 + a,
  // the frozen state is index b - D. Returns 0 on any mismatch.
  task automatic check_run(input int b, input logic [N-1:0] cand, output bit ok);
    logic [N-1:0] frozen;
    ok = 1;
    for (int a = 0; a < CC; a++) read_entry(a, ent[a]);
    for (int a = 0; a < CC; a++) begin
      int idx;
      idx = b - D + 1 + a;
      if (idx >= 0 && idx < trace.size()) ok &= (ent[a] == trace[idx]);
      else if (idx == trace.size() && b == trace.size()) ok &= (ent[a] == cand);
    end
    if (b - D >= 0) begin
      read_state(frozen);
      n_test_state++;
      ok &= (frozen == trace[b - D]);
    end else n_blind++;
  endtask

  logic [N-1:0] bp_mask;

  initial begin
    logic [N-1:0] prev, rb, sig, cand;
    logic [N-1:0] cands [$];
    logic [31:0] r, n_new;
    bit froze, ok, is_decoy, good;
    bit hold_b;
    core_t c0;

    wr_en = 0; addr = '0; wdata = '0;
    bp_mask = '0;
    for (int i = 0; i < N; i++) if ((i % CORE) < 8 || (i % CORE) == 32 || (i % CORE) == 33) bp_mask[i] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- crash run, mode 3: the crash state is entry D-1, its
    // predecessor entry D; the frozen state is D cycles past the crash
    set_ctrl(MODE_EXT, 1'b0);
    run(froze, prev);
    chk(froze, "crash run stops");
    n_mode_ext++;
    for (int a = 0; a < CC; a++) read_entry(a, ent[a]);
    c0 = ent[D-1][CORE-1:0];
    chk(c0.pc == 8'd7 && c0.iter == 8'd3 && c0.stall == 2'd0, "entry D-1 is the crash state");
    chk(!crash, "the frozen state lies past the crash");
    trace.push_back(ent[D-1]);
    sig = ent[D];

    hold_b = 1'b1;
    for (int step = 1; step <= STEPS; step++) begin
      logic x;
      bp_mode_e m_count, m_conf;
      bit done;
      x = !hold_b;
      cand = sig;
      cands.delete();
      cands.push_back(sig);
      cand[7:0] = 8'd200;
      for (int i = CORE; i < N; i++) if ((i % CORE) < 8) cand[i] = cand[i % CORE] ^ (((i / CORE) % 2) == 1);
      if ($urandom_range(1, 0)) cands.push_front(cand); else cands.push_back(cand);
      m_count = (step == 1) ? MODE_EXT : (hold_b ? MODE_B : MODE_A);
      m_conf  = x ? MODE_B : MODE_A;
      done = 0;
      for (int ci = 0; ci < cands.size() && !done; ci++) begin
        is_decoy = (cands[ci] != sig);
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
          // breakpoint state: the crash (step 1) or trace[step-1]
          check_run(step - 1, cands[ci], good);
          if (!good) begin n_spurious++; continue; end
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
        ok = 0;
        for (int attempt = 0; attempt < 20 && !ok; attempt++) begin
          load_bp(!x, '0, '0, 32'd1, m_conf);
          set_ctrl(m_conf, x);
          wr(R_CNT_TARGET, n_new);
          run(froze, prev);
          if (!froze) begin n_timeout++; continue; end
          if (x) n_mode_b++; else n_mode_a++;
          check_run(step, cands[ci], good);
          if (!good) begin n_spurious++; continue; end
          sig = ent[D];
          ok = 1;
        end
        chk(ok, "confirm run reached the candidate");
        if (ok) begin
          trace.push_back(cands[ci]);
          load_bp(x, cands[ci], bp_mask, n_new, m_conf);
          hold_b = x;
          done = 1;
        end
      end
      chk(done, "a predecessor was confirmed");
      if (!done) break;
    end

    chk(trace.size() == STEPS + 1, "trace length");
    for (int k = 1; k < trace.size(); k++) begin
      core_t older, newer;
      older = trace[k][CORE-1:0];
      newer = trace[k-1][CORE-1:0];
      chk(expand(older) == trace[k], "trace state is a consistent model state");
      chk(succ(older, 1'b0) == newer || succ(older, 1'b1) == newer, "trace step is a model transition");
    end
    $write("trace pc sequence back from the crash:");
    foreach (trace[k]) $write(" %0d", trace[k][7:0]);
    $display("");
    $display("mode1=%0d mode2=%0d mode3=%0d temporal=%0d spurious=%0d timeouts=%0d decoys=%0d nd_runs=%0d",
             n_mode_a, n_mode_b, n_mode_ext, n_temporal, n_spurious, n_timeout, n_decoy_rejected, n_nd_runs);
    $display("blind_spot_runs=%0d test_state_checks=%0d ham_zero=%0d ham_nonzero=%0d",
             n_blind, n_test_state, n_ham_zero, n_ham_nonzero);
    chk(n_mode_a > 0, "mechanism: mode 1 breakpoint");
    chk(n_mode_b > 0, "mechanism: mode 2 breakpoint");
    chk(n_mode_ext > 0, "mechanism: mode 3 breakpoint");
    chk(n_temporal > 0, "mechanism: temporal false matches counted past");
    chk(n_spurious > 0, "mechanism: spurious run caught");
    chk(n_timeout > 0, "mechanism: timeout");
    chk(n_decoy_rejected > 0, "mechanism: wrong candidate rejected");
    chk(n_nd_runs > 0, "mechanism: non-deterministic run");
    chk(n_blind > 0, "mechanism: blind-spot run");
    chk(n_test_state > 0, "mechanism: frozen state checked against the test state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
