// tb_two_partial_breakpoint: self-checking test of two_partial_breakpoint.
//
// Three instances (PIPE/DIST_STAGES = 0/0, 1/0 and 1/2) see the same random
// state stream over a 6-bit state, so partial matches are frequent. Each
// run programs the targets of A and B (writes steered by sel_b), the counter
// match registers and a mode, clears, and lets the stream run. Checked:
//  * a cycle-level reference of the sticky breakpoint, counters and delayed
//    flags, compared every cycle;
//  * spec-level rules from the state history alone: in mode 1 the breakpoint
//    state equals A's target and the state before it equals B's target, and
//    it is the cnt_target_a-th occurrence of A's target in the run; mode 2
//    the same with A and B exchanged; mode 3 stops on the external input;
//  * the freeze output rises PIPE + DIST_STAGES cycles after the breakpoint
//    state.
module tb_two_partial_breakpoint;
  import bs_pkg::*;
  localparam int unsigned W  = 6;
  localparam int unsigned WW = 4;
  localparam int unsigned NW = (W + WW - 1) / WW;
  localparam int NI = 3;
  localparam int PIPES [NI] = '{0, 1, 1};
  localparam int DISTS [NI] = '{0, 0, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] st;
  logic ext;
  bp_mode_e mode;
  logic sel_b, ctw, clear;
  logic [NW-1:0] wsel;
  logic [WW-1:0] wdt, wdm;
  logic [CNT_W-1:0] ctd;
  int checks = 0, failures = 0;
  int n_mode [4];
  int n_temporal = 0;

  logic hit [NI], now [NI], frz [NI], da [NI], db [NI];
  logic [CNT_W-1:0] ca [NI], cb [NI];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    logic [CNT_W-1:0] cta, ctb;
    logic [W-1:0] ta, tb_, ma, mb;
    logic pa, pb;
    two_partial_breakpoint #(.W(W), .WORD_W(WW), .GROUP_W(4), .PIPE(PIPES[i] == 1),
                             .DIST_STAGES(DISTS[i])) u (
      .clk, .rst_n, .state_bits(st), .ext_bp(ext), .mode, .sel_b, .wsel,
      .wdata_target(wdt), .wdata_mask(wdm), .cnt_target_we(ctw), .cnt_target_wdata(ctd),
      .clear, .bp_hit(hit[i]), .bp_now(now[i]), .freeze(frz[i]),
      .pmatch_a(pa), .pmatch_b(pb), .delayed_a(da[i]), .delayed_b(db[i]),
      .count_a(ca[i]), .count_b(cb[i]), .cnt_target_a(cta), .cnt_target_b(ctb),
      .target_a(ta), .target_b(tb_), .mask_a(ma), .mask_b(mb));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(input logic b, input logic [W-1:0] t, input logic [W-1:0] m,
                      input logic [CNT_W-1:0] n);
    sel_b = b;
    for (int w = 0; w < NW; w++) begin
      wsel = '0; wsel[w] = 1'b1;
      wdt = WW'(t >> (w * WW));
      wdm = WW'(m >> (w * WW));
      @(negedge clk);
    end
    wsel = '0;
    ctd = n; ctw = 1'b1;
    @(negedge clk);
    ctw = 1'b0;
  endtask

  initial begin
    logic [W-1:0] hist [$];
    logic [W-1:0] ta, tbv;
    logic [CNT_W-1:0] na, nb;
    logic r_hit [NI], r_dly_a [NI], r_dly_b [NI];
    logic [CNT_W-1:0] r_ca [NI], r_cb [NI];
    int t_bp [NI];
    logic [W-1:0] st_prev;
    logic ext_prev;
    logic pm_a_c, pm_b_c, pm_a_p, pm_b_p;
    st = '0; ext = 0; mode = MODE_EXT; sel_b = 0; ctw = 0; clear = 0; wsel = '0;
    wdt = '0; wdm = '0; ctd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int run = 0; run < 240; run++) begin
      ta = W'($urandom); tbv = W'($urandom);
      na = $urandom_range(3, 1); nb = $urandom_range(3, 1);
      load(1'b0, ta, '1, na);
      load(1'b1, tbv, '1, nb);
      mode = bp_mode_e'(run % 4);
      clear = 1'b1; ext = 1'b0;
      // the state seen during clear matches neither target (it would be
      // counted by a pipelined comparator one cycle later)
      do st = W'($urandom); while (st == ta || st == tbv);
      @(negedge clk);
      clear = 1'b0;
      for (int i = 0; i < NI; i++) begin
        r_hit[i] = 0; r_dly_a[i] = 0; r_dly_b[i] = 0; r_ca[i] = 0; r_cb[i] = 0; t_bp[i] = -1;
      end
      hist.delete();
      // pipelined-compare history (for PIPE = 1 instances): value of the
      // match one cycle ago; the register is not reset by clear.
      pm_a_p = (st == ta); pm_b_p = (st == tbv);
      st_prev = st; ext_prev = 1'b0;
      for (int c = 0; c < 300; c++) begin
        st = W'($urandom);
        if ($urandom_range(3, 0) == 0) st = ta;
        else if ($urandom_range(3, 0) == 0) st = tbv;
        ext = ($urandom_range(60, 0) == 0);
        #1;
        hist.push_back(st);
        pm_a_c = (st == ta); pm_b_c = (st == tbv);
        for (int i = 0; i < NI; i++) begin
          logic pa, pb, ea, ba, bb, bn;
          pa = PIPES[i] ? pm_a_p : pm_a_c;
          pb = PIPES[i] ? pm_b_p : pm_b_c;
          ea = PIPES[i] ? ext_prev : ext;
          ba = pa && (r_ca[i] + 1 >= na);
          bb = pb && (r_cb[i] + 1 >= nb);
          case (mode)
            MODE_A:  bn = ba && r_dly_b[i];
            MODE_B:  bn = bb && r_dly_a[i];
            default: bn = ea;
          endcase
          bn = bn && !r_hit[i];
          chk(now[i] == bn, "bp_now");
          chk(hit[i] == r_hit[i], "bp_hit");
          chk(ca[i] == r_ca[i] && cb[i] == r_cb[i], "counts");
          chk(da[i] == r_dly_a[i] && db[i] == r_dly_b[i], "delayed flags");
          if (bn) begin
            int bps;   // index in hist of the breakpoint state
            t_bp[i] = c;
            bps = c - PIPES[i];
            if (i == 0) n_mode[mode]++;
            if (mode == MODE_A || mode == MODE_B) begin
              logic [W-1:0] me, other;
              int occ;
              me = (mode == MODE_A) ? ta : tbv;
              other = (mode == MODE_A) ? tbv : ta;
              chk(bps >= 1 && hist[bps] == me, "breakpoint state is the active target");
              chk(bps >= 1 && hist[bps-1] == other, "previous state is the other target");
              // >= rule: the first occurrence numbered n or later that is
              // preceded by the other target
              occ = 0;
              for (int k = 0; k < bps; k++)
                if (hist[k] == me) begin
                  occ++;
                  chk(!(occ >= ((mode == MODE_A) ? na : nb) && k >= 1 && hist[k-1] == other),
                      "no earlier qualifying occurrence");
                end
              occ++;
              chk(occ >= ((mode == MODE_A) ? na : nb), "n-th occurrence or later");
              if (occ > 1 && i == 0) n_temporal++;
            end
          end
          // freeze timing
          if (t_bp[i] >= 0 && c >= t_bp[i] + DISTS[i])
            chk(frz[i] == 1'b1, "freeze after breakpoint");
          if (t_bp[i] < 0 || c < t_bp[i] + DISTS[i])
            chk(frz[i] == 1'b0, "no freeze before breakpoint");
          // reference update at the coming edge
          if (!r_hit[i]) begin
            if (pa) r_ca[i]++;
            if (pb) r_cb[i]++;
            if (!bn) begin r_dly_a[i] = pa; r_dly_b[i] = pb; end
          end
          if (bn) r_hit[i] = 1'b1;
        end
        pm_a_p = pm_a_c; pm_b_p = pm_b_c; ext_prev = ext;
        @(negedge clk);
      end
    end
    $display("breakpoints by mode: off=%0d A=%0d B=%0d ext=%0d temporal_skipped=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_temporal);
    chk(n_mode[1] > 5 && n_mode[2] > 5 && n_mode[3] > 5 && n_mode[0] > 5, "every mode broke");
    chk(n_temporal > 3, "breakpoints after temporal false matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
