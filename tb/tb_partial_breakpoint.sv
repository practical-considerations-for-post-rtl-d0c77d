// tb_partial_breakpoint: self-checking test of partial_breakpoint.
//
// The target and mask are loaded word by word through wsel, then read back.
// A random state stream (often equal to the target on the masked bits) is
// applied while clear, hold and stop_now are toggled now and then; a
// cycle-level reference of the described behaviour (n-th match breaks,
// counter counts hits until hold, delayed flag is last cycle's match) is
// kept here and compared with every output every cycle. Both PIPE = 1 and
// PIPE = 0 are covered by two instances.
module tb_partial_breakpoint;
  import bs_pkg::*;
  localparam int unsigned W  = 20;
  localparam int unsigned WW = 8;
  localparam int unsigned NW = (W + WW - 1) / WW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] st;
  logic [NW-1:0] wsel;
  logic [WW-1:0] wdt, wdm;
  logic ctw, clear, hold, stop_now;
  logic [CNT_W-1:0] ctd;
  int checks = 0, failures = 0, n_brk = 0, n_temporal = 0;

  logic pm [2], brk [2], dly [2];
  logic [CNT_W-1:0] cnt [2], ctq [2];
  logic [W-1:0] tq [2], mq [2];

  for (genvar p = 0; p < 2; p++) begin : g_dut
    partial_breakpoint #(.W(W), .WORD_W(WW), .GROUP_W(4), .PIPE(p == 1)) u (
      .clk, .rst_n, .state_bits(st), .wsel, .wdata_target(wdt), .wdata_mask(wdm),
      .cnt_target_we(ctw), .cnt_target_wdata(ctd), .clear, .hold, .stop_now,
      .pmatch(pm[p]), .brk(brk[p]), .delayed(dly[p]), .count(cnt[p]), .cnt_target(ctq[p]),
      .target_q(tq[p]), .mask_q(mq[p]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] tgt, msk;
  logic [CNT_W-1:0] ntarget;
  // reference state per instance
  logic r_pm [2];
  logic r_dly [2];
  logic [CNT_W-1:0] r_cnt [2];

  initial begin
    st = '0; wsel = '0; wdt = '0; wdm = '0; ctw = 0; ctd = '0; clear = 0; hold = 0; stop_now = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(ctq[0] == 1 && mq[0] == '1 && tq[0] == '0, "reset values");
    tgt = W'({$urandom, $urandom});
    msk = W'({$urandom, $urandom}) | W'(32'h0000_0F0F);
    for (int w = 0; w < NW; w++) begin
      wsel = '0; wsel[w] = 1'b1;
      wdt = WW'(tgt >> (w * WW));
      wdm = WW'(msk >> (w * WW));
      @(negedge clk);
    end
    wsel = '0;
    ntarget = 3;
    ctd = ntarget; ctw = 1'b1;
    @(negedge clk);
    ctw = 1'b0;
    for (int p = 0; p < 2; p++) begin
      chk(tq[p] == tgt && mq[p] == msk, "target/mask load");
      chk(ctq[p] == ntarget, "counter match register load");
      r_cnt[p] = '0; r_dly[p] = 1'b0;
    end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int p = 0; p < 2; p++) begin r_cnt[p] = '0; r_dly[p] = 1'b0; end
    r_pm[1] = ((st ^ tgt) & msk) == '0;
    for (int n = 0; n < 4000; n++) begin
      // new inputs for this cycle
      st = W'({$urandom, $urandom});
      if ($urandom_range(2, 0) == 0) st = (tgt & msk) | (st & ~msk);
      hold = ($urandom_range(15, 0) == 0);
      stop_now = ($urandom_range(15, 0) == 0);
      clear = ($urandom_range(40, 0) == 0);
      #1;
      r_pm[0] = ((st ^ tgt) & msk) == '0;
      for (int p = 0; p < 2; p++) begin
        logic eb;
        eb = r_pm[p] && ((r_cnt[p] + 1) >= ntarget);
        chk(pm[p] == r_pm[p], "pmatch");
        chk(brk[p] == eb, "brk");
        chk(dly[p] == r_dly[p], "delayed");
        chk(cnt[p] == r_cnt[p], "count");
        if (p == 0 && eb) begin
          n_brk++;
          if (r_cnt[p] > 0) n_temporal++;
        end
      end
      @(negedge clk);
      // reference update for the clock edge just taken
      for (int p = 0; p < 2; p++) begin
        if (clear) begin
          r_cnt[p] = '0; r_dly[p] = 1'b0;
        end else begin
          if (!hold && !stop_now) r_dly[p] = r_pm[p];
          if (r_pm[p] && !hold) r_cnt[p] = r_cnt[p] + 1;
        end
      end
      r_pm[1] = ((st ^ tgt) & msk) == '0;
    end
    // the n-th match rule was seen firing after earlier (temporal) matches
    chk(n_brk > 10 && n_temporal > 10, "breakpoints after counted matches seen");
    $display("breakpoints=%0d after_earlier_matches=%0d", n_brk, n_temporal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
