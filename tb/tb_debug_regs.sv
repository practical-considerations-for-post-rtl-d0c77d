// tb_debug_regs: self-checking test of debug_regs.
//
// Drives the host port and checks: read-back of every writable register;
// the one-hot breakpoint write select, data and mask reaching the outputs;
// the one-cycle clear and counter-match write strobes; mode and circuit
// select from the control register (reset mode 3); word reads of the state,
// Hamming state, selected target and trace buffer picked by the one-hot
// selects; the status register; and the cycle counter, which runs until
// freeze and restarts on clear.
module tb_debug_regs;
  import bs_pkg::*;
  localparam int unsigned W = 150, S = 100, C = 4;
  localparam int unsigned NW = (W + 63) / 64;
  localparam int unsigned HW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [4:0] addr;
  logic [31:0] wdata, rdata;
  bp_mode_e mode;
  logic sel_b, ctw, clear;
  logic [NW-1:0] bp_wsel;
  logic [63:0] bp_wdata, mask_wdata;
  logic [CNT_W-1:0] ctd;
  logic [1:0] age;
  logic freeze, hit, da, db;
  logic [CNT_W-1:0] cnt_sel, ct_sel;
  logic [W-1:0] tgt, st, hst;
  logic [HW-1:0] mn;
  logic [S-1:0] trace;
  int checks = 0, failures = 0;

  debug_regs #(.W(W), .S_WIDTH(S), .C_CYCLES(C)) u (
    .clk, .rst_n, .wr_en, .addr, .wdata, .rdata, .mode, .sel_b, .bp_wsel, .bp_wdata, .mask_wdata,
    .cnt_target_we(ctw), .cnt_target_wdata(ctd), .clear, .trace_age(age),
    .freeze, .bp_hit(hit), .delayed_a(da), .delayed_b(db), .count_sel(cnt_sel),
    .cnt_target_sel(ct_sel), .target_sel(tgt), .state_bits(st), .ham_state(hst), .min_ham(mn),
    .trace_data(trace));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  function automatic logic [63:0] word_of(input logic [W-1:0] v, input int w);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 64; i++) if (w*64 + i < W) r[i] = v[w*64 + i];
    return r;
  endfunction

  initial begin
    logic [63:0] x;
    logic [31:0] c0, c1;
    logic [31:0] rv [4];
    wr_en = 0; addr = '0; wdata = '0; freeze = 0; hit = 0; da = 0; db = 0;
    cnt_sel = 32'd77; ct_sel = 32'd5; mn = HW'(9);
    tgt = {$urandom, $urandom, $urandom, $urandom, $urandom};
    st  = {$urandom, $urandom, $urandom, $urandom, $urandom};
    hst = {$urandom, $urandom, $urandom, $urandom, $urandom};
    trace = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(mode == MODE_EXT && sel_b == 1'b0, "reset mode 3, circuit A");
    // control register
    wr(R_CTRL, 32'h5);
    chk(mode == MODE_A && sel_b == 1'b1, "mode / select from control");
    rd(R_CTRL, rv[0]);
    chk(rv[0] == 32'h5, "control read-back");
    // breakpoint load path
    wr(R_BPDATA_LO, 32'hDEAD_BEEF); wr(R_BPDATA_HI, 32'h0123_4567);
    wr(R_MASK_LO, 32'hFFFF_0000);   wr(R_MASK_HI, 32'h0000_FFFF);
    chk(bp_wsel == '0, "write select idle");
    wr(R_BPWSEL_LO, 32'h2);
    chk(bp_wsel == NW'(2) && bp_wdata == 64'h0123_4567_DEAD_BEEF && mask_wdata == 64'h0000_FFFF_FFFF_0000,
        "breakpoint word write");
    rd(R_BPDATA_LO, rv[0]);
    rd(R_MASK_HI, rv[1]);
    rd(R_BPWSEL_LO, rv[2]);
    chk(rv[0] == 32'hDEAD_BEEF && rv[1] == 32'h0000_FFFF && rv[2] == 32'h2,
        "load registers read-back");
    wr(R_BPWSEL_LO, 32'h0);
    // strobes
    addr = R_CNT_TARGET; wdata = 32'd1234; wr_en = 1'b1;
    #1 chk(ctw && ctd == 32'd1234 && !clear, "counter match write strobe");
    @(negedge clk); wr_en = 1'b0;
    #1 chk(!ctw, "strobe one cycle");
    addr = R_RESET_BP; wdata = 32'd1; wr_en = 1'b1;
    #1 chk(clear, "clear strobe");
    @(negedge clk); wr_en = 1'b0;
    #1 chk(!clear, "clear one cycle");
    // observed values
    rd(R_CNT_READ, rv[0]);
    rd(R_CNT_TARGET, rv[1]);
    rd(R_MIN_HAM, rv[2]);
    chk(rv[0] == 32'd77 && rv[1] == 32'd5 && rv[2] == 32'd9,
        "counter / minimum reads");
    hit = 1; db = 1; freeze = 0; da = 0;
    rd(R_BP_SIGNAL, rv[0]);
    chk(rv[0] == 32'b0101, "status register");
    // word reads picked by one-hot selects
    for (int w = 0; w < NW; w++) begin
      wr(w < 32 ? R_STSEL_LO : R_STSEL_HI, 32'(1) << (w % 32));
      x = word_of(st, w);
      rd(R_STATE_LO, rv[0]);
      rd(R_STATE_HI, rv[1]);
      chk(rv[0] == x[31:0] && rv[1] == x[63:32], "state word");
      x = word_of(hst, w);
      rd(R_HAM_LO, rv[0]);
      rd(R_HAM_HI, rv[1]);
      chk(rv[0] == x[31:0] && rv[1] == x[63:32], "Hamming state word");
      wr(w < 32 ? R_STSEL_LO : R_STSEL_HI, 32'(0));
      wr(w < 32 ? R_RDSEL_LO : R_RDSEL_HI, 32'(1) << (w % 32));
      x = word_of(tgt, w);
      rd(R_BPREAD_LO, rv[0]);
      rd(R_BPREAD_HI, rv[1]);
      chk(rv[0] == x[31:0] && rv[1] == x[63:32], "target word");
      x = word_of(W'(trace), w);
      rd(R_TRACE_LO, rv[0]);
      rd(R_TRACE_HI, rv[1]);
      chk(rv[0] == x[31:0] && rv[1] == x[63:32], "trace word");
      wr(w < 32 ? R_RDSEL_LO : R_RDSEL_HI, 32'(0));
    end
    wr(R_TRACE_ADDR, 32'd3);
    rd(R_TRACE_ADDR, rv[0]);
    chk(age == 2'd3 && rv[0] == 32'd3, "trace age");
    // cycle counter
    wr(R_RESET_BP, 32'd1);
    rd(R_CYC_LO, c0);
    repeat (10) @(negedge clk);
    rd(R_CYC_LO, rv[0]);
    c1 = rv[0];
    rd(R_CYC_LO2, rv[0]);
    rd(R_CYC_HI, rv[1]);
    chk(c1 - c0 == 10 && rv[0] == c1 && rv[1] == 0, "cycle counter runs");
    freeze = 1'b1;
    @(negedge clk);
    rd(R_CYC_LO, c0);
    repeat (5) @(negedge clk);
    rd(R_CYC_LO, rv[0]);
    chk(rv[0] == c0, "cycle counter stops on freeze");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
