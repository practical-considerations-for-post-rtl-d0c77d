// sig_scheme_run: test harness used by tb_sig_schemes. It instantiates
// backspace_debug_top with a given signature scheme at a small size, drives
// random state bits (held while freeze is high), stops the chip through the
// external breakpoint (mode 3) and reads the trace buffer through the host
// registers. Each trace entry is compared with the signature the testbench
// computes itself from the recorded state history:
//  * SIG_HASH: parity of the state bits selected by each matrix row, the
//    matrix being the seeded pseudo-random one defined in bs_pkg;
//  * SIG_CONC: the testbench routes S_WIDTH chosen state bits with its own
//    routing procedure, shifts the configuration in, and checks that the
//    number of ones in each entry equals that of the chosen bits.
// It also checks that the frozen state comes PIPE + DIST_STAGES cycles after
// the state on which the breakpoint fired. Results go out on checks,
// failures and done.
module sig_scheme_run
  import bs_pkg::*;
#(
  parameter sig_scheme_e SCHEME      = SIG_HASH,
  parameter int unsigned N_MON       = 100,
  parameter int unsigned S_WIDTH     = 16,
  parameter int unsigned C_CYCLES    = 4,
  parameter bit          PIPE        = 1'b1,
  parameter int unsigned DIST_STAGES = 1,
  parameter int unsigned PPM         = 150000,
  parameter int unsigned SEED        = 7,
  parameter int          RUNS        = 20
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned CW  = conc_cfg_w(N_MON, S_WIDTH);
  localparam int unsigned NWS = (S_WIDTH + 63) / 64;

  logic rst_n = 1'b0;
  logic [N_MON-1:0] state_bits = '0;
  logic ext_bp = 1'b0, freeze, bp_hit, wr_en = 1'b0;
  logic [4:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic cfg_shift = 1'b0, cfg_in = 1'b0, cfg_out;

  backspace_debug_top #(
    .N_MON(N_MON), .SIG_SCHEME(SCHEME), .S_WIDTH(S_WIDTH), .C_CYCLES(C_CYCLES),
    .PIPE(PIPE), .DIST_STAGES(DIST_STAGES), .GROUP_W(16), .HASH_SEED(SEED), .HASH_PPM(PPM)
  ) dut (
    .clk, .rst_n, .state_bits, .ext_bp, .freeze, .bp_hit,
    .wr_en, .addr, .wdata, .rdata,
    .conc_cfg_shift(cfg_shift), .conc_cfg_in(cfg_in), .conc_cfg_out(cfg_out));

  // freeze as the circuit under debug sees it at the clock edge
  logic fz_q = 1'b0;
  always_ff @(posedge clk) fz_q <= freeze;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (scheme %0d) at %0t", what, SCHEME, $time); end
  endtask

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    addr = a; wdata = d; wr_en = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic logic [S_WIDTH-1:0] hash_ref(input logic [N_MON-1:0] s);
    logic [S_WIDTH-1:0] h;
    for (int r = 0; r < S_WIDTH; r++) begin
      h[r] = 1'b0;
      for (int c = 0; c < N_MON; c++)
        if (hash_entry(SEED, r, c, PPM)) h[r] ^= s[c];
    end
    return h;
  endfunction

  // concentrator routing, from the construction rules (see tb_concentrator)
  bit cfg [];
  function automatic void route(int n, int m, int sel[$], int off);
    int n2, h, nx, subw, selw, upc, loc;
    int up[$], lo[$];
    bit want [];
    if (n <= m) return;
    if (m <= 2) begin
      selw = (n > 1) ? $clog2(n) : 1;
      for (int j = 0; j < m; j++) begin
        int x;
        if (j < sel.size()) x = sel[j];
        else begin
          x = 0;
          while (x < n && (x inside {sel})) x++;
        end
        for (int b = 0; b < selw; b++) cfg[off + j*selw + b] = x[b];
      end
      return;
    end
    n2 = n + (n % 2); h = n2 / 2; nx = h - 1; subw = conc_cfg_w(h, m / 2);
    want = new[n2];
    foreach (sel[j]) want[sel[j]] = 1'b1;
    upc = want[n2-2]; loc = want[n2-1];
    for (int i = 0; i < nx; i++) begin
      cfg[off + i] = 1'b0;
      if (want[2*i] && want[2*i+1]) begin up.push_back(i); lo.push_back(i); upc++; loc++; end
    end
    for (int i = 0; i < nx; i++) begin
      if (want[2*i] != want[2*i+1]) begin
        if (upc <= loc) begin cfg[off + i] = want[2*i+1]; up.push_back(i); upc++; end
        else            begin cfg[off + i] = want[2*i];   lo.push_back(i); loc++; end
      end
    end
    if (want[n2-2]) up.push_back(h - 1);
    if (want[n2-1]) lo.push_back(h - 1);
    route(h, m / 2, up, off + nx);
    route(h, m / 2, lo, off + nx + subw);
  endfunction

  initial begin
    logic [N_MON-1:0] hist [$];
    logic [N_MON-1:0] want_mask;
    logic [S_WIDTH-1:0] ent;
    logic [31:0] lo, hi;
    int sel[$];
    int trig, fz;
    checks = 0; failures = 0; done = 1'b0;
    cfg = new[CW + 1];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(R_CTRL, {29'd0, 1'b0, MODE_EXT});
    for (int run = 0; run < RUNS; run++) begin
      if (SCHEME == SIG_CONC) begin
        bit used [];
        used = new[N_MON];
        sel.delete();
        want_mask = '0;
        while (sel.size() < S_WIDTH) begin
          int x;
          x = $urandom_range(N_MON - 1, 0);
          if (!used[x]) begin used[x] = 1'b1; sel.push_back(x); want_mask[x] = 1'b1; end
        end
        foreach (cfg[i]) cfg[i] = 1'b0;
        route(N_MON, S_WIDTH, sel, 0);
        for (int i = 0; i < CW; i++) begin
          cfg_shift = 1'b1; cfg_in = cfg[i];
          @(negedge clk);
        end
        cfg_shift = 1'b0;
      end
      wr(R_RESET_BP, 32'd1);
      hist.delete();
      trig = C_CYCLES + $urandom_range(10, 0);
      fz = -1;
      for (int c = 0; c < trig + 20 && fz < 0; c++) begin
        for (int w = 0; w < N_MON; w += 32) state_bits[w +: 32] = $urandom;
        ext_bp = (c == trig);
        hist.push_back(state_bits);
        @(negedge clk);
        if (fz_q) fz = c;      // freeze was high at this clock edge: held
      end
      ext_bp = 1'b0;
      chk(fz >= 0, "chip froze");
      if (fz < 0) continue;
      repeat (2) @(negedge clk);
      chk(state_bits == hist[$], "state held while frozen");
      chk(fz == trig + int'(PIPE) + DIST_STAGES, "frozen state follows the trigger by the pipeline depth");
      for (int age = 0; age < C_CYCLES; age++) begin
        logic [N_MON-1:0] s;
        wr(R_TRACE_ADDR, age);
        for (int w = 0; w < NWS; w++) begin
          wr(R_RDSEL_LO, (w < 32) ? (32'd1 << w) : 32'd0);
          wr(R_RDSEL_HI, (w >= 32) ? (32'd1 << (w - 32)) : 32'd0);
          addr = R_TRACE_LO; #1 lo = rdata;
          addr = R_TRACE_HI; #1 hi = rdata;
          for (int i = 0; i < 64; i++) if (w*64 + i < S_WIDTH) ent[w*64+i] = (i < 32) ? lo[i] : hi[i-32];
        end
        s = hist[hist.size() - 2 - age];
        if (SCHEME == SIG_HASH)
          chk(ent == hash_ref(s), "trace entry is the hash of that earlier state");
        else
          chk($countones(ent) == $countones(s & want_mask), "trace entry carries the routed state bits");
      end
    end
    done = 1'b1;
  end
endmodule
