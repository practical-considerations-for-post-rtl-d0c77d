// tb_concentrator: self-checking test of concentrator.
//
// A coarse-grained instance (N = 41 sets of K = 8 bits, M = 8 outputs) and a
// bit-level one (N = 27, M = 4, K = 1). For each trial the testbench picks
// up to M inputs, works out a configuration with its own routing procedure
// (at every level: pairs with both inputs wanted go one up, one down; pairs
// with one wanted input send it to the less loaded half), shifts it in
// serially, and checks that every wanted input appears on an output. The
// coarse instance carries a distinct 8-bit tag on each input set, so the
// check is exact; the bit-level one drives ones on the wanted inputs only
// and checks the number of ones at the outputs.
module tb_concentrator;
  import bs_pkg::*;
  localparam int unsigned NA = 41, MA = 8, KA = 8;
  localparam int unsigned NB = 27, MB = 4, KB = 1;
  localparam int unsigned CWA = conc_cfg_w(NA, MA);
  localparam int unsigned CWB = conc_cfg_w(NB, MB);

  logic clk = 1'b0, rst_n = 1'b0;
  logic sh_a, in_a, out_a, sh_b, in_b, out_b;
  logic [NA*KA-1:0] st_a;
  logic [MA*KA-1:0] sig_a;
  logic [NB*KB-1:0] st_b;
  logic [MB*KB-1:0] sig_b;
  int checks = 0, failures = 0;

  concentrator #(.N(NA), .M(MA), .K(KA)) ua (
    .clk, .rst_n, .cfg_shift(sh_a), .cfg_in(in_a), .cfg_out(out_a), .state_bits(st_a), .signature(sig_a));
  concentrator #(.N(NB), .M(MB), .K(KB)) ub (
    .clk, .rst_n, .cfg_shift(sh_b), .cfg_in(in_b), .cfg_out(out_b), .state_bits(st_b), .signature(sig_b));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit cfg [4096];

  // Routing procedure, written from the construction rules.
  function automatic void route(int n, int m, int sel[$], int off);
    int n2, h, nx, subw, selw, upc, loc;
    int up[$], lo[$];
    bit want [];
    if (n <= m) return;
    if (m <= 2) begin
      selw = (n > 1) ? $clog2(n) : 1;
      // unused outputs pick an input that is not wanted
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

  function automatic void pick(int n, int m, ref int sel[$]);
    int k;
    bit used [];
    used = new[n];
    sel.delete();
    k = $urandom_range(m, 1);
    while (sel.size() < k) begin
      int x;
      x = $urandom_range(n - 1, 0);
      if (!used[x]) begin used[x] = 1'b1; sel.push_back(x); end
    end
  endfunction

  initial begin
    int sel[$];
    sh_a = 0; in_a = 0; sh_b = 0; in_b = 0; st_a = '0; st_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 150; t++) begin
      // coarse-grained instance
      pick(NA, MA, sel);
      foreach (cfg[i]) cfg[i] = 1'b0;
      route(NA, MA, sel, 0);
      for (int i = 0; i < CWA; i++) begin
        sh_a = 1'b1; in_a = cfg[i];
        @(negedge clk);
      end
      sh_a = 1'b0;
      for (int j = 0; j < NA; j++) st_a[j*KA +: KA] = KA'(j + 1);
      #1;
      foreach (sel[s]) begin
        bit found;
        found = 0;
        for (int o = 0; o < MA; o++) if (sig_a[o*KA +: KA] == KA'(sel[s] + 1)) found = 1;
        chk(found, "coarse: wanted set routed to an output");
      end
      // bit-level instance
      pick(NB, MB, sel);
      foreach (cfg[i]) cfg[i] = 1'b0;
      route(NB, MB, sel, 0);
      for (int i = 0; i < CWB; i++) begin
        sh_b = 1'b1; in_b = cfg[i];
        @(negedge clk);
      end
      sh_b = 1'b0;
      st_b = '0;
      foreach (sel[s]) st_b[sel[s]] = 1'b1;
      #1;
      chk($countones(sig_b) == sel.size(), "bit-level: wanted bits routed");
      // the chain passes the configuration through
      chk(out_b == cfg[0], "configuration chain output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
