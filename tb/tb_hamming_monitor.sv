// tb_hamming_monitor: self-checking test of hamming_monitor.
//
// Random states near a random target (a few bits flipped) are applied with
// enable and clear toggled. The testbench counts differing masked bits
// itself, tracks the run minimum and the first state that reached it, and
// compares ham, min_ham and ham_state every cycle. Runs that pass through
// the target must end with min_ham = 0.
module tb_hamming_monitor;
  localparam int unsigned W  = 23;
  localparam int unsigned HW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en;
  logic [W-1:0] st, tg, mk, hs;
  logic [HW-1:0] ham, mn;
  int checks = 0, failures = 0, n_zero = 0;

  hamming_monitor #(.W(W)) u (
    .clk, .rst_n, .clear, .enable(en), .state_bits(st), .target_bits(tg), .mask_bits(mk),
    .ham, .min_ham(mn), .ham_state(hs));

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

  initial begin
    int r_min;
    logic [W-1:0] r_state;
    clear = 0; en = 0; st = '0; tg = '0; mk = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    r_min = (1 << HW) - 1; r_state = '0;
    for (int run = 0; run < 60; run++) begin
      tg = W'($urandom); mk = (run % 2) ? '1 : W'($urandom);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      r_min = (1 << HW) - 1;
      for (int c = 0; c < 50; c++) begin
        int d;
        st = tg;
        repeat ($urandom_range(6, 0)) st[$urandom_range(W-1, 0)] ^= 1'b1;
        en = ($urandom_range(7, 0) != 0);
        #1;
        d = $countones((st ^ tg) & mk);
        chk(ham == HW'(d), "hamming value");
        @(negedge clk);
        if (en && d < r_min) begin r_min = d; r_state = st; end
        chk(mn == HW'(r_min), "minimum");
        chk(hs == r_state, "hamming state register");
      end
      if (r_min == 0) n_zero++;
    end
    chk(n_zero > 10, "runs through the target seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
