// tb_bp_comparator: self-checking test of bp_comparator.
//
// Two instances, one combinational (PIPE = 0) and one with the pipeline
// register (PIPE = 1), see the same random state, target and mask. Half of
// the states are made equal to the target on the masked bits so that matches
// are frequent. The expected result, "every masked bit equal", is computed
// here bit by bit and compared with the combinational output in the same
// cycle and with the pipelined output one cycle later.
module tb_bp_comparator;
  localparam int unsigned W = 37;
  localparam int unsigned G = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] st, tg, mk;
  logic m0, m1;
  int checks = 0, failures = 0, n_match = 0;

  bp_comparator #(.W(W), .GROUP_W(G), .PIPE(1'b0)) u0 (
    .clk, .rst_n, .state_bits(st), .target_bits(tg), .mask_bits(mk), .match(m0));
  bp_comparator #(.W(W), .GROUP_W(G), .PIPE(1'b1)) u1 (
    .clk, .rst_n, .state_bits(st), .target_bits(tg), .mask_bits(mk), .match(m1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_match(input logic [W-1:0] s, t, m);
    for (int i = 0; i < W; i++) if (m[i] && (s[i] != t[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    logic exp_prev;
    st = '0; tg = '0; mk = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    exp_prev = ref_match(st, tg, mk);
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      @(negedge clk);
      // pipelined output reflects the previous cycle's inputs
      checks++; if (m1 !== exp_prev) begin failures++; $display("PIPE mismatch at %0d", n); end
      tg = {$urandom, $urandom};
      mk = (n % 7 == 0) ? '1 : {$urandom, $urandom} | {$urandom, $urandom};
      st = {$urandom, $urandom};
      if ($urandom_range(1, 0) == 1) st = (tg & mk) | (st & ~mk);
      if (n % 11 == 0 && ref_match(st, tg, mk)) st[$urandom_range(W-1, 0)] ^= 1'b1;
      #1;
      exp_prev = ref_match(st, tg, mk);
      if (exp_prev) n_match++;
      checks++; if (m0 !== exp_prev) begin failures++; $display("COMB mismatch at %0d", n); end
    end
    if (n_match < 100) begin failures++; $display("too few matches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
