// tb_sig_schemes: runs backspace_debug_top at small sizes with the two
// signature schemes that have logic of their own (hash and concentrator),
// with several cycles of signature history and with the breakpoint pipeline
// and the distribution stages switched on. The work is done by
// sig_scheme_run; this module adds the clock, the watchdog and the result.
module tb_sig_schemes;
  import bs_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int ch_h, fl_h, ch_c, fl_c;
  logic done_h, done_c;

  sig_scheme_run #(.SCHEME(SIG_HASH), .N_MON(100), .S_WIDTH(16), .C_CYCLES(4),
                   .PIPE(1'b1), .DIST_STAGES(1), .PPM(150000), .SEED(7)) u_hash (
    .clk, .checks(ch_h), .failures(fl_h), .done(done_h));
  sig_scheme_run #(.SCHEME(SIG_CONC), .N_MON(40), .S_WIDTH(8), .C_CYCLES(3),
                   .PIPE(1'b0), .DIST_STAGES(2)) u_conc (
    .clk, .checks(ch_c), .failures(fl_c), .done(done_c));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch_h + ch_c, fl_h + fl_c + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done_h && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", ch_h + ch_c, fl_h + fl_c);
    $finish;
  end
endmodule
