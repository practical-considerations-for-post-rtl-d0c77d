// tb_signature_collection: self-checking test of signature_collection.
//
// A 5-deep and a 1-deep buffer record a random signature stream. At a
// random cycle `stop` rises and stays high; the testbench, which kept its
// own list of the signatures written, then reads every age and compares it
// with the newest-first history, checks that nothing more is written while
// stopped and that `filled` is right, including runs shorter than the depth.
module tb_signature_collection;
  localparam int unsigned S = 12;
  localparam int unsigned C = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, stop;
  logic [S-1:0] sig;
  logic [2:0] age5;
  logic [0:0] age1;
  logic [S-1:0] rd5, rd1;
  logic [3:0] filled5;
  logic [1:0] filled1;
  int checks = 0, failures = 0;

  signature_collection #(.S_WIDTH(S), .C_CYCLES(C)) u5 (
    .clk, .rst_n, .clear, .stop, .sig_in(sig), .rd_age(age5), .rd_data(rd5), .filled(filled5));
  signature_collection #(.S_WIDTH(S), .C_CYCLES(1)) u1 (
    .clk, .rst_n, .clear, .stop, .sig_in(sig), .rd_age(age1), .rd_data(rd1), .filled(filled1));

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
    logic [S-1:0] hist [$];
    int len;
    clear = 0; stop = 0; sig = '0; age5 = '0; age1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      clear = 1'b1; stop = 1'b0;
      @(negedge clk);
      clear = 1'b0;
      hist.delete();
      len = (run % 3 == 0) ? $urandom_range(4, 0) : $urandom_range(40, 5);
      for (int c = 0; c < len; c++) begin
        sig = S'($urandom);
        hist.push_front(sig);
        @(negedge clk);
      end
      stop = 1'b1;
      for (int c = 0; c < 3; c++) begin
        sig = S'($urandom);          // must not be recorded
        @(negedge clk);
      end
      chk(32'(filled5) == ((len < C) ? len : C), "filled (5 deep)");
      chk(32'(filled1) == ((len < 1) ? len : 1), "filled (1 deep)");
      for (int a = 0; a < C; a++) begin
        age5 = 3'(a);
        #1;
        if (a < len) chk(rd5 == hist[a], "entry by age (5 deep)");
      end
      if (len > 0) chk(rd1 == hist[0], "entry (1 deep)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
