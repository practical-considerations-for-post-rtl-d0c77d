// tb_hash_signature: self-checking test of hash_signature.
//
// Instance 1 uses the 3 x 5 example matrix (rows 10100, 00110, 01011, the
// leftmost column being input 0) and checks all 32 input patterns against
// the XORs written out by hand: out0 = in0^in2, out1 = in2^in3,
// out2 = in1^in3^in4. Instance 2 uses a generated 16 x 200 matrix with
// 1.5 % ones: its output is checked against the XOR of the inputs selected
// by the generator function, and the number of ones in the matrix against
// the expected density.
module tb_hash_signature;
  import bs_pkg::*;
  localparam logic [2:0][4:0] EX = '{5'b11010, 5'b01100, 5'b00101};  // row r, bit c
  localparam int unsigned N2 = 200, M2 = 16, PPM = 15000, SEED = 7;

  logic [4:0] in1;
  logic [2:0] out1;
  logic [N2-1:0] in2;
  logic [M2-1:0] out2;
  int checks = 0, failures = 0;

  hash_signature #(.N(5), .M(3), .EXPLICIT(1'b1), .MATRIX(EX)) u1 (.state_bits(in1), .signature(out1));
  hash_signature #(.N(N2), .M(M2), .ONES_PPM(PPM), .SEED(SEED)) u2 (.state_bits(in2), .signature(out2));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ones;
    for (int v = 0; v < 32; v++) begin
      in1 = 5'(v);
      #1;
      chk(out1[0] == (in1[0] ^ in1[2]), "example row 1");
      chk(out1[1] == (in1[2] ^ in1[3]), "example row 2");
      chk(out1[2] == (in1[1] ^ in1[3] ^ in1[4]), "example row 3");
    end
    ones = 0;
    for (int r = 0; r < M2; r++)
      for (int c = 0; c < N2; c++) ones += hash_entry(SEED, r, c, PPM);
    $display("ones in %0d x %0d matrix: %0d", M2, N2, ones);
    chk(ones >= 20 && ones <= 90, "density near 1.5 %");
    for (int t = 0; t < 500; t++) begin
      in2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      for (int r = 0; r < M2; r++) begin
        logic x;
        x = 1'b0;
        for (int c = 0; c < N2; c++) if (hash_entry(SEED, r, c, PPM)) x ^= in2[c];
        chk(out2[r] == x, "generated matrix row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
