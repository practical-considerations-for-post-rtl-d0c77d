// hash_signature: signature creation by a universal hash function.
//
// The hash is a fixed 0/1 matrix with M rows (signature bits) and N columns
// (monitored state bits). Signature bit r is the XOR of the state bits whose
// column has a one in row r; a row with no ones gives 0. The XOR of the
// selected bits is left to synthesis as a tree of 2-input XOR gates.
//
// The matrix is either given explicitly (EXPLICIT = 1, MATRIX[r][c]) or drawn
// at elaboration time from a pseudo-random function of SEED, row and column,
// with each entry one with probability ONES_PPM per million (15000 = 1.5 %).
// Changing SEED gives another member of the hash family.
//
// Timing: purely combinational.
//
// The matrix form and the 1.5 % density follow the described hash; the
// generator function and the explicit-matrix option are this design's
// choices. The default output width, 281, is the signature width of the
// hash experiment the design is compared with.
module hash_signature
  import bs_pkg::*;
#(
  parameter int unsigned N        = 3007,
  parameter int unsigned M        = 281,
  parameter int unsigned ONES_PPM = 15000,
  parameter int unsigned SEED     = 1,
  parameter bit          EXPLICIT = 1'b0,
  parameter logic [M-1:0][N-1:0] MATRIX = '0
) (
  input  logic [N-1:0] state_bits,
  output logic [M-1:0] signature
);
  function automatic logic [N-1:0] make_row(input int unsigned r);
    logic [N-1:0] row;
    for (int unsigned c = 0; c < N; c++) begin
      row[c] = EXPLICIT ? MATRIX[r][c] : hash_entry(SEED, r, c, ONES_PPM);
    end
    return row;
  endfunction

  for (genvar r = 0; r < M; r++) begin : g_row
    localparam logic [N-1:0] ROW = make_row(r);
    assign signature[r] = ^(state_bits & ROW);
  end

endmodule
