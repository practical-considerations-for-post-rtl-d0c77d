// signature_collection: trace buffer holding the most recent C_CYCLES
// signatures of the circuit under debug.
//
// Every clock cycle in which `stop` is low, the current signature is written
// at the write pointer and the pointer advances (modulo C_CYCLES), so the
// oldest entry is always the one overwritten. Once the breakpoint arrives
// (`stop` high) writing and the pointer halt and the buffer keeps the last
// C_CYCLES signatures before the stop. The host then reads them by age:
// rd_age = 0 is the newest entry, rd_age = C_CYCLES-1 the oldest. `filled`
// counts the entries written since `clear`, saturating at C_CYCLES, so the
// host knows how many are valid.
//
// Storage is a flip-flop/RAM array, one write port, one asynchronous read
// port. With C_CYCLES = 1 (the prototype's configuration) the buffer is a
// single signature register and the pointer is constant.
//
// Timing: the signature present in the cycle before stop rises is the last
// one stored; reads are combinational.
//
// The circular buffer, its write enable and its address register follow the
// described circuit; read-by-age and the fill counter are this design's
// choices.
module signature_collection #(
  parameter int unsigned S_WIDTH  = 3007,
  parameter int unsigned C_CYCLES = 1,
  localparam int unsigned AW      = (C_CYCLES > 1) ? $clog2(C_CYCLES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               stop,
  input  logic [S_WIDTH-1:0] sig_in,
  input  logic [AW-1:0]      rd_age,
  output logic [S_WIDTH-1:0] rd_data,
  output logic [AW:0]        filled
);
  logic [S_WIDTH-1:0] mem [C_CYCLES];
  logic [AW-1:0]      wr_ptr;

  function automatic logic [AW-1:0] wrap_inc(input logic [AW-1:0] p);
    return (32'(p) == C_CYCLES - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      filled <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      filled <= '0;
    end else if (!stop) begin
      wr_ptr <= wrap_inc(wr_ptr);
      if (32'(filled) < C_CYCLES) filled <= filled + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!stop) mem[wr_ptr] <= sig_in;
  end

  // Entry of age a sits at (wr_ptr - 1 - a) modulo C_CYCLES.
  logic [AW-1:0] rd_idx;
  if (C_CYCLES == 1) begin : g_one
    assign rd_idx = '0;
  end else begin : g_many
    logic [AW+1:0] sum;
    assign sum    = (AW+2)'(wr_ptr) + (AW+2)'(2 * C_CYCLES - 1) - (AW+2)'(rd_age);
    assign rd_idx = AW'(sum % (AW+2)'(C_CYCLES));
  end

  assign rd_data = mem[rd_idx];

endmodule
