// bp_comparator: masked equality comparator of a breakpoint circuit.
//
// Each state bit is XORed with its target bit; a bit whose mask bit is 0 is
// ignored. The XOR results are ORed in groups of GROUP_W bits. With
// PIPE = 1 the group results are registered and a final OR combines them,
// so the compare is split over two clock cycles (one pipeline stage). With
// PIPE = 0 the whole compare is combinational. The output `match` is the
// complement of the final OR: it is 1 when every unmasked bit equals its
// target.
//
// Timing: match reflects the inputs of PIPE cycles earlier.
//
// The XOR / OR-tree / group register structure follows the described
// comparator and its one-stage pipelined form. The mask input is taken from
// the prototype's breakpoint mask register. The group width is this design's
// choice.
module bp_comparator #(
  parameter int unsigned W       = 3007,
  parameter int unsigned GROUP_W = 64,
  parameter bit          PIPE    = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] state_bits,
  input  logic [W-1:0] target_bits,
  input  logic [W-1:0] mask_bits,
  output logic         match
);
  localparam int unsigned NG = (W + GROUP_W - 1) / GROUP_W;

  logic [NG-1:0] grp_diff;   // combinational group mismatch
  logic [NG-1:0] grp_q;      // after the optional pipeline register

  always_comb begin
    grp_diff = '0;
    for (int unsigned i = 0; i < W; i++) begin
      grp_diff[i / GROUP_W] |= (state_bits[i] ^ target_bits[i]) & mask_bits[i];
    end
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) grp_q <= '1;       // no match until the first compare
      else        grp_q <= grp_diff;
    end
  end else begin : g_comb
    assign grp_q = grp_diff;
  end

  assign match = ~(|grp_q);

endmodule
