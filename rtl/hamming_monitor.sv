// hamming_monitor: measures how close a run comes to the programmed
// breakpoint state.
//
// Every cycle in which `enable` is high it counts the bits in which the
// current state differs from the target state (only bits whose mask bit is 1
// are counted): the Hamming value. It keeps the smallest Hamming value of
// the run in min_ham and, each time a strictly smaller value is seen, copies
// the current state into the Hamming state register, which therefore ends
// the run holding the first state closest to the target. A min_ham of 0
// means the run passed through the target state. `clear` starts a new run
// (min_ham to all ones).
//
// Timing: ham is combinational; min_ham and ham_state update at the clock
// edge after the state is seen.
//
// This is a measurement aid for choosing breakpoint bits, not part of the
// breakpoint path. Counting, minimum tracking and the state copy follow the
// described measurement circuit; the mask, the strict "<" and the widths are
// this design's choices.
module hamming_monitor #(
  parameter int unsigned W  = 3007,
  localparam int unsigned HW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  logic [W-1:0]  state_bits,
  input  logic [W-1:0]  target_bits,
  input  logic [W-1:0]  mask_bits,
  output logic [HW-1:0] ham,
  output logic [HW-1:0] min_ham,
  output logic [W-1:0]  ham_state
);
  logic [W-1:0] diff;
  assign diff = (state_bits ^ target_bits) & mask_bits;

  always_comb begin
    ham = '0;
    for (int unsigned i = 0; i < W; i++) ham += HW'(diff[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_ham   <= '1;
      ham_state <= '0;
    end else if (clear) begin
      min_ham   <= '1;
    end else if (enable && ham < min_ham) begin
      min_ham   <= ham;
      ham_state <= state_bits;
    end
  end

endmodule
