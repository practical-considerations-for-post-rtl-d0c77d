// cud_model: behavioural model of a circuit under debug, for testbenches.
//
// A tiny looping processor-like machine: a program counter pc (0..PLEN-1),
// an accumulator acc updated every instruction, an iteration counter iter
// incremented when pc wraps, a stall counter (every 4th instruction is a
// memory load that stalls 1 cycle) and a free-running 4-bit timer. Its 38
// core bits sit in state_bits[37:0] as {timer, stall, iter, acc, pc}; the
// remaining state bits are copies of core bits, every other copy inverted,
// standing for the wide datapath of a real design.
//
// Non-determinism: when extra_at = j >= 0, the j-th load of the run stalls
// one cycle longer (a slow memory access across clock domains). Afterwards
// the run goes through the same pc/acc/iter sequence but with the timer
// shifted, so its states differ from a normal run in a few timer bits.
//
// freeze holds every state bit (the debug hold / scan enable); crash is
// high in the state pc = CRASH_PC, iter = CRASH_ITER, stall = 0.
module cud_model #(
  parameter int unsigned N          = 3007,
  parameter int unsigned PLEN       = 12,
  parameter int unsigned CRASH_PC   = 7,
  parameter int unsigned CRASH_ITER = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         freeze,
  input  int           extra_at,
  output logic [N-1:0] state_bits,
  output logic         crash
);
  localparam int unsigned CORE = 38;

  logic [7:0]  pc, iter;
  logic [15:0] acc;
  logic [1:0]  stall;
  logic [3:0]  timer;
  int          loads;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; iter <= '0; acc <= 16'h1; stall <= '0; timer <= '0; loads <= 0;
    end else if (!freeze) begin
      timer <= timer + 4'd1;
      if (stall != 0) begin
        stall <= stall - 2'd1;
      end else begin
        acc <= acc * 16'd5 + 16'(pc) + 16'd1;
        if (pc % 4 == 3) begin
          stall <= (loads == extra_at) ? 2'd2 : 2'd1;
          loads <= loads + 1;
        end
        if (32'(pc) == PLEN - 1) begin
          pc   <= '0;
          iter <= iter + 8'd1;
        end else begin
          pc <= pc + 8'd1;
        end
      end
    end
  end

  logic [CORE-1:0] core;
  assign core = {timer, stall, iter, acc, pc};

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (i < CORE) state_bits[i] = core[i];
      else          state_bits[i] = core[(i - CORE) % CORE] ^ (((i / CORE) % 2) == 1);
    end
  end

  assign crash = (32'(pc) == CRASH_PC) && (32'(iter) == CRASH_ITER) && (stall == 0);

endmodule
