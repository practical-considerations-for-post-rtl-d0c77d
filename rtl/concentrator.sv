// concentrator: programmable signature creation by an (N, M) concentrator.
//
// N monitored state bits (or N sets of K bits for the coarse-grained
// version) enter a concentrator network (conc_net) that routes any M of them
// to the M signature outputs (M sets of K bits). Which inputs are routed is
// set at run time by a configuration register with one flip-flop per
// crossbar / multiplexer select line. The host loads it serially: while
// cfg_shift is high, cfg_in enters at the top bit and every bit moves one
// place down, so after CFG_W cycles the first bit shifted in sits in bit 0.
// cfg_out returns bit 0 so the register can be part of a longer scan chain.
// The layout of the configuration bits is described in conc_net.
//
// Interface: state_bits is N*K bits, set j being bits [j*K +: K]; signature
// is M*K bits laid out the same way.
//
// Timing: the signature is combinational in the state bits; the configuration
// takes effect the cycle after it is shifted in.
//
// The recursive construction, the per-select configuration flip-flop and the
// coarse-grained generalisation follow the described concentrator. Serial
// loading, the power-of-two M and the default sizes are this design's
// choices: N is the prototype's 3007 state bits and M = 1024, the power of
// two nearest below the 40 % signature width (1203 bits) used there.
module concentrator
  import bs_pkg::*;
#(
  parameter int unsigned N = 3007,
  parameter int unsigned M = 1024,
  parameter int unsigned K = 1,
  localparam int unsigned CFG_W  = conc_cfg_w(N, M),
  localparam int unsigned CFG_WP = (CFG_W > 0) ? CFG_W : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_shift,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N*K-1:0]   state_bits,
  output logic [M*K-1:0]   signature
);
  initial begin
    assert ((M & (M - 1)) == 0)
      else $error("concentrator: M must be a power of two");
  end

  logic [CFG_WP-1:0] cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cfg_q <= '0;
    else if (cfg_shift) cfg_q <= {cfg_in, cfg_q[CFG_WP-1:1]};
  end
  assign cfg_out = cfg_q[0];

  logic [N-1:0][K-1:0] in_sets;
  logic [M-1:0][K-1:0] out_sets;
  assign in_sets   = state_bits;
  assign signature = out_sets;

  conc_net #(.N(N), .M(M), .K(K)) u_net (
    .in_sets (in_sets),
    .cfg     (cfg_q),
    .out_sets(out_sets)
  );

endmodule
