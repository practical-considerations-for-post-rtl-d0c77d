// conc_net: combinational (N, M) concentrator network on K-bit sets, built
// recursively; used by `concentrator`, which holds its configuration.
//
// An (N, M) concentrator can route any M or fewer of its N inputs to its M
// outputs. N is first rounded up to N' (even) with a zero input. Inputs
// 2i and 2i+1 (i < N'/2 - 1) enter a 2x2 crossbar whose outputs go to two
// (N'/2, M/2) sub-concentrators, "upper" and "lower"; input N'-2 goes
// straight to the upper one and input N'-1 to the lower one. Upper outputs
// form out[0 .. M/2-1], lower outputs out[M/2 .. M-1]. The recursion stops
// when M <= 2 (each output is an N-input multiplexer with its own select)
// or when N <= M (input j wired to output j, remaining outputs 0).
//
// Configuration layout (cfg, LSB first): crossbar bits of this level
// (bit i = 1 crosses crossbar i: input 2i to lower, 2i+1 to upper), then the
// upper sub-network's bits, then the lower one's. In the multiplexer case,
// output j's select is the field of SELW bits starting at j*SELW.
//
// With K > 1 each input and output is a K-bit set and all K bits follow the
// same configuration (coarse-grained concentrator).
//
// Timing: combinational.
//
// The recursive crossbar construction follows the described concentrator; M
// must be a power of two here (so that the halves stay equal), and the
// multiplexer leaf replaces the sparse crossbar leaf, both choices of this
// design.
//
// Lint note: when this module is linted on its own as the top of the
// hierarchy, Verilator does not expand its instances of itself and reports
// out_sets as undriven and the sub-network inputs as unused. Under
// `concentrator` the recursion is elaborated and the warning does not appear.
module conc_net
  import bs_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 4,
  parameter int unsigned K = 1,
  localparam int unsigned CFGW  = conc_cfg_w(N, M),
  localparam int unsigned CFGWP = (CFGW > 0) ? CFGW : 1
) (
  input  logic [N-1:0][K-1:0] in_sets,
  input  logic [CFGWP-1:0]    cfg,
  output logic [M-1:0][K-1:0] out_sets
);
  if (N <= M) begin : g_wire
    always_comb begin
      out_sets = '0;
      for (int unsigned j = 0; j < N; j++) out_sets[j] = in_sets[j];
    end
  end else if (M <= 2) begin : g_mux
    localparam int unsigned SELW = (N > 1) ? $clog2(N) : 1;
    for (genvar j = 0; j < M; j++) begin : g_out
      logic [SELW-1:0] sel;
      assign sel = cfg[j*SELW +: SELW];
      assign out_sets[j] = (32'(sel) < N) ? in_sets[sel] : '0;
    end
  end else begin : g_rec
    localparam int unsigned N2   = N + (N % 2);
    localparam int unsigned H    = N2 / 2;          // inputs per half
    localparam int unsigned NX   = H - 1;           // crossbars
    localparam int unsigned SUBW = conc_cfg_w(H, M / 2);
    localparam int unsigned SUBWP = (SUBW > 0) ? SUBW : 1;

    logic [N2-1:0][K-1:0] pad;
    logic [H-1:0][K-1:0]  up_in, lo_in;
    logic [SUBWP-1:0]     up_cfg, lo_cfg;

    always_comb begin
      pad = '0;
      for (int unsigned j = 0; j < N; j++) pad[j] = in_sets[j];
      for (int unsigned i = 0; i < NX; i++) begin
        up_in[i] = cfg[i] ? pad[2*i+1] : pad[2*i];
        lo_in[i] = cfg[i] ? pad[2*i]   : pad[2*i+1];
      end
      up_in[H-1] = pad[N2-2];
      lo_in[H-1] = pad[N2-1];
    end

    if (SUBW > 0) begin : g_subcfg
      assign up_cfg = cfg[NX +: SUBW];
      assign lo_cfg = cfg[NX + SUBW +: SUBW];
    end else begin : g_nosubcfg
      assign up_cfg = '0;
      assign lo_cfg = '0;
    end

    conc_net #(.N(H), .M(M/2), .K(K)) u_up (
      .in_sets(up_in), .cfg(up_cfg), .out_sets(out_sets[M/2-1:0]));
    conc_net #(.N(H), .M(M/2), .K(K)) u_lo (
      .in_sets(lo_in), .cfg(lo_cfg), .out_sets(out_sets[M-1:M/2]));
  end

endmodule
