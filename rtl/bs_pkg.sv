// bs_pkg: types and constants shared by the BackSpace on-chip debug logic.
//
// The debug architecture watches the state bits of a circuit under debug and
// stops it at a programmed state (breakpoint circuit), while recording a
// short history of signatures of that state (signature creation and
// collection). This package holds the breakpoint mode encoding of the
// two-partial-breakpoint scheme, the software register map used by the host
// interface, and the pseudo-random function that fixes the hash matrix.
//
// The three modes and the 32-bit match counters follow the described
// architecture; the numeric mode encoding, the register numbers beyond those
// the prototype lists, and the hash matrix generator are choices of this
// design.
package bs_pkg;

  // Width of the breakpoint match counter and counter match register.
  localparam int unsigned CNT_W = 32;

  // Two-bit breakpoint mode register.
  //   MODE_A   : circuit A raises the breakpoint, B counts its hits  (mode 1)
  //   MODE_B   : circuit B raises the breakpoint, A counts its hits  (mode 2)
  //   MODE_EXT : an external breakpoint stops the chip, both count   (mode 3)
  //   MODE_OFF : treated as mode 3 (the reset value is mode 3)
  typedef enum logic [1:0] {
    MODE_OFF = 2'd0,
    MODE_A   = 2'd1,
    MODE_B   = 2'd2,
    MODE_EXT = 2'd3
  } bp_mode_e;

  // Signature creation scheme.
  typedef enum logic [1:0] {
    SIG_HARDWIRED = 2'd0,   // fixed state bits wired to the trace buffer
    SIG_CONC      = 2'd1,   // programmable concentrator
    SIG_HASH      = 2'd2    // universal hash (XOR matrix)
  } sig_scheme_e;

  // Software register numbers (32-bit registers, word addressed).
  typedef enum logic [4:0] {
    R_MIN_HAM      = 5'd0,   // minimum Hamming weight of this run
    R_CYC_LO       = 5'd1,   // cycle counter, low word
    R_CYC_HI       = 5'd2,   // cycle counter, high word
    R_TRACE_LO     = 5'd3,   // trace buffer data read, low word
    R_TRACE_HI     = 5'd4,   // trace buffer data read, high word
    R_STSEL_LO     = 5'd5,   // state read select (one-hot), low word
    R_STSEL_HI     = 5'd6,   // state read select (one-hot), high word
    R_BPDATA_LO    = 5'd7,   // breakpoint data write, low word
    R_BPDATA_HI    = 5'd8,   // breakpoint data write, high word
    R_BPWSEL_LO    = 5'd9,   // breakpoint write select (one-hot), low word
    R_BPWSEL_HI    = 5'd10,  // breakpoint write select (one-hot), high word
    R_MASK_LO      = 5'd11,  // breakpoint mask data write, low word
    R_MASK_HI      = 5'd12,  // breakpoint mask data write, high word
    R_BPREAD_LO    = 5'd13,  // breakpoint data read, low word
    R_BPREAD_HI    = 5'd14,  // breakpoint data read, high word
    R_RESET_BP     = 5'd15,  // write: clear breakpoint and start a new run
    R_STATE_LO     = 5'd16,  // state data read, low word
    R_STATE_HI     = 5'd17,  // state data read, high word
    R_BP_SIGNAL    = 5'd18,  // breakpoint status
    R_RDSEL_LO     = 5'd19,  // trace buffer / breakpoint read select, low
    R_RDSEL_HI     = 5'd20,  // trace buffer / breakpoint read select, high
    R_TRACE_ADDR   = 5'd21,  // trace buffer read address
    R_CYC_LO2      = 5'd22,  // cycle counter, low word (second copy)
    R_HAM_LO       = 5'd24,  // Hamming state data read, low word
    R_HAM_HI       = 5'd25,  // Hamming state data read, high word
    R_CTRL         = 5'd26,  // [1:0] mode, [2] circuit select (0 A, 1 B)
    R_CNT_TARGET   = 5'd27,  // counter match register of the selected circuit
    R_CNT_READ     = 5'd28   // match counter of the selected circuit (read)
  } reg_addr_e;

  // Integer mixing function (a 32-bit finaliser) used to derive the fixed
  // pseudo-random hash matrix from a seed at elaboration time.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // One entry of the hash matrix: row r (output), column c (input). The entry
  // is one with probability ones_ppm / 1e6.
  function automatic logic hash_entry(input int unsigned seed, input int unsigned r,
                                      input int unsigned c, input int unsigned ones_ppm);
    logic [31:0] h;
    h = mix32(mix32(seed ^ (r * 32'h9e3779b9)) ^ (c * 32'h85ebca6b));
    return (h % 32'd1000000) < ones_ppm;
  endfunction

  // Number of configuration bits of an (n, m) concentrator network built as
  // in conc_net: (n'/2 - 1) crossbars at this level plus two (n'/2, m/2)
  // sub-networks, where n' is n rounded up to even; an m <= 2 network is m
  // multiplexers of n inputs, and an n <= m network is plain wiring.
  function automatic int unsigned conc_cfg_w(input int unsigned n, input int unsigned m);
    int unsigned n2;
    if (n <= m) return 0;
    if (m <= 2) return m * ((n > 1) ? $clog2(n) : 1);
    n2 = n + (n % 2);
    return (n2 / 2 - 1) + 2 * conc_cfg_w(n2 / 2, m / 2);
  endfunction

endpackage
