// debug_regs: software register file between the host and the debug
// architecture.
//
// The host sees 32 registers of 32 bits (numbers in bs_pkg::reg_addr_e).
// Wide on-chip registers are reached 64 bits at a time through low/high
// register pairs and a 64-bit one-hot word select:
//  * breakpoint load: the data pairs 7/8 (target) and 11/12 (mask) are
//    copied into every 64-bit word of the target and mask registers of the
//    circuit chosen by CTRL[2] whose bit is set in the write select 9/10, in
//    each cycle the bit stays set (so a 3007-bit target takes 47 loads);
//  * state read: select 5/6 picks the word of the current state returned in
//    16/17 and of the Hamming state register returned in 24/25;
//  * trace read: select 19/20 picks the word of the trace buffer entry (age
//    in 21) returned in 3/4 and of the selected circuit's target returned in
//    13/14.
// Writing 1 to register 15 clears the breakpoint and starts a new run (a
// one-cycle `clear`). Register 18 reads {freeze, delayed B, delayed A,
// breakpoint}. Register 26 holds the breakpoint mode (bits 1:0, reset
// mode 3) and the circuit select (bit 2); 27 writes / reads the selected
// circuit's counter match register, 28 reads its match counter. A 64-bit
// cycle counter, cleared with the run and stopped by freeze, is read in 1/2
// (and 22). Register 0 reads the minimum Hamming value.
//
// Bus timing: a write (wr_en) takes effect at the clock edge; rdata is
// combinational in addr.
//
// The register list follows the prototype's register usage table; its bus
// (a processor peripheral bus) is replaced by this plain register port, and
// registers 26-28, the level-sensitive load and the reset values are this
// design's choices.
module debug_regs
  import bs_pkg::*;
#(
  parameter int unsigned W        = 3007,
  parameter int unsigned S_WIDTH  = 3007,
  parameter int unsigned C_CYCLES = 1,
  localparam int unsigned WORD_W  = 64,
  localparam int unsigned NW      = (W + WORD_W - 1) / WORD_W,
  localparam int unsigned AW      = (C_CYCLES > 1) ? $clog2(C_CYCLES) : 1,
  localparam int unsigned HW      = $clog2(W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host port
  input  logic               wr_en,
  input  logic [4:0]         addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  // to the breakpoint circuit
  output bp_mode_e           mode,
  output logic               sel_b,
  output logic [NW-1:0]      bp_wsel,
  output logic [WORD_W-1:0]  bp_wdata,
  output logic [WORD_W-1:0]  mask_wdata,
  output logic               cnt_target_we,
  output logic [CNT_W-1:0]   cnt_target_wdata,
  output logic               clear,
  // to the trace buffer
  output logic [AW-1:0]      trace_age,
  // observed values
  input  logic               freeze,
  input  logic               bp_hit,
  input  logic               delayed_a,
  input  logic               delayed_b,
  input  logic [CNT_W-1:0]   count_sel,
  input  logic [CNT_W-1:0]   cnt_target_sel,
  input  logic [W-1:0]       target_sel,
  input  logic [W-1:0]       state_bits,
  input  logic [W-1:0]       ham_state,
  input  logic [HW-1:0]      min_ham,
  input  logic [S_WIDTH-1:0] trace_data
);
  logic [63:0] stsel, bpwsel, rdsel, bpdata, maskdata, cycles;
  logic [31:0] trace_addr_q;
  logic [2:0]  ctrl_q;

  // 64-bit word of a wide vector picked by a one-hot select (an OR of the
  // selected words, zero when nothing is selected).
  function automatic logic [63:0] pick_w(input logic [W-1:0] v, input logic [63:0] sel);
    logic [63:0] r;
    r = '0;
    for (int unsigned i = 0; i < W; i++)
      if (sel[i / WORD_W]) r[i % WORD_W] |= v[i];
    return r;
  endfunction

  function automatic logic [63:0] pick_s(input logic [S_WIDTH-1:0] v, input logic [63:0] sel);
    logic [63:0] r;
    r = '0;
    for (int unsigned i = 0; i < S_WIDTH; i++)
      if (sel[i / WORD_W]) r[i % WORD_W] |= v[i];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stsel        <= '0;
      bpwsel       <= '0;
      rdsel        <= '0;
      bpdata       <= '0;
      maskdata     <= '1;
      trace_addr_q <= '0;
      ctrl_q       <= {1'b0, MODE_EXT};
    end else if (wr_en) begin
      unique case (addr)
        R_STSEL_LO:   stsel[31:0]     <= wdata;
        R_STSEL_HI:   stsel[63:32]    <= wdata;
        R_BPDATA_LO:  bpdata[31:0]    <= wdata;
        R_BPDATA_HI:  bpdata[63:32]   <= wdata;
        R_BPWSEL_LO:  bpwsel[31:0]    <= wdata;
        R_BPWSEL_HI:  bpwsel[63:32]   <= wdata;
        R_MASK_LO:    maskdata[31:0]  <= wdata;
        R_MASK_HI:    maskdata[63:32] <= wdata;
        R_RDSEL_LO:   rdsel[31:0]     <= wdata;
        R_RDSEL_HI:   rdsel[63:32]    <= wdata;
        R_TRACE_ADDR: trace_addr_q    <= wdata;
        R_CTRL:       ctrl_q          <= wdata[2:0];
        default: ;
      endcase
    end
  end

  assign clear            = wr_en && (addr == R_RESET_BP) && wdata[0];
  assign cnt_target_we    = wr_en && (addr == R_CNT_TARGET);
  assign cnt_target_wdata = wdata;
  assign mode             = bp_mode_e'(ctrl_q[1:0]);
  assign sel_b            = ctrl_q[2];
  assign bp_wsel          = bpwsel[NW-1:0];
  assign bp_wdata         = bpdata;
  assign mask_wdata       = maskdata;
  assign trace_age        = AW'(trace_addr_q);

  // Cycle counter: cycles of the current run until the freeze.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cycles <= '0;
    else if (clear)   cycles <= '0;
    else if (!freeze) cycles <= cycles + 64'd1;
  end

  logic [63:0] st_w, ham_w, tr_w, bp_w;
  assign st_w  = pick_w(state_bits, stsel);
  assign ham_w = pick_w(ham_state, stsel);
  assign bp_w  = pick_w(target_sel, rdsel);
  assign tr_w  = pick_s(trace_data, rdsel);

  always_comb begin
    rdata = '0;
    unique case (addr)
      R_MIN_HAM:    rdata = 32'(min_ham);
      R_CYC_LO:     rdata = cycles[31:0];
      R_CYC_HI:     rdata = cycles[63:32];
      R_TRACE_LO:   rdata = tr_w[31:0];
      R_TRACE_HI:   rdata = tr_w[63:32];
      R_STSEL_LO:   rdata = stsel[31:0];
      R_STSEL_HI:   rdata = stsel[63:32];
      R_BPDATA_LO:  rdata = bpdata[31:0];
      R_BPDATA_HI:  rdata = bpdata[63:32];
      R_BPWSEL_LO:  rdata = bpwsel[31:0];
      R_BPWSEL_HI:  rdata = bpwsel[63:32];
      R_MASK_LO:    rdata = maskdata[31:0];
      R_MASK_HI:    rdata = maskdata[63:32];
      R_BPREAD_LO:  rdata = bp_w[31:0];
      R_BPREAD_HI:  rdata = bp_w[63:32];
      R_STATE_LO:   rdata = st_w[31:0];
      R_STATE_HI:   rdata = st_w[63:32];
      R_BP_SIGNAL:  rdata = {28'd0, freeze, delayed_b, delayed_a, bp_hit};
      R_RDSEL_LO:   rdata = rdsel[31:0];
      R_RDSEL_HI:   rdata = rdsel[63:32];
      R_TRACE_ADDR: rdata = trace_addr_q;
      R_CYC_LO2:    rdata = cycles[31:0];
      R_HAM_LO:     rdata = ham_w[31:0];
      R_HAM_HI:     rdata = ham_w[63:32];
      R_CTRL:       rdata = {29'd0, ctrl_q};
      R_CNT_TARGET: rdata = cnt_target_sel;
      R_CNT_READ:   rdata = count_sel;
      default:      rdata = '0;
    endcase
  end

endmodule
