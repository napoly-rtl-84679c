// napoly_top: the NAPOLY automata processor overlay.
//
// NAPOLY runs a non-deterministic finite automaton (ANML form: symbol sets
// attached to states) over a stream of 8-bit symbols, one symbol per cycle.
// Each NFA state is placed on a State Transition Element (STE). For the
// current symbol the current state table gives one match bit per STE; an STE
// becomes active when the symbol matches and any configured predecessor was
// active. Edges are single configuration bits on dedicated wires between STEs
// at most floor((F-1)/2) positions below and floor(F/2) above each other.
// Active reporting STEs are encoded by priority encoders, one per 256 STEs,
// into report words stored in the output buffer with the input offset.
//
// Automata larger than the array are run in passes: the host rewrites the
// current state table, shifts a new interconnect/flag image into the 64
// parallel configuration chains, and streams the same input buffer again.
//
// Host interface (all synchronous to clk, active-low asynchronous reset):
//   cst_we/cst_waddr/cst_wdata  current state table write port, 64-bit words,
//                               address {symbol, word}
//   cfg_shift/cfg_data          one 64-bit word into the configuration chains
//   ib_we/ib_waddr/ib_wdata     input buffer write port, 8 symbols per word
//   go/len                      start a pass over len symbols
//   cfg_ok/busy/done            pass status; writes are ignored while busy
//   ob_rd_en/ob_rd_data/...     output buffer DMA read port (data next cycle)
//   n_*                         per-pass counters
//
// Defaults are the published 8K-STE overlay: 8192 STEs, hardware fan-out 44,
// 64K-symbol input buffer, 32K-word output buffer of 512-bit words, 32
// encoders. The host interface handshakes are this implementation's.
module napoly_top
  import napoly_pkg::*;
#(
  parameter int unsigned N_STE    = 8192,
  parameter int unsigned F        = 44,
  parameter int unsigned OB_DEPTH = 32768,
  parameter int unsigned IBD      = IB_DEPTH,
  localparam int unsigned CB      = F + 2,
  localparam int unsigned W       = entry_width(N_STE, OUT_REGION),
  localparam int unsigned CST_AW  = SYM_W + $clog2(N_STE / DRAM_W),
  localparam int unsigned IB_AW   = $clog2(IBD),
  localparam int unsigned IB_WAW  = $clog2(IBD / (DRAM_W / SYM_W)),
  localparam int unsigned OB_AW   = $clog2(OB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // reprogramming
  input  logic              cst_we,
  input  logic [CST_AW-1:0] cst_waddr,
  input  logic [DRAM_W-1:0] cst_wdata,
  input  logic              cfg_shift,
  input  logic [DRAM_W-1:0] cfg_data,
  input  logic              ib_we,
  input  logic [IB_WAW-1:0] ib_waddr,
  input  logic [DRAM_W-1:0] ib_wdata,
  // pass control
  input  logic              go,
  input  logic [IB_AW:0]    len,
  output logic              cfg_ok,
  output logic              busy,
  output logic              done,
  // output buffer flush
  input  logic              ob_rd_en,
  output logic [W-1:0]      ob_rd_data,
  output logic              ob_rd_valid,
  output logic [OB_AW:0]    ob_count,
  // counters
  output logic [31:0]       n_symbols,
  output logic [31:0]       n_cycles,
  output logic [31:0]       n_stall_report,
  output logic [31:0]       n_stall_full
);

  logic                clear, advance, rep_en;
  logic [OFF_W-1:0]    offset;
  logic                sym_valid, ib_empty;
  logic [SYM_W-1:0]    sym;
  logic [IB_AW-1:0]    sym_off;
  logic [N_STE-1:0]    match, active, report;
  logic [N_STE*CB-1:0] cfg;
  logic                word_valid, rep_stall, ob_full;
  logic [W-1:0]        word;
  ctrl_state_e         state;

  napoly_ctrl u_ctrl (
    .clk, .rst_n, .go,
    .sym_valid,
    .sym_off       (OFF_W'(sym_off)),
    .ib_empty,
    .rep_stall,
    .rep_word_valid(word_valid),
    .ob_full,
    .clear, .advance, .rep_en, .offset, .cfg_ok, .busy, .done, .state,
    .n_symbols, .n_cycles, .n_stall_report, .n_stall_full
  );

  napoly_in_buf #(.DEPTH(IBD), .WR_W(DRAM_W)) u_ib (
    .clk, .rst_n,
    .we       (ib_we & cfg_ok),
    .waddr    (ib_waddr),
    .wdata    (ib_wdata),
    .start    (clear),
    .len      (len),
    .sym_valid,
    .sym_ready(advance),
    .sym,
    .sym_off,
    .empty    (ib_empty)
  );

  napoly_cst #(.N_STE(N_STE), .WR_W(DRAM_W)) u_cst (
    .clk,
    .we   (cst_we & cfg_ok),
    .waddr(cst_waddr),
    .wdata(cst_wdata),
    .sym,
    .match
  );

  napoly_cfg_chain #(.N_STE(N_STE), .F(F), .CH(DRAM_W)) u_cfg (
    .clk, .rst_n,
    .shift_en(cfg_shift & cfg_ok),
    .shift_in(cfg_data),
    .cfg
  );

  napoly_ste_array #(.N_STE(N_STE), .F(F)) u_array (
    .clk, .rst_n, .clear, .advance, .match, .cfg, .active, .report
  );

  napoly_reporter #(.N_STE(N_STE), .OUT_REG(OUT_REGION)) u_rep (
    .clk, .rst_n, .clear, .advance,
    .report    (rep_en ? report : '0),
    .offset,
    .word_valid,
    .word,
    .word_ready(~ob_full),
    .stall     (rep_stall)
  );

  napoly_out_buf #(.W(W), .DEPTH(OB_DEPTH)) u_ob (
    .clk, .rst_n,
    .clear   (1'b0),
    .wr_en   (word_valid),
    .wr_data (word),
    .full    (ob_full),
    .rd_en   (ob_rd_en),
    .rd_data (ob_rd_data),
    .rd_valid(ob_rd_valid),
    .count   (ob_count)
  );

endmodule
