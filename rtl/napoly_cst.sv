// napoly_cst: the current state table of the NAPOLY overlay.
//
// A 256 x N_STE bit RAM. Row s holds, for every STE, whether that STE accepts
// input symbol s; column n is STE n's symbol set. The row selected by the
// current input symbol is read asynchronously, so that the STE array can
// consume one symbol per cycle (on the FPGA this table lives in MLAB
// distributed RAM for exactly that reason; a synchronous block RAM would
// halve the throughput).
//
// Interface and timing: `sym` selects a row, `match` shows it in the same
// cycle. The exposed write port writes one WR_W-bit word per cycle:
// `waddr` = {row, word}, word w of a row covers STEs [w*WR_W +: WR_W]. The
// RAM has no reset; it must be written before a pass.
//
// Depth 256, width N_STE and the asynchronous read follow the published
// design; the 64-bit write word matching the host interface is this
// implementation's choice.
module napoly_cst
  import napoly_pkg::*;
#(
  parameter int unsigned N_STE = 8192,
  parameter int unsigned WR_W  = 64,
  localparam int unsigned WPR  = N_STE / WR_W,          // words per row
  localparam int unsigned WA_W = (WPR > 1) ? $clog2(WPR) : 1,
  localparam int unsigned AW   = SYM_W + WA_W
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WR_W-1:0]  wdata,
  input  logic [SYM_W-1:0] sym,
  output logic [N_STE-1:0] match
);

  logic [N_STE-1:0] mem [SYMBOLS];

  logic [SYM_W-1:0] wrow;
  logic [WA_W-1:0]  wword;
  assign wrow  = waddr[AW-1:WA_W];
  assign wword = waddr[WA_W-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wword*WR_W +: WR_W] <= wdata;
  end

  assign match = mem[sym];

  initial begin
    assert (N_STE % WR_W == 0) else $error("N_STE must be a multiple of WR_W");
  end

endmodule
