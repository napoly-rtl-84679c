// napoly_reporter: report regions, priority encoders and report word packing.
//
// Any STE may be a reporting state. The array is cut into output regions of
// OUT_REG consecutive STEs, each served by one priority encoder (groups of
// output regions form the reporting regions of the published design; 1024
// STEs, i.e. four encoders, in its 8K example). Every cycle each encoder
// emits at most one reporting STE ID. All encoder outputs of a cycle are
// packed into one report word together with the input offset of the symbol
// that produced the reports (see napoly_pkg for the layout) and written to
// the output buffer. When an encoder has more reports pending than it can
// emit this cycle, `stall` holds the array until it has caught up.
//
// Interface and timing: `report` is the array's report vector, already
// gated to zero when the state does not result from a consumed symbol;
// `offset` is that symbol's input offset. `word_valid`/`word` are
// combinational; `word_ready` accepts the word at the clock edge (output
// buffer not full). `advance`/`clear` as in napoly_prio_enc. `stall` is high
// when the array must not consume the next symbol in this cycle: an encoder
// has more reports than this one, or this cycle's word cannot be written.
//
// Conflict in the published text: the 8K example uses region-local 10-bit
// IDs (320-bit words), while the output buffer width table gives
// encoders x log2(STEs) (416 bits for 8K). The table is followed: IDs are
// global STE indices.
module napoly_reporter
  import napoly_pkg::*;
#(
  parameter int unsigned N_STE   = 8192,
  parameter int unsigned OUT_REG = OUT_REGION,
  localparam int unsigned E      = num_encoders(N_STE, OUT_REG),
  localparam int unsigned IDW    = $clog2(N_STE),
  localparam int unsigned LIW    = (OUT_REG > 1) ? $clog2(OUT_REG) : 1,
  localparam int unsigned W      = entry_width(N_STE, OUT_REG)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             advance,
  input  logic [N_STE-1:0] report,
  input  logic [OFF_W-1:0] offset,
  output logic             word_valid,
  output logic [W-1:0]     word,
  input  logic             word_ready,
  output logic             stall
);

  logic [E-1:0]          enc_valid, enc_more;
  logic [E-1:0][LIW-1:0] enc_idx;
  logic [E*OUT_REG-1:0]  report_ext;

  assign report_ext = (E*OUT_REG)'(report);

  for (genvar e = 0; e < E; e++) begin : g_enc
    napoly_prio_enc #(.R(OUT_REG)) u_enc (
      .clk    (clk),
      .rst_n  (rst_n),
      .clear  (clear),
      .advance(advance),
      .take   (word_ready),
      .req    (report_ext[e*OUT_REG +: OUT_REG]),
      .valid  (enc_valid[e]),
      .idx    (enc_idx[e]),
      .more   (enc_more[e])
    );
  end

  always_comb begin
    word = '0;
    for (int e = 0; e < int'(E); e++) begin
      if (enc_valid[e])
        word[e*IDW +: IDW] = IDW'(e * int'(OUT_REG)) + IDW'(enc_idx[e]);
    end
    word[E*IDW +: E]         = enc_valid;
    word[E*IDW + E +: OFF_W] = offset;
  end

  assign word_valid = |enc_valid;
  assign stall      = (|enc_more) | (word_valid & ~word_ready);

  initial begin
    assert (E * IDW + E + OFF_W <= W) else $error("report word too narrow");
  end

endmodule
