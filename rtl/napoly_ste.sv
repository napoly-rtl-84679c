// napoly_ste: one State Transition Element of the NAPOLY overlay.
//
// An STE holds one NFA state in a single state bit. Its f inputs carry the
// activation signals of the f STEs that may precede it; they are ORed
// together. When any of them is set in a cycle in which the STE's column of
// the current state table reads 1 for the current symbol, the state bit is
// set in the following cycle; otherwise it is cleared. An STE whose start
// flag is set never clears its state bit. While the state bit is set the STE
// drives all f outputs, each ANDed with its own interconnect configuration
// bit, so that only configured edges reach the successor STEs. The report
// output is the state bit gated by the report flag.
//
// Interface and timing: `clear` loads the state bit with the start flag at
// the beginning of a pass; `advance` consumes one symbol (the state bit is
// updated at the next rising edge). `match` is this STE's bit of the current
// state table row selected by the symbol. All outputs are combinational
// functions of the state bit and the configuration flags.
//
// The OR/AND structure, the start flag and the gated outputs follow the
// published design. Reading the start flag as "state bit held set" (rather
// than "enabled in every cycle") is this implementation's reading of the
// sentence "Unless the start bit is set, the state bit resets in any cycle
// in which this condition does not hold". Clearing the state at the start of
// a pass is also this implementation's choice.
module napoly_ste #(
  parameter int unsigned F = 44            // hardware fan-out
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,              // start of pass: state <= start flag
  input  logic         advance,            // consume one symbol
  input  logic         match,              // current state table bit for this symbol
  input  logic [F-1:0] act_in,             // gated activations from predecessors
  input  logic [F-1:0] edge_en,            // interconnect configuration bits
  input  logic         start_flag,
  input  logic         report_flag,
  output logic [F-1:0] act_out,            // gated activations to successors
  output logic         active,             // state bit
  output logic         report              // active reporting STE
);

  logic state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state_q <= 1'b0;
    else if (clear)   state_q <= start_flag;
    else if (advance) state_q <= start_flag | ((|act_in) & match);
  end

  assign active  = state_q;
  assign act_out = {F{state_q}} & edge_en;
  assign report  = state_q & report_flag;

endmodule
