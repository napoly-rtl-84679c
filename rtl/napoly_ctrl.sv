// napoly_ctrl: pass sequencer of the NAPOLY overlay.
//
// A pass runs one configuration of the array over the contents of the input
// buffer. Before a pass the host reprograms the overlay (current state table
// through its write port, interconnect and flags through the shift chains,
// input symbols through the input buffer write port); this is allowed while
// `cfg_ok` is high. A `go` pulse then clears the STE state bits to their
// start flags, rewinds the input buffer and streams it through the array at
// one symbol per cycle. The array advances only when a symbol is available
// and the reporter does not stall it (more reports pending than encoders, or
// the output buffer full). After the last symbol the controller waits until
// the encoders have emptied, then signals `done`; the host flushes the output
// buffer to memory and may start the next configuration.
//
// Interface and timing: `clear` is high for the cycle of an accepted `go`;
// `advance` is combinational and consumes the symbol shown by the input
// buffer. `rep_en` tells the reporter that the state vector is the result of
// a consumed symbol of the running pass (it drops when the pass is done, so
// that rewriting the report flags afterwards cannot create reports), and `offset` is that symbol's input offset. Counters:
// symbols consumed, cycles of the pass, cycles stalled by pending reports and
// cycles stalled by a full output buffer.
//
// The reconfigure / flush-input / flush-output order follows the published
// timing model; the handshake and the counters are this implementation's.
module napoly_ctrl
  import napoly_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             sym_valid,
  input  logic [OFF_W-1:0] sym_off,
  input  logic             ib_empty,
  input  logic             rep_stall,
  input  logic             rep_word_valid,
  input  logic             ob_full,
  output logic             clear,
  output logic             advance,
  output logic             rep_en,
  output logic [OFF_W-1:0] offset,
  output logic             cfg_ok,
  output logic             busy,
  output logic             done,
  output ctrl_state_e      state,
  output logic [31:0]      n_symbols,
  output logic [31:0]      n_cycles,
  output logic [31:0]      n_stall_report,
  output logic [31:0]      n_stall_full
);

  ctrl_state_e state_q;
  logic        stall_full;

  assign state      = state_q;
  assign cfg_ok     = (state_q == CTRL_IDLE) || (state_q == CTRL_DONE);
  assign busy       = !cfg_ok;
  assign done       = (state_q == CTRL_DONE);
  assign clear      = cfg_ok & go;
  assign advance    = (state_q == CTRL_RUN) & sym_valid & ~rep_stall;
  assign stall_full = rep_word_valid & ob_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= CTRL_IDLE;
      rep_en         <= 1'b0;
      offset         <= '0;
      n_symbols      <= '0;
      n_cycles       <= '0;
      n_stall_report <= '0;
      n_stall_full   <= '0;
    end else begin
      unique case (state_q)
        CTRL_IDLE, CTRL_DONE: if (go) state_q <= CTRL_RUN;
        CTRL_RUN:             if (ib_empty) state_q <= CTRL_DRAIN;
        CTRL_DRAIN:           if (!rep_word_valid) state_q <= CTRL_DONE;
        default:              state_q <= CTRL_IDLE;
      endcase

      if (clear) begin
        rep_en         <= 1'b0;
        offset         <= '0;
        n_symbols      <= '0;
        n_cycles       <= '0;
        n_stall_report <= '0;
        n_stall_full   <= '0;
      end else begin
        if (state_q == CTRL_DRAIN && !rep_word_valid) begin
          rep_en    <= 1'b0;             // pass over: later reconfiguration must not report
        end else if (advance) begin
          rep_en    <= 1'b1;
          offset    <= sym_off;
          n_symbols <= n_symbols + 1;
        end
        if (busy) n_cycles <= n_cycles + 1;
        if (state_q == CTRL_RUN && sym_valid && rep_stall) begin
          if (stall_full) n_stall_full   <= n_stall_full + 1;
          else            n_stall_report <= n_stall_report + 1;
        end
      end
    end
  end

endmodule
