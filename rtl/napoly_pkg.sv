// napoly_pkg: constants and helper functions shared by the NAPOLY overlay.
//
// NAPOLY is an array of State Transition Elements (STEs) that runs a
// non-deterministic finite automaton one 8-bit input symbol per clock cycle.
// This package holds the sizes that several modules must agree on: the
// symbol alphabet, the 64-bit host memory interface width, the input buffer
// depth, the report word layout and the controller state encoding.
//
// Report word layout (one word per cycle in which any encoder fires),
// least significant bit first:
//   E fields of IDW bits   STE index reported by encoder e (global index)
//   E bits                 valid flag of encoder e
//   OFF_W bits             input offset of the symbol that caused the reports
//   zeros                  padding up to a power of two
// E = N_STE / OUT_REGION encoders, IDW = clog2(N_STE). The ID fields and the
// power-of-two padding follow the design's published output buffer widths
// (192/416/672/896/1200/1440 bits padded to 256/512/1024/1024/2048/2048);
// placing the valid flags and the offset inside the padding is this
// implementation's choice.
package napoly_pkg;

  localparam int unsigned SYM_W       = 8;       // input symbol width
  localparam int unsigned SYMBOLS     = 256;     // alphabet size, rows of the current state table
  localparam int unsigned DRAM_W      = 64;      // host memory interface width = number of shift chains
  localparam int unsigned IB_DEPTH    = 65536;   // input buffer depth in symbols
  localparam int unsigned OFF_W       = 16;      // input offset width, clog2(IB_DEPTH)
  localparam int unsigned OUT_REGION  = 256;     // STEs served by one priority encoder

  // Smallest power of two not below x.
  function automatic int unsigned pow2ceil(input int unsigned x);
    int unsigned p;
    p = 1;
    while (p < x) p = p * 2;
    return p;
  endfunction

  // Number of priority encoders for an array of n STEs.
  function automatic int unsigned num_encoders(input int unsigned n, input int unsigned region);
    return (n + region - 1) / region;
  endfunction

  // Width of one report word (output buffer width after padding).
  function automatic int unsigned entry_width(input int unsigned n, input int unsigned region);
    int unsigned e;
    e = num_encoders(n, region);
    return pow2ceil(e * $clog2(n) + e + OFF_W);
  endfunction

  // Configuration bits per STE: f interconnect enables, start flag, report flag.
  function automatic int unsigned cfg_bits_per_ste(input int unsigned f);
    return f + 2;
  endfunction

  typedef enum logic [1:0] {
    CTRL_IDLE  = 2'd0,   // array may be configured, buffers written
    CTRL_RUN   = 2'd1,   // input buffer streamed through the array
    CTRL_DRAIN = 2'd2,   // last symbol consumed, encoders emptying
    CTRL_DONE  = 2'd3    // pass complete, output buffer ready to flush
  } ctrl_state_e;

endpackage
