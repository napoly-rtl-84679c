// napoly_cfg_chain: the configuration flip-flops of the STE array.
//
// The interconnect configuration bits and the start and report flags of all
// STEs live in flip-flops connected as CH parallel shift chains, so that the
// array is reprogrammed CH bits per cycle straight from the host memory
// interface (boundary-scan style, but parallel). With the default 8192 STEs
// and fan-out 44 there are 8192 x 46 = 376,832 bits, i.e. 5,888 shift cycles.
//
// Interface and timing: while `shift_en` is high, one CH-bit word enters at
// the head each cycle and every word moves one position towards the tail.
// After LEN shifts the first word sent occupies word LEN-1, so the host sends
// the image last word first. `cfg` is the flat image: bits
// [n*(F+2) +: F] are STE n's edge enables (bit k drives STE
// n - floor((F-1)/2) + k), bit n*(F+2)+F its start flag and bit n*(F+2)+F+1
// its report flag. Word w of the image is cfg[w*CH +: CH], bit c of each word
// belongs to chain c.
//
// The parallel chains and their width equal to the memory interface follow
// the published design; the bit order inside the image is this
// implementation's choice. The chains reset to zero (no edges, no flags).
module napoly_cfg_chain #(
  parameter int unsigned N_STE = 8192,
  parameter int unsigned F     = 44,
  parameter int unsigned CH    = 64,
  localparam int unsigned BITS = N_STE * (F + 2),
  localparam int unsigned LEN  = (BITS + CH - 1) / CH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift_en,
  input  logic [CH-1:0]   shift_in,
  output logic [BITS-1:0] cfg
);

  logic [CH-1:0] chain_q [LEN];   // word 0 is the head of all CH chains

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < int'(LEN); w++) chain_q[w] <= '0;
    end else if (shift_en) begin
      chain_q[0] <= shift_in;
      for (int w = 1; w < int'(LEN); w++) chain_q[w] <= chain_q[w-1];
    end
  end

  logic [LEN*CH-1:0] image;
  for (genvar w = 0; w < LEN; w++) begin : g_word
    assign image[w*CH +: CH] = chain_q[w];
  end

  assign cfg = image[BITS-1:0];

endmodule
