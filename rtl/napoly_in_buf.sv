// napoly_in_buf: the input symbol buffer of the NAPOLY overlay.
//
// A DEPTH x 8-bit block RAM (64K symbols by default, M20K on the FPGA)
// filled from host memory through an exposed write port and then streamed
// into the STE array at one symbol per cycle. Because block RAM reads are
// synchronous, the read address is the *next* pointer: the registered read
// data therefore always equals mem[ptr], which keeps one symbol per cycle
// and also lets the consumer stall for any number of cycles.
//
// Interface and timing: the write port takes WR_W/8 symbols per cycle,
// symbol i of a word in bits [8*i +: 8], word address `waddr`. A one-cycle
// `start` pulse rewinds the stream to offset 0 and sets its length `len`
// (1..DEPTH). `sym_valid`/`sym_ready` is a valid/ready handshake; `sym_off`
// is the offset of the symbol shown. `empty` is high once all `len` symbols
// have been consumed. The first symbol is valid in the cycle after `start`.
//
// Depth and width follow the published design; the write word width, the
// handshake and the length register are this implementation's choices.
module napoly_in_buf
  import napoly_pkg::*;
#(
  parameter int unsigned DEPTH = IB_DEPTH,
  parameter int unsigned WR_W  = DRAM_W,
  localparam int unsigned SPW  = WR_W / SYM_W,           // symbols per write word
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned WAW  = $clog2(DEPTH / SPW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WAW-1:0]   waddr,
  input  logic [WR_W-1:0]  wdata,
  input  logic             start,
  input  logic [AW:0]      len,
  output logic             sym_valid,
  input  logic             sym_ready,
  output logic [SYM_W-1:0] sym,
  output logic [AW-1:0]    sym_off,
  output logic             empty
);

  logic [SYM_W-1:0] mem [DEPTH];
  logic [AW:0]      ptr_q, ptr_d, len_q;
  logic [SYM_W-1:0] rd_q;
  logic             consume;

  assign sym_valid = (ptr_q < len_q);
  assign consume   = sym_valid & sym_ready;
  assign empty     = !sym_valid;

  always_comb begin
    if (start)        ptr_d = '0;
    else if (consume) ptr_d = ptr_q + 1'b1;
    else              ptr_d = ptr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
      len_q <= '0;
    end else begin
      ptr_q <= ptr_d;
      if (start) len_q <= len;
    end
  end

  // Write port and synchronous read port.
  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < int'(SPW); i++)
        mem[{waddr, i[$clog2(SPW)-1:0]}] <= wdata[i*SYM_W +: SYM_W];
    end
    rd_q <= mem[ptr_d[AW-1:0]];
  end

  assign sym     = rd_q;
  assign sym_off = ptr_q[AW-1:0];

endmodule
