// napoly_out_buf: the report output buffer of the NAPOLY overlay.
//
// A first-in first-out buffer of report words held in block RAM (M20K on the
// FPGA). The report side writes one padded report word per cycle; the DMA
// side reads words out towards host memory. Its depth trades against the
// overlay size (64K, 32K, 24K, 16K, 12K, 8K words for the 4K..24K-STE
// overlays; 32K for the default 8K overlay). When it is full the report side
// sees `full` and the array stalls, so no report is ever lost.
//
// Interface and timing: `wr_en` with `wr_data` stores a word at the clock
// edge (ignored when full). `rd_en` pops the oldest word; it appears on
// `rd_data` with `rd_valid` in the next cycle (synchronous block RAM read).
// `clear` empties the buffer. `count` is the number of stored words.
//
// Depth and the padded width follow the published design. The read port
// here has the report word's width (512 bits by default, equal to the
// published DMA port width for the 8K overlay); a width conversion for other
// sizes is left outside. The FIFO organisation is this implementation's
// choice.
module napoly_out_buf #(
  parameter int unsigned W     = 512,
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr_q, rptr_q;
  logic [AW:0]   count_q;
  logic          do_wr, do_rd;

  assign full  = (count_q == (AW+1)'(DEPTH));
  assign do_wr = wr_en & ~full;
  assign do_rd = rd_en & (count_q != '0);
  assign count = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q   <= '0;
      rptr_q   <= '0;
      count_q  <= '0;
      rd_valid <= 1'b0;
    end else if (clear) begin
      wptr_q   <= '0;
      rptr_q   <= '0;
      count_q  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr_q <= (wptr_q == AW'(DEPTH - 1)) ? '0 : wptr_q + 1'b1;
      if (do_rd) rptr_q <= (rptr_q == AW'(DEPTH - 1)) ? '0 : rptr_q + 1'b1;
      count_q <= count_q + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr_q] <= wr_data;
    if (do_rd) rd_data <= mem[rptr_q];
  end

endmodule
