// napoly_prio_enc: priority encoder of one output region.
//
// Each encoder watches R consecutive STEs (an output region). Starting from
// the right-most (lowest-numbered) bit it emits the index of one active
// reporting STE per cycle and marks it as served, moving on to the next set
// bit in the following cycle, until every report of the region has been
// emitted. The state vector it reads is held still while reports remain:
// `more` tells the array that this encoder needs at least one more cycle
// after the current one, which is how the number of encoders bounds the
// reports per cycle that the overlay can absorb without stalling.
//
// Interface and timing: `req` is the region's slice of the report vector.
// `valid`/`idx` show the lowest pending report combinationally. When `take`
// is high in a cycle with `valid`, that report is marked served at the clock
// edge. `advance` (the array consumed a symbol and `req` changes at the same
// edge) or `clear` empties the served mask.
//
// The right-to-left scan follows the published design; the served mask that
// turns the scan into one report per cycle is this implementation's choice.
module napoly_prio_enc #(
  parameter int unsigned R  = 256,
  localparam int unsigned IW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          advance,
  input  logic          take,
  input  logic [R-1:0]  req,
  output logic          valid,
  output logic [IW-1:0] idx,
  output logic          more
);

  logic [R-1:0] served_q, pending;

  assign pending = req & ~served_q;
  assign valid   = |pending;
  assign more    = |(pending & (pending - 1'b1));   // two or more bits set

  always_comb begin
    idx = '0;
    for (int i = int'(R) - 1; i >= 0; i--)
      if (pending[i]) idx = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 served_q <= '0;
    else if (clear || advance)  served_q <= '0;
    else if (valid && take)     served_q[idx] <= 1'b1;
  end

endmodule
