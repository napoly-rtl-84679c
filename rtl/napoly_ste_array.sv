// napoly_ste_array: N_STE State Transition Elements and their interconnect.
//
// The STEs are numbered 0..N_STE-1 along one dimension. Each STE has a
// dedicated, non-shared wire to itself and to F-1 neighbours: STE n can
// activate STEs n - floor((F-1)/2) .. n + floor(F/2) (blue backward and red
// forward wires of the published interconnect figure). Output k of STE n
// goes to STE n - floor((F-1)/2) + k and is ANDed with that STE's k-th
// interconnect configuration bit, so an NFA edge is established by setting
// exactly one bit. Wires that would leave the array are absent. There is no
// switched routing: placing the NFA states so that every edge is within
// reach is the mapping tool's job.
//
// Interface and timing: `match` is the current state table row of the
// current symbol; on `advance` every STE updates its state bit at the next
// rising edge (one symbol per cycle); `clear` loads the start flags.
// `cfg` is the flat configuration image of napoly_cfg_chain. `active` is the
// state vector, `report` the state vector gated by the report flags.
module napoly_ste_array #(
  parameter int unsigned N_STE = 8192,
  parameter int unsigned F     = 44,
  localparam int unsigned CB   = F + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                advance,
  input  logic [N_STE-1:0]    match,
  input  logic [N_STE*CB-1:0] cfg,
  output logic [N_STE-1:0]    active,
  output logic [N_STE-1:0]    report
);

  localparam int BACK = (int'(F) - 1) / 2;   // reach towards lower indices

  logic [N_STE-1:0][F-1:0] act_out;
  logic [N_STE-1:0][F-1:0] act_in;

  // Point-to-point interconnect: input k of STE j is output k of STE j+BACK-k.
  always_comb begin
    for (int j = 0; j < int'(N_STE); j++) begin
      for (int k = 0; k < int'(F); k++) begin
        if ((j + BACK - k >= 0) && (j + BACK - k < int'(N_STE)))
          act_in[j][k] = act_out[j + BACK - k][k];
        else
          act_in[j][k] = 1'b0;
      end
    end
  end

  for (genvar n = 0; n < N_STE; n++) begin : g_ste
    napoly_ste #(.F(F)) u_ste (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (clear),
      .advance    (advance),
      .match      (match[n]),
      .act_in     (act_in[n]),
      .edge_en    (cfg[n*CB +: F]),
      .start_flag (cfg[n*CB + F]),
      .report_flag(cfg[n*CB + F + 1]),
      .act_out    (act_out[n]),
      .active     (active[n]),
      .report     (report[n])
    );
  end

endmodule
