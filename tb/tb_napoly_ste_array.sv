// tb_napoly_ste_array: self-checking test of the STE array and interconnect.
//
// A 40-STE array with hardware fan-out 7 (reach 3 down, 3 up). Each run
// draws a random configuration image (sparse edges, a few start and report
// flags) and a random stream of match vectors, and compares the state and
// report vectors every cycle with a reference model that walks the edge
// list: STE n's output k activates STE n-3+k. Edges touching the array ends,
// backward edges and self loops are counted and must all occur.
module tb_napoly_ste_array;
  localparam int unsigned N = 40, F = 7, CB = F + 2;
  localparam int BACK = (F - 1) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, advance = 1'b0;
  logic [N-1:0] match = '0, active, report;
  logic [N*CB-1:0] cfg = '0;
  logic [N-1:0] ref_s, nxt;
  int checks = 0, failures = 0;
  int n_back = 0, n_fwd = 0, n_self = 0;

  always #5 clk = ~clk;

  napoly_ste_array #(.N_STE(N), .F(F)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] step(input logic [N-1:0] s, input logic [N-1:0] m);
    logic [N-1:0] any_in;
    any_in = '0;
    for (int i = 0; i < int'(N); i++)
      for (int k = 0; k < int'(F); k++)
        if (s[i] && cfg[i*CB + k] && (i - BACK + k >= 0) && (i - BACK + k < int'(N)))
          any_in[i - BACK + k] = 1'b1;
    for (int j = 0; j < int'(N); j++)
      step[j] = cfg[j*CB + F] | (any_in[j] & m[j]);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 30; run++) begin
      // random configuration
      for (int i = 0; i < int'(N); i++) begin
        for (int k = 0; k < int'(F); k++) begin
          cfg[i*CB + k] = ($urandom_range(0, 3) == 0);
          if (cfg[i*CB + k] && (i - BACK + k >= 0) && (i - BACK + k < int'(N))) begin
            if (k < BACK) n_back++; else if (k == BACK) n_self++; else n_fwd++;
          end
        end
        cfg[i*CB + F]     = ($urandom_range(0, 15) == 0);
        cfg[i*CB + F + 1] = ($urandom_range(0, 3) == 0);
      end
      @(negedge clk); clear = 1'b1; advance = 1'b0;
      ref_s = '0;
      for (int i = 0; i < int'(N); i++) ref_s[i] = cfg[i*CB + F];
      @(negedge clk); clear = 1'b0;
      for (int c = 0; c < 200; c++) begin
        #1;
        checks++;
        if (active != ref_s) begin
          failures++;
          if (failures < 5) $display("FAIL run %0d cycle %0d: %h vs %h", run, c, active, ref_s);
        end
        for (int i = 0; i < int'(N); i++) begin
          checks++; if (report[i] != (ref_s[i] & cfg[i*CB + F + 1])) failures++;
        end
        advance = ($urandom_range(0, 4) != 0);
        for (int j = 0; j < int'(N); j++) match[j] = ($urandom_range(0, 2) != 0);
        nxt = step(ref_s, match);
        @(negedge clk);
        if (advance) ref_s = nxt;
      end
    end
    checks++;
    if (n_back == 0 || n_fwd == 0 || n_self == 0) failures++;
    $display("edges: back %0d self %0d fwd %0d", n_back, n_self, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
