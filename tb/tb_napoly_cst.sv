// tb_napoly_cst: self-checking test of the current state table.
//
// Writes a random 256 x 192-bit table word by word through the write port,
// then reads every row asynchronously (checked in the same cycle as the
// symbol is applied) and compares it with the written pattern; finally
// overwrites a few words and re-checks those rows.
module tb_napoly_cst;
  localparam int unsigned N = 192, WR_W = 64, WPR = N / WR_W;
  localparam int unsigned AW = 8 + $clog2(WPR);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [WR_W-1:0] wdata = '0;
  logic [7:0] sym = '0;
  logic [N-1:0] match;
  logic [N-1:0] model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  napoly_cst #(.N_STE(N), .WR_W(WR_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int row, input int word, input logic [WR_W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = {8'(row), $clog2(WPR)'(word)}; wdata = d;
    model[row][word*WR_W +: WR_W] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    for (int r = 0; r < 256; r++)
      for (int w = 0; w < int'(WPR); w++)
        write_word(r, w, {$urandom, $urandom});
    for (int r = 0; r < 256; r++) begin
      @(negedge clk); sym = 8'(r); #1;
      checks++;
      if (match !== model[r]) begin failures++; $display("FAIL row %0d", r); end
    end
    for (int i = 0; i < 20; i++) begin
      int r, w;
      r = $urandom_range(0, 255); w = $urandom_range(0, WPR - 1);
      write_word(r, w, {$urandom, $urandom});
      sym = 8'(r); #1;
      checks++; if (match !== model[r]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
