// tb_napoly_in_buf: self-checking test of the input symbol buffer.
//
// Fills a 512-symbol buffer with random data through the 64-bit write port,
// then streams it twice: once with the consumer always ready (must deliver
// one symbol per cycle, first symbol in the cycle after start) and once with
// random back-pressure. Every delivered symbol and its offset are compared
// with the written data; the stream must end exactly after `len` symbols.
module tb_napoly_in_buf;
  localparam int unsigned DEPTH = 512, WR_W = 64;
  localparam int unsigned AW = $clog2(DEPTH), WAW = $clog2(DEPTH / 8);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, start = 1'b0, sym_ready = 1'b0;
  logic [WAW-1:0] waddr = '0;
  logic [WR_W-1:0] wdata = '0;
  logic [AW:0] len = '0;
  logic sym_valid, empty;
  logic [7:0] sym;
  logic [AW-1:0] sym_off;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  napoly_in_buf #(.DEPTH(DEPTH), .WR_W(WR_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(input int n, input bit backpressure);
    int got, cyc;
    @(negedge clk); start = 1'b1; len = (AW+1)'(n);
    @(negedge clk); start = 1'b0;
    got = 0; cyc = 0;
    while (!empty && cyc < 4 * n + 10) begin
      sym_ready = backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (!backpressure) begin
        checks++; if (!sym_valid) failures++;    // one symbol every cycle
      end
      if (sym_valid && sym_ready) begin
        checks++;
        if (sym != model[got] || sym_off != AW'(got)) begin
          failures++;
          if (failures < 5) $display("FAIL sym %0d: %h vs %h", got, sym, model[got]);
        end
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    sym_ready = 1'b0;
    checks++;
    if (got != n) begin failures++; $display("FAIL count %0d vs %0d", got, n); end
    if (!backpressure) begin
      checks++; if (cyc != n) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (!empty) failures++;
    for (int w = 0; w < int'(DEPTH / 8); w++) begin
      @(negedge clk);
      we = 1'b1; waddr = WAW'(w); wdata = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) model[w*8 + i] = wdata[i*8 +: 8];
    end
    @(negedge clk); we = 1'b0;
    stream(DEPTH, 1'b0);
    stream(300, 1'b1);
    stream(1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
