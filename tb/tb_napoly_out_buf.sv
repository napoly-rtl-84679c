// tb_napoly_out_buf: self-checking test of the report output buffer.
//
// An 8-deep, 32-bit buffer is written and read at random. Data must come
// out in order one cycle after each pop, `full` must rise exactly at eight
// stored words and block further writes, and `count` must track the model.
module tb_napoly_out_buf;
  localparam int unsigned W = 32, DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, rd_valid;
  logic [3:0] count;
  logic [W-1:0] q [$];
  logic [W-1:0] exp_rd;
  bit exp_valid;
  int checks = 0, failures = 0, n_full = 0, n_blocked = 0;

  always #5 clk = ~clk;

  napoly_out_buf #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_valid = 0;
    for (int c = 0; c < 4000; c++) begin
      // phases biased towards filling and towards draining
      if ((c / 200) % 2 == 0) begin
        wr_en = ($urandom_range(0, 3) != 0); rd_en = ($urandom_range(0, 3) == 0);
      end else begin
        wr_en = ($urandom_range(0, 3) == 0); rd_en = ($urandom_range(0, 3) != 0);
      end
      wr_data = W'($urandom);
      #1;
      checks++;
      if (full != (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++;
        if (failures < 5) $display("FAIL count %0d model %0d", count, q.size());
      end
      if (exp_valid) begin
        checks++;
        if (!rd_valid || rd_data != exp_rd) failures++;
      end else begin
        checks++; if (rd_valid) failures++;
      end
      if (full) n_full++;
      exp_valid = 0;
      @(negedge clk);
      // model update in the order the hardware sees it
      if (rd_en && q.size() > 0) begin exp_rd = q.pop_front(); exp_valid = 1; end
      else if (rd_en) exp_valid = 0;
      if (wr_en && (q.size() + (exp_valid ? 1 : 0)) < DEPTH) q.push_back(wr_data);
      else if (wr_en) n_blocked++;
    end
    checks++; if (n_full == 0 || n_blocked == 0) failures++;
    $display("full cycles %0d blocked writes %0d", n_full, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
