// tb_napoly_prio_enc: self-checking test of one output-region priority encoder.
//
// Presents random report vectors of a 16-STE region. The encoder must emit
// the set bits lowest index first, one per accepted cycle, raise `more`
// exactly while two or more remain, repeat nothing, and hold its position
// when `take` is low. `advance` starts a new vector.
module tb_napoly_prio_enc;
  localparam int unsigned R = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, advance = 1'b0, take = 1'b0;
  logic [R-1:0] req = '0;
  logic valid, more;
  logic [3:0] idx;
  int checks = 0, failures = 0, n_multi = 0;

  always #5 clk = ~clk;

  napoly_prio_enc #(.R(R)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] left;
    int exp_idx, cnt;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 500; v++) begin
      req = R'($urandom) & R'($urandom);
      left = req;
      if ($countones(req) > 1) n_multi++;
      // drain the vector
      for (int c = 0; c < 40; c++) begin
        take = ($urandom_range(0, 3) != 0);
        advance = 1'b0;
        cnt = $countones(left);
        exp_idx = 0;
        for (int i = int'(R) - 1; i >= 0; i--) if (left[i]) exp_idx = i;
        #1;
        checks++;
        if (valid != (cnt > 0) || more != (cnt > 1) || (cnt > 0 && int'(idx) != exp_idx)) begin
          failures++;
          if (failures < 5) $display("FAIL v%0d c%0d idx %0d exp %0d", v, c, idx, exp_idx);
        end
        if (cnt == 0) break;
        @(negedge clk);
        if (take) left[exp_idx] = 1'b0;
      end
      // new vector
      advance = 1'b1; take = 1'b0;
      @(negedge clk);
      advance = 1'b0;
    end
    checks++; if (n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
