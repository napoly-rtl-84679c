// tb_napoly_cfg_chain: self-checking test of the parallel configuration chains.
//
// Shifts random images into a small chain set (12 STEs, fan-out 5, 16
// chains), with gaps in shift_en, and checks that after LEN shifts the flat
// image equals the words sent, last word sent in word 0. Also checks that
// the image holds while shift_en is low and that reset clears it.
module tb_napoly_cfg_chain;
  localparam int unsigned N = 12, F = 5, CH = 16;
  localparam int unsigned BITS = N * (F + 2);
  localparam int unsigned LEN  = (BITS + CH - 1) / CH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en = 1'b0;
  logic [CH-1:0] shift_in = '0;
  logic [BITS-1:0] cfg;
  logic [LEN*CH-1:0] img;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  napoly_cfg_chain #(.N_STE(N), .F(F), .CH(CH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (cfg != '0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < int'(LEN); w++) img[w*CH +: CH] = CH'($urandom);
      // send last word first; random idle cycles in between
      for (int w = int'(LEN) - 1; w >= 0; w--) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk); shift_en = 1'b0; shift_in = CH'($urandom);
        end
        @(negedge clk); shift_en = 1'b1; shift_in = img[w*CH +: CH];
      end
      @(negedge clk); shift_en = 1'b0;
      checks++;
      if (cfg != img[BITS-1:0]) begin
        failures++;
        $display("FAIL image %0d", t);
      end
      repeat (3) @(negedge clk);
      checks++; if (cfg != img[BITS-1:0]) failures++;
    end
    rst_n = 1'b0; #1;
    checks++; if (cfg != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
