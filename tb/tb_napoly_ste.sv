// tb_napoly_ste: self-checking test of one State Transition Element.
//
// Drives random predecessor activations, match bits, flags and clear/advance
// pulses into a fan-out-6 STE and compares its state bit, gated outputs and
// report output against a reference model written from the STE rule:
// next = start | (OR(act_in) & match) on advance, start flag on clear.
module tb_napoly_ste;
  localparam int unsigned F = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, advance, match, start_flag, report_flag;
  logic [F-1:0] act_in, edge_en, act_out;
  logic active, report;
  logic ref_state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  napoly_ste #(.F(F)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int n_set_by_edge = 0, n_held_by_start = 0;

  initial begin
    {clear, advance, match, start_flag, report_flag, act_in, edge_en} = '0;
    ref_state = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      clear       = ($urandom_range(0, 49) == 0);
      advance     = ($urandom_range(0, 3) != 0);
      match       = $urandom_range(0, 1);
      act_in      = ($urandom_range(0, 2) == 0) ? F'($urandom) : '0;
      edge_en     = F'($urandom);
      start_flag  = ($urandom_range(0, 9) == 0);
      report_flag = $urandom_range(0, 1);
      #1;
      check(active == ref_state, "state");
      check(act_out == ({F{ref_state}} & edge_en), "act_out");
      check(report == (ref_state & report_flag), "report");
      @(posedge clk);
      if (clear) ref_state = start_flag;
      else if (advance) begin
        if (!start_flag && (|act_in) && match) n_set_by_edge++;
        if (start_flag) n_held_by_start++;
        ref_state = start_flag | ((|act_in) & match);
      end
    end
    check(n_set_by_edge > 0 && n_held_by_start > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
