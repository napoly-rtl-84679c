// tb_napoly_ctrl: self-checking test of the pass sequencer.
//
// Emulates the input buffer (a symbol counter with random availability) and
// the reporter (random stall and word-valid requests, random full output
// buffer) around the controller and checks, every cycle, the state
// sequence IDLE -> RUN -> DRAIN -> DONE, that `advance` is exactly
// RUN & symbol valid & no stall, that `clear` follows an accepted `go` only,
// that the offset register holds the last consumed symbol's offset, and the
// symbol, cycle and stall counters at the end of each pass.
module tb_napoly_ctrl;
  import napoly_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic go = 1'b0, sym_valid, ib_empty, rep_stall = 1'b0, rep_word_valid = 1'b0, ob_full = 1'b0;
  logic [OFF_W-1:0] sym_off;
  logic clear, advance, rep_en, cfg_ok, busy, done;
  logic [OFF_W-1:0] offset;
  ctrl_state_e state;
  logic [31:0] n_symbols, n_cycles, n_stall_report, n_stall_full;
  int checks = 0, failures = 0;
  int ptr = 0, len = 0, gaps = 0;

  always #5 clk = ~clk;

  napoly_ctrl dut (.*);

  assign sym_valid = (ptr < len) && (gaps == 0);
  assign ib_empty  = (ptr >= len);
  assign sym_off   = OFF_W'(ptr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    int exp_sym, exp_cyc, exp_sr, exp_sf, last_off;
    ctrl_state_e exp_st;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_st = CTRL_IDLE;
    for (int pass = 0; pass < 20; pass++) begin
      // idle cycles: go is ignored only when busy
      repeat ($urandom_range(1, 4)) begin
        #1; chk(state == exp_st && cfg_ok && !busy && !advance && !clear, "idle");
        @(negedge clk);
      end
      go = 1'b1; len = $urandom_range(0, 200); ptr = 0;
      #1; chk(clear, "clear on go");
      @(negedge clk); go = 1'b0;
      exp_st = CTRL_RUN;
      exp_sym = 0; exp_cyc = 0; exp_sr = 0; exp_sf = 0; last_off = 0;
      while (exp_st != CTRL_DONE) begin
        bit exp_adv;
        gaps = ($urandom_range(0, 5) == 0);
        rep_word_valid = ($urandom_range(0, 1) == 0);
        ob_full = rep_word_valid && ($urandom_range(0, 4) == 0);
        rep_stall = ob_full || ($urandom_range(0, 3) == 0);
        if (exp_st == CTRL_DRAIN && $urandom_range(0, 2) == 0) rep_word_valid = 1'b0;
        go = ($urandom_range(0, 9) == 0);   // must be ignored while busy
        #1;
        exp_adv = (exp_st == CTRL_RUN) && sym_valid && !rep_stall;
        chk(state == exp_st, "state");
        chk(advance == exp_adv, "advance");
        chk(!clear && busy && !done, "busy");
        if (exp_st == CTRL_RUN && sym_valid && rep_stall) begin
          if (rep_word_valid && ob_full) exp_sf++; else exp_sr++;
        end
        exp_cyc++;
        @(negedge clk);
        if (exp_adv) begin exp_sym++; last_off = ptr; ptr++; end
        case (exp_st)
          CTRL_RUN:   if (ptr - (exp_adv ? 1 : 0) >= len) exp_st = CTRL_DRAIN;
          CTRL_DRAIN: if (!rep_word_valid) exp_st = CTRL_DONE;
          default: ;
        endcase
        #1;
        if (exp_sym > 0 && exp_st != CTRL_DONE) chk(rep_en && offset == OFF_W'(last_off), "offset");
        if (exp_st == CTRL_DONE) chk(!rep_en, "rep_en off when done");
      end
      go = 1'b0; rep_word_valid = 1'b0; rep_stall = 1'b0; ob_full = 1'b0;
      #1;
      chk(done && cfg_ok, "done");
      chk(n_symbols == 32'(exp_sym) && exp_sym == len, "symbols");
      chk(n_cycles == 32'(exp_cyc), "cycles");
      chk(n_stall_report == 32'(exp_sr) && n_stall_full == 32'(exp_sf), "stall counters");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
