// tb_napoly_reporter: self-checking test of the report unit.
//
// 64 STEs in four output regions of 16 (four encoders). Random report
// vectors, some with many reports in one region, are presented with a new
// offset whenever the unit does not stall; the output buffer's readiness is
// random. Expected report words are computed from the vector: in the k-th
// accepted cycle of a vector, encoder e reports the k-th lowest set STE of
// its region (global index) with its valid flag, and the word carries the
// offset. `stall` must be high exactly while a word cannot be written or an
// encoder still has more than one report left. The number of cycles per
// vector is checked against the largest per-region report count.
module tb_napoly_reporter;
  import napoly_pkg::*;
  localparam int unsigned N = 64, RG = 16, E = N / RG, IDW = 6;
  localparam int unsigned W = entry_width(N, RG);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, advance;
  logic [N-1:0] report = '0;
  logic [OFF_W-1:0] offset = '0;
  logic word_valid, word_ready = 1'b1, stall;
  logic [W-1:0] word;
  int checks = 0, failures = 0, n_stall_rep = 0, n_stall_full = 0;

  always #5 clk = ~clk;

  napoly_reporter #(.N_STE(N), .OUT_REG(RG)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] left;
    logic [W-1:0] exp_w;
    int maxcnt, cycles_used, taken;
    advance = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 600; v++) begin
      // new vector; applied with advance at previous edge
      case ($urandom_range(0, 3))
        0: report = '0;
        1: report = N'({$urandom, $urandom}) & N'({$urandom, $urandom}) & N'({$urandom, $urandom});
        2: report = N'({$urandom, $urandom});
        default: report = N'(1) << $urandom_range(0, N - 1);
      endcase
      offset = OFF_W'(v);
      left = report;
      maxcnt = 0;
      for (int e = 0; e < int'(E); e++)
        if ($countones(report[e*RG +: RG]) > maxcnt) maxcnt = $countones(report[e*RG +: RG]);
      taken = 0; cycles_used = 0;
      forever begin
        logic done_v;
        word_ready = ($urandom_range(0, 4) != 0);
        exp_w = '0;
        done_v = 1'b1;
        for (int e = 0; e < int'(E); e++) begin
          int lo; lo = -1;
          for (int i = int'(RG) - 1; i >= 0; i--) if (left[e*RG + i]) lo = i;
          if (lo >= 0) begin
            exp_w[e*IDW +: IDW] = IDW'(e*RG + lo);
            exp_w[E*IDW + e] = 1'b1;
          end
          if ($countones(left[e*RG +: RG]) > 1) done_v = 1'b0;
        end
        exp_w[E*IDW + E +: OFF_W] = offset;
        if (exp_w[E*IDW +: E] != '0 && !word_ready) done_v = 1'b0;
        #1;
        checks++;
        if (word_valid != (exp_w[E*IDW +: E] != '0) || (word_valid && word != exp_w) || stall != !done_v) begin
          failures++;
          if (failures < 5) $display("FAIL v%0d: word %h exp %h stall %b", v, word, exp_w, stall);
        end
        if (stall && !word_ready && word_valid) n_stall_full++;
        else if (stall) n_stall_rep++;
        advance = done_v;
        @(negedge clk);
        cycles_used++;
        if (word_ready && exp_w[E*IDW +: E] != '0) begin
          taken++;
          for (int e = 0; e < int'(E); e++)
            if (exp_w[E*IDW + e]) left[exp_w[e*IDW +: IDW]] = 1'b0;
        end
        if (done_v) break;
      end
      advance = 1'b0;
      checks++;
      if (taken != maxcnt) begin failures++; $display("FAIL words %0d exp %0d", taken, maxcnt); end
    end
    checks++; if (n_stall_rep == 0 || n_stall_full == 0) failures++;
    $display("stalls: report %0d full %0d", n_stall_rep, n_stall_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
