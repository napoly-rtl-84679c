// tb_napoly_top: end-to-end test of the NAPOLY overlay at reduced size (512 STEs, fan-out 10,
// 16-word output buffer, 1K-symbol input buffer).
//
// Runs 3 pass(es), each with its own randomly drawn automaton: the
// current state table is written row by row through its 64-bit write port,
// the interconnect/flag image is shifted into the 64 configuration chains
// (last word first), the input buffer is filled with random symbols from a
// small alphabet, and a pass is started. While the pass runs the output
// buffer is drained at random, as a DMA engine would. A reference model in
// this testbench steps the automaton symbol by symbol (an STE becomes active
// when the symbol is in its set and a configured predecessor was active, or
// it has the start flag), turns each report vector into report words the
// way the encoders must (per 256-STE region, lowest STE first, one per
// word), and every word read from the output buffer is compared with it.
// STEs 0..5 of the first pass hold the automaton for "ababc" (a held start
// state followed by a, b, a, b, c); its reports are also checked against a
// plain string search of the input. Counts how often each mechanism
// happened: report stall, output-buffer-full stall, backward, self and
// forward edges firing, start states, multi-encoder report words,
// reconfiguration between passes; each must happen at least once.
module tb_napoly_top;
  import napoly_pkg::*;

  localparam int unsigned N     = 512;
  localparam int unsigned F     = 10;
  localparam int unsigned OBD   = 16;
  localparam int unsigned IBD   = 1024;
  localparam int unsigned CB    = F + 2;
  localparam int BACK           = (int'(F) - 1) / 2;
  localparam int unsigned E     = num_encoders(N, OUT_REGION);
  localparam int unsigned IDW   = $clog2(N);
  localparam int unsigned W     = entry_width(N, OUT_REGION);
  localparam int unsigned WPR   = N / DRAM_W;
  localparam int unsigned WPRB  = $clog2(WPR);
  localparam int unsigned BITS  = N * CB;
  localparam int unsigned LEN   = (BITS + DRAM_W - 1) / DRAM_W;
  localparam int unsigned IBW   = $clog2(IBD / 8);
  localparam int unsigned IAW   = $clog2(IBD);
  localparam int unsigned PASSES = 3;
  localparam int unsigned ALPHA  = 4;   // symbols 'a' .. 'a'+ALPHA-1
  localparam int unsigned DRAIN_PCT = 30;
  localparam int unsigned START_DEN = 64;   // 1 in START_DEN STEs is a start state
  localparam int unsigned REP_DEN   = 8;     // 1 in REP_DEN STEs reports

  logic clk = 1'b0, rst_n = 1'b0;
  logic cst_we = 1'b0, cfg_shift = 1'b0, ib_we = 1'b0, go = 1'b0, ob_rd_en = 1'b0;
  logic [SYM_W+WPRB-1:0] cst_waddr = '0;
  logic [DRAM_W-1:0] cst_wdata = '0, cfg_data = '0, ib_wdata = '0;
  logic [IBW-1:0] ib_waddr = '0;
  logic [IAW:0] len = '0;
  logic cfg_ok, busy, done, ob_rd_valid;
  logic [W-1:0] ob_rd_data;
  logic [$clog2(OBD):0] ob_count;
  logic [31:0] n_symbols, n_cycles, n_stall_report, n_stall_full;

  always #5 clk = ~clk;

  napoly_top #(.N_STE(N), .F(F), .OB_DEPTH(OBD), .IBD(IBD)) dut (.*);

  // test state
  logic [N-1:0]    cst [256];
  logic [BITS-1:0] img;
  logic [7:0]      inp [IBD];
  logic [W-1:0]    expq [$];
  int checks = 0, failures = 0;
  int m_stall_report = 0, m_stall_full = 0, m_back = 0, m_self = 0, m_fwd = 0;
  int m_start = 0, m_multi = 0, m_reconfig = 0, m_ababc = 0, n_words = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", s, $time); end
  endtask

  function automatic int tgt(input int i, input int k);
    return i - BACK + k;
  endfunction

  // Draw a random automaton: sparse edges inside the reach, small symbol sets.
  task automatic draw_config(input int pass);
    for (int s = 0; s < 256; s++) cst[s] = '0;
    img = '0;
    for (int i = 0; i < int'(N); i++) begin
      int nsym;
      nsym = $urandom_range(1, 2);
      for (int q = 0; q < nsym; q++) cst[97 + $urandom_range(0, ALPHA - 1)][i] = 1'b1;
      for (int k = 0; k < int'(F); k++)
        if ($urandom_range(0, F - 1) < 2 && tgt(i, k) >= 0 && tgt(i, k) < int'(N))
          img[i*CB + k] = 1'b1;
      img[i*CB + F]     = ($urandom_range(0, START_DEN - 1) == 0);
      img[i*CB + F + 1] = ($urandom_range(0, REP_DEN - 1) == 0);
    end
    if (pass == 0) begin
      // STEs 0..BACK+5 are explicit: 0 = held start, 1..5 = a b a b c, rest unused
      for (int i = 0; i < BACK + 6 && i < int'(N); i++) begin
        img[i*CB +: CB] = '0;
        for (int s = 0; s < 256; s++) cst[s][i] = 1'b0;
      end
      img[0*CB + F] = 1'b1;
      for (int i = 0; i < 5; i++) img[i*CB + BACK + 1] = 1'b1;   // edge i -> i+1
      cst["a"][1] = 1'b1; cst["b"][2] = 1'b1; cst["a"][3] = 1'b1;
      cst["b"][4] = 1'b1; cst["c"][5] = 1'b1;
      img[5*CB + F + 1] = 1'b1;
      // one reporting start state right after the explicit block
      img[(BACK + 6)*CB + F]     = 1'b1;
      img[(BACK + 6)*CB + F + 1] = 1'b1;
    end
  endtask

  // Reference: step the automaton over the input and build the expected words.
  task automatic build_expected(input int n);
    logic [N-1:0] s, nx, anyin, rep;
    s = '0;
    for (int i = 0; i < int'(N); i++) s[i] = img[i*CB + F];
    for (int t = 0; t < n; t++) begin
      anyin = '0;
      for (int i = 0; i < int'(N); i++) begin
        if (s[i]) begin
          for (int k = 0; k < int'(F); k++) begin
            if (img[i*CB + k] && tgt(i, k) >= 0 && tgt(i, k) < int'(N)) begin
              if (!anyin[tgt(i, k)] && cst[inp[t]][tgt(i, k)] && !img[tgt(i, k)*CB + F]) begin
                if (k < BACK) m_back++; else if (k == BACK) m_self++; else m_fwd++;
              end
              anyin[tgt(i, k)] = 1'b1;
            end
          end
        end
      end
      for (int j = 0; j < int'(N); j++) begin
        nx[j] = img[j*CB + F] | (anyin[j] & cst[inp[t]][j]);
        rep[j] = nx[j] & img[j*CB + F + 1];
        if (img[j*CB + F] && rep[j]) m_start++;
      end
      s = nx;
      // words for this report vector
      begin
        logic [N-1:0] left;
        left = rep;
        while (left != '0) begin
          logic [W-1:0] w;
          int nv;
          w = '0; nv = 0;
          for (int e = 0; e < int'(E); e++) begin
            for (int b = 0; b < int'(OUT_REGION) && e*int'(OUT_REGION) + b < int'(N); b++) begin
              if (left[e*OUT_REGION + b]) begin
                w[e*IDW +: IDW] = IDW'(e*OUT_REGION + b);
                w[E*IDW + e] = 1'b1;
                left[e*OUT_REGION + b] = 1'b0;
                nv++;
                break;
              end
            end
          end
          w[E*IDW + E +: OFF_W] = OFF_W'(t);
          if (nv > 1) m_multi++;
          expq.push_back(w);
        end
      end
    end
  endtask

  int cur_pass = 0;
  bit ababc_seen [int];   // offsets at which STE 5 reported in pass 0

  task automatic pop_word(input logic [W-1:0] w);
    logic [W-1:0] e;
    n_words++;
    if (cur_pass == 0 && w[E*IDW] && w[0 +: IDW] == IDW'(5))
      ababc_seen[int'(w[E*IDW + E +: OFF_W])] = 1'b1;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected word %h", w);
    end else begin
      e = expq.pop_front();
      if (e != w) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %h exp %h", n_words, w, e);
      end
    end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int pass = 0; pass < int'(PASSES); pass++) begin
      chk(cfg_ok, "cfg_ok before pass");
      cur_pass = pass;
      draw_config(pass);
      if (pass > 0) m_reconfig++;
      // 1. current state tables
      for (int s = 0; s < 256; s++)
        for (int w = 0; w < int'(WPR); w++) begin
          cst_we = 1'b1;
          cst_waddr = {8'(s), WPRB'(w)};
          cst_wdata = cst[s][w*DRAM_W +: DRAM_W];
          @(negedge clk);
        end
      cst_we = 1'b0;
      // 2. interconnect and flags, last word first
      for (int w = int'(LEN) - 1; w >= 0; w--) begin
        logic [LEN*DRAM_W-1:0] full_img;
        full_img = (LEN*DRAM_W)'(img);
        cfg_shift = 1'b1;
        cfg_data = full_img[w*DRAM_W +: DRAM_W];
        @(negedge clk);
      end
      cfg_shift = 1'b0;
      // 3. input buffer
      n = (pass == 0) ? int'(IBD) : $urandom_range(IBD / 4, IBD - 1);
      for (int i = 0; i < int'(IBD); i++) inp[i] = 8'(97 + $urandom_range(0, ALPHA - 1));
      if (pass == 0)
        for (int i = 0; i + 5 <= int'(IBD); i += 40) begin   // plant "ababc"
          inp[i] = "a"; inp[i+1] = "b"; inp[i+2] = "a"; inp[i+3] = "b"; inp[i+4] = "c";
        end
      for (int w = 0; w < int'(IBD / 8); w++) begin
        ib_we = 1'b1; ib_waddr = IBW'(w);
        for (int b = 0; b < 8; b++) ib_wdata[b*8 +: 8] = inp[w*8 + b];
        @(negedge clk);
      end
      ib_we = 1'b0;
      build_expected(n);
      // run
      go = 1'b1; len = (IAW+1)'(n);
      @(negedge clk);
      go = 1'b0;
      chk(busy, "busy after go");
      while (!done) begin
        ob_rd_en = ($urandom_range(0, 99) < DRAIN_PCT);
        @(negedge clk);
        if (ob_rd_valid) pop_word(ob_rd_data);
      end
      // flush the rest
      while (ob_count != 0 || ob_rd_valid) begin
        ob_rd_en = (ob_count != 0);
        @(negedge clk);
        if (ob_rd_valid) pop_word(ob_rd_data);
      end
      ob_rd_en = 1'b0;
      chk(expq.size() == 0, "all expected words seen");
      chk(n_symbols == 32'(n), "symbol count");
      // one symbol per cycle when nothing stalls: cycles = symbols + stalls + drain
      chk(n_cycles >= 32'(n) + n_stall_report + n_stall_full, "cycle count");
      m_stall_report += int'(n_stall_report);
      m_stall_full   += int'(n_stall_full);
      $display("pass %0d: %0d symbols in %0d cycles, stalls report %0d full %0d",
               pass, n_symbols, n_cycles, n_stall_report, n_stall_full);
      expq.delete();
      // the "ababc" detector of pass 0 against a string search
      if (pass == 0) begin
        int hits;
        hits = 0;
        for (int t = 4; t < n; t++)
          if (inp[t-4] == "a" && inp[t-3] == "b" && inp[t-2] == "a" && inp[t-1] == "b" && inp[t] == "c") begin
            hits++;
            chk(ababc_seen.exists(t), "ababc reported at its offset");
          end
        chk(ababc_seen.num() == hits, "no false ababc reports");
        m_ababc = hits;
      end
    end
    $display("mechanisms: stall_report %0d stall_full %0d back %0d self %0d fwd %0d start %0d multi %0d reconfig %0d ababc %0d words %0d",
             m_stall_report, m_stall_full, m_back, m_self, m_fwd, m_start, m_multi, m_reconfig, m_ababc, n_words);
    chk(m_stall_report > 0, "report stall happened");
    chk(m_stall_full > 0, "output buffer full stall happened");
    chk(m_back > 0 && m_self > 0 && m_fwd > 0, "all edge directions fired");
    chk(m_start > 0, "start state reported");
    chk(m_multi > 0, "multi-encoder report word");
    chk(m_reconfig > 0, "reconfiguration between passes");
    chk(m_ababc > 0, "ababc found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
