// tb_cache_memory: self-checking testbench for cache_memory, the block-built
// storage array of the L1 with its registries, tag comparators and LRU.
// For six configurations (4-way/4-word, 2-way/8-word, 8-way/1-word,
// 1-way/2-group/8-word, 2-way/2-group/4-word, 1-way/16-word) it loads the
// registry, clears every line, and then runs 1500 random operations against a
// reference array of tag, MESI state and data per way and set: line fills
// (tag and line written together), single-word writes, snooper state writes
// through port B, and lookups on both ports. Lookups check hit, hit way, hit
// state, the read word, every way's state and tag, a whole line, and, for a
// full set, that the LRU victim is one of the set's ways. The published design fixes
// the block-based organisation and the comparator-per-tag-block lookup; the
// port timing and tag-word layout are this design's choice.
module tb_cache_memory;
  import cache_pkg::*;
  localparam int N_BLOCKS = 20, DEPTH = 256, MAX_TAG_BLOCKS = 8, MAX_WAYS = 8, MAX_OFF = 4;
  localparam int LOG_L = 8, SET_W = 11, TAG_W = 22, OW = 4, WW = 3, MAX_WORDS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_hits = 0;

  logic rst_n, cfg_load;
  cfg_t cfg;
  logic [SET_W-1:0] a_set, b_set;
  logic [TAG_W-1:0] a_tag, b_tag;
  logic [OW-1:0] a_word, b_word;
  logic [WW-1:0] a_sel_way, a_hit_way, a_line_way, a_victim, lru_way, b_way, b_hit_way;
  logic a_clear, a_tag_we, a_line_we, a_word_we, a_hit, lru_touch, b_state_we, b_hit;
  mesi_t a_state, a_hit_state, b_state, b_hit_state;
  logic [31:0] a_line_wdata [MAX_WORDS];
  logic [31:0] a_wdata, a_rword, b_rword;
  mesi_t a_way_state [MAX_WAYS];
  logic [TAG_W-1:0] a_way_tag [MAX_WAYS];
  logic [31:0] a_line [MAX_WORDS];

  cache_memory #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS),
                 .MAX_WAYS(MAX_WAYS), .MAX_OFF(MAX_OFF)) dut (.*);

  // reference, over 8 sets of the current configuration
  mesi_t       m_st  [8][MAX_WAYS];
  logic [21:0] m_tag [8][MAX_WAYS];
  logic [31:0] m_dat [8][MAX_WAYS][MAX_WORDS];
  int ways, words, nsets;

  function automatic logic [SET_W-1:0] set_of(input int i);
    return SET_W'((i * 53 + (i % 2) * 200) % nsets);
  endfunction

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0h exp %0h cfg %0d-%0d-%0d t=%0t", what, got, exp,
                                  cfg.way_bits, cfg.grp_bits, cfg.off_bits, $time);
    end
  endtask

  task automatic idle();
    a_clear = 0; a_tag_we = 0; a_line_we = 0; a_word_we = 0; b_state_we = 0; lru_touch = 0;
  endtask

  task automatic lookup(input int s, input logic [21:0] t, input int k, input int lw);
    int hw;
    @(negedge clk);
    idle();
    a_set = set_of(s); a_tag = t; a_word = OW'(k); b_set = set_of(s); b_tag = t; b_word = OW'(k);
    a_line_way = WW'(lw);
    @(posedge clk); #1;
    hw = -1;
    for (int w = 0; w < ways; w++) if (m_st[s][w] != ST_I && m_tag[s][w] == t) hw = w;
    cmp("a_hit", int'(a_hit), int'(hw >= 0));
    cmp("b_hit", int'(b_hit), int'(hw >= 0));
    if (hw >= 0) begin
      n_hits++;
      cmp("a_hit_way", int'(a_hit_way), hw);   cmp("b_hit_way", int'(b_hit_way), hw);
      cmp("a_hit_state", int'(a_hit_state), int'(m_st[s][hw]));
      cmp("b_hit_state", int'(b_hit_state), int'(m_st[s][hw]));
      cmp("a_rword", a_rword, m_dat[s][hw][k]); cmp("b_rword", b_rword, m_dat[s][hw][k]);
    end
    for (int w = 0; w < ways; w++) begin
      cmp("way state", int'(a_way_state[w]), int'(m_st[s][w]));
      if (m_st[s][w] != ST_I) cmp("way tag", int'(a_way_tag[w]), int'(m_tag[s][w]));
    end
    for (int i = 0; i < words; i++) cmp("line word", a_line[i], m_dat[s][lw][i]);
    if (m_st[s][ways-1] != ST_I) cmp("victim in range", int'(int'(a_victim) < ways), 1);
  endtask

  initial begin
    #20000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  cfg_t cfgs [6] = '{'{2,0,2}, '{1,0,3}, '{3,0,0}, '{0,1,3}, '{1,1,2}, '{0,0,4}};

  initial begin
    rst_n = 0; cfg_load = 0; cfg = cfgs[0]; idle();
    a_set = 0; a_tag = 0; a_word = 0; a_sel_way = 0; a_state = ST_I; a_wdata = 0; a_line_way = 0;
    b_set = 0; b_tag = 0; b_word = 0; b_way = 0; b_state = ST_I; lru_way = 0;
    foreach (a_line_wdata[i]) a_line_wdata[i] = 0;
    #12 rst_n = 1;
    foreach (cfgs[c]) begin
      cfg = cfgs[c];
      ways = 1 << cfg.way_bits; words = 1 << cfg.off_bits; nsets = 256 << cfg.grp_bits;
      @(negedge clk); cfg_load = 1;
      @(negedge clk); cfg_load = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); a_clear = 1; a_set = SET_W'(i);
      end
      @(negedge clk); idle();
      for (int s = 0; s < 8; s++) for (int w = 0; w < MAX_WAYS; w++) begin
        m_st[s][w] = ST_I; m_tag[s][w] = 0;
        for (int i = 0; i < MAX_WORDS; i++) m_dat[s][w][i] = 0;
      end
      for (int n = 0; n < 1500; n++) begin
        int s, w, op;
        s = $urandom % 8; w = $urandom % ways; op = $urandom % 6;
        if (op == 0) begin                       // line fill
          @(negedge clk); idle();
          a_set = set_of(s); a_sel_way = WW'(w); a_tag = 22'($urandom % 5);
          a_state = mesi_t'(1 + $urandom % 3);
          a_tag_we = 1; a_line_we = 1; lru_touch = 1; lru_way = WW'(w);
          for (int i = 0; i < MAX_WORDS; i++) a_line_wdata[i] = $urandom;
          m_st[s][w] = a_state; m_tag[s][w] = a_tag;
          for (int i = 0; i < words; i++) m_dat[s][w][i] = a_line_wdata[i];
        end else if (op == 1) begin              // word write
          int k;
          k = $urandom % words;
          @(negedge clk); idle();
          a_set = set_of(s); a_sel_way = WW'(w); a_word = OW'(k); a_wdata = $urandom;
          a_word_we = 1;
          m_dat[s][w][k] = a_wdata;
        end else if (op == 2) begin              // snooper state change
          @(negedge clk); idle();
          b_set = set_of(s); b_way = WW'(w); b_tag = m_tag[s][w];
          b_state = mesi_t'($urandom % 4); b_state_we = 1;
          m_st[s][w] = b_state;
        end else begin
          lookup(s, (op == 3) ? 22'($urandom % 5) : m_tag[s][$urandom % ways], $urandom % words,
                 $urandom % ways);
        end
      end
      @(negedge clk); idle();
    end
    cmp("hits seen", int'(n_hits > 500), 1);
    $display("%0d hits", n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
