// cache_memory: the reconfigurable storage array of the L1 cache.
//
// N_BLOCKS identical one-word memory blocks (mem_block) hold tags and data with
// no dedicated tag store; block_registry says which block is which for the
// current configuration. Reads: every block reads the same line (the low LOG_L
// set-index bits) on both ports each cycle. Each of the first MAX_TAG_BLOCKS
// blocks, the only ones that can hold tags, has its own tag comparator; per way,
// a 1-bit MAX_TAG_BLOCKS:1 multiplexer steered by tag_registry picks the
// comparator of that way's tag block in the addressed group. This trades wide
// tag multiplexers for extra comparators, as the design prescribes. Data words
// are routed out through data_registry. Writes: every block compares its own
// distributed-registry entry (way, group, word, is_tag) with the write request.
//
// Tag word layout: [31:30] MESI state, [TAG_W-1:0] tag, other bits zero.
//
// Port A (cache controller). a_set/a_tag/a_word are sampled every cycle; the
// a_* results describe the values sampled in the previous cycle (one-cycle
// read). a_line returns the whole line of way a_line_way (combinational select).
//   a_clear    : zero every block at line a_set[LOG_L-1:0] (init / reconfig)
//   a_tag_we   : write {a_state, a_tag} into way a_sel_way of set a_set
//   a_line_we  : write a_line_wdata into all words of way a_sel_way, set a_set
//   a_word_we  : write a_wdata into word a_word of way a_sel_way, set a_set
// Port B (snooper): same lookup; b_state_we rewrites {b_state, b_tag} for
// way b_way of set b_set.
// LRU: the replacement_controller sits inside this module, as in the baseline
// design; its victim is for the set sampled on port A.
module cache_memory
  import cache_pkg::*;
#(
  parameter int N_BLOCKS       = 20,
  parameter int DEPTH          = 256,
  parameter int MAX_TAG_BLOCKS = 8,
  parameter int MAX_WAYS       = 8,
  parameter int MAX_OFF        = 4,
  parameter int LOG_L          = $clog2(DEPTH),
  parameter int MAX_GRP_BITS   = $clog2(MAX_TAG_BLOCKS),
  parameter int MAX_GROUPS     = 1 << MAX_GRP_BITS,
  parameter int MAX_WORDS      = 1 << MAX_OFF,
  parameter int SET_W          = LOG_L + MAX_GRP_BITS,
  parameter int TAG_W          = 30 - LOG_L,
  parameter int OW             = (MAX_OFF > 0) ? MAX_OFF : 1,
  parameter int WW             = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  input  logic                 cfg_load,
  // port A
  input  logic [SET_W-1:0]     a_set,
  input  logic [TAG_W-1:0]     a_tag,
  input  logic [OW-1:0]        a_word,
  input  logic [WW-1:0]        a_sel_way,
  input  logic                 a_clear,
  input  logic                 a_tag_we,
  input  mesi_t                a_state,
  input  logic                 a_line_we,
  input  logic [31:0]          a_line_wdata [MAX_WORDS],
  input  logic                 a_word_we,
  input  logic [31:0]          a_wdata,
  output logic                 a_hit,
  output logic [WW-1:0]        a_hit_way,
  output mesi_t                a_hit_state,
  output logic [31:0]          a_rword,
  output mesi_t                a_way_state [MAX_WAYS],
  output logic [TAG_W-1:0]     a_way_tag   [MAX_WAYS],
  input  logic [WW-1:0]        a_line_way,
  output logic [31:0]          a_line      [MAX_WORDS],
  output logic [WW-1:0]        a_victim,
  // LRU
  input  logic                 lru_touch,
  input  logic [WW-1:0]        lru_way,
  // port B
  input  logic [SET_W-1:0]     b_set,
  input  logic [TAG_W-1:0]     b_tag,
  input  logic [OW-1:0]        b_word,
  input  logic                 b_state_we,
  input  logic [WW-1:0]        b_way,
  input  mesi_t                b_state,
  output logic                 b_hit,
  output logic [WW-1:0]        b_hit_way,
  output mesi_t                b_hit_state,
  output logic [31:0]          b_rword
);

  localparam int BW   = $clog2(N_BLOCKS);
  localparam int NB2  = 1 << BW;          // readouts padded to a power of two
  localparam int MAX_SETS = 1 << SET_W;
  localparam int TBW  = (MAX_TAG_BLOCKS > 1) ? $clog2(MAX_TAG_BLOCKS) : 1;

  // registry
  logic [BW-1:0]           tag_reg    [MAX_WAYS][MAX_GROUPS];
  logic [BW-1:0]           data_reg   [MAX_WAYS][MAX_GROUPS][MAX_WORDS];
  logic                    blk_is_tag [N_BLOCKS];
  logic                    blk_used   [N_BLOCKS];
  logic [WW-1:0]           blk_way    [N_BLOCKS];
  logic [MAX_GRP_BITS-1:0] blk_grp    [N_BLOCKS];
  logic [OW-1:0]           blk_word   [N_BLOCKS];

  block_registry #(
    .N_BLOCKS(N_BLOCKS), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS), .MAX_WAYS(MAX_WAYS),
    .MAX_OFF(MAX_OFF), .MAX_GROUPS(MAX_GROUPS), .GW(MAX_GRP_BITS), .OW(OW), .WW(WW)
  ) u_reg (
    .clk, .rst_n, .load(cfg_load), .cfg,
    .tag_reg, .data_reg, .blk_is_tag, .blk_used, .blk_way, .blk_grp, .blk_word
  );

  // group of each port's request
  logic [MAX_GRP_BITS-1:0] a_grp, b_grp;
  assign a_grp = a_set[SET_W-1:LOG_L];
  assign b_grp = b_set[SET_W-1:LOG_L];

  // ---------------------------------------------------------------- blocks
  logic [31:0] a_rd [NB2];
  logic [31:0] b_rd [NB2];

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    logic        a_we_b, b_we_b;
    logic [31:0] a_wd_b;
    logic        a_mine, b_mine;
    assign a_mine = blk_used[b] && blk_way[b] == a_sel_way && blk_grp[b] == a_grp;
    assign b_mine = blk_used[b] && blk_is_tag[b] && blk_way[b] == b_way && blk_grp[b] == b_grp;
    always_comb begin
      a_we_b = 1'b0;
      a_wd_b = '0;
      if (a_clear) begin
        a_we_b = 1'b1;
      end else if (a_mine && blk_is_tag[b]) begin
        a_we_b = a_tag_we;
        a_wd_b = {a_state, {(30 - TAG_W){1'b0}}, a_tag};
      end else if (a_mine) begin
        if (a_line_we) begin
          a_we_b = 1'b1;
          a_wd_b = a_line_wdata[blk_word[b]];
        end else if (a_word_we && blk_word[b] == a_word) begin
          a_we_b = 1'b1;
          a_wd_b = a_wdata;
        end
      end
    end
    assign b_we_b = b_state_we && b_mine;
    mem_block #(.DEPTH(DEPTH)) u_blk (
      .clk,
      .a_we(a_we_b), .a_addr(a_set[LOG_L-1:0]), .a_wdata(a_wd_b), .a_rdata(a_rd[b]),
      .b_we(b_we_b), .b_addr(b_set[LOG_L-1:0]),
      .b_wdata({b_state, {(30 - TAG_W){1'b0}}, b_tag}), .b_rdata(b_rd[b])
    );
  end
  for (genvar b = N_BLOCKS; b < NB2; b++) begin : g_pad
    assign a_rd[b] = '0;
    assign b_rd[b] = '0;
  end

  // request registers: the lookup is compared with what the blocks return
  logic [SET_W-1:0] a_set_q, b_set_q;
  logic [TAG_W-1:0] a_tag_q, b_tag_q;
  logic [OW-1:0]    a_word_q, b_word_q;
  always_ff @(posedge clk) begin
    a_set_q  <= a_set;
    a_tag_q  <= a_tag;
    a_word_q <= a_word;
    b_set_q  <= b_set;
    b_tag_q  <= b_tag;
    b_word_q <= b_word;
  end

  // ---------------------------------------------------------- tag compare
  // one comparator per tag-capable block
  logic [MAX_TAG_BLOCKS-1:0] a_cmp, b_cmp;
  for (genvar b = 0; b < MAX_TAG_BLOCKS; b++) begin : g_cmp
    assign a_cmp[b] = (a_rd[b][31:30] != ST_I) && (a_rd[b][TAG_W-1:0] == a_tag_q);
    assign b_cmp[b] = (b_rd[b][31:30] != ST_I) && (b_rd[b][TAG_W-1:0] == b_tag_q);
  end

  int ways;
  assign ways = 1 << cfg.way_bits;

  always_comb begin
    logic [MAX_GRP_BITS-1:0] ga, gb;
    ga = a_set_q[SET_W-1:LOG_L];
    gb = b_set_q[SET_W-1:LOG_L];
    a_hit = 1'b0; a_hit_way = '0; a_hit_state = ST_I;
    b_hit = 1'b0; b_hit_way = '0; b_hit_state = ST_I;
    for (int w = 0; w < MAX_WAYS; w++) begin
      a_way_state[w] = ST_I;
      a_way_tag[w]   = '0;
      if (w < ways) begin
        a_way_state[w] = mesi_t'(a_rd[tag_reg[w][ga]][31:30]);
        a_way_tag[w]   = a_rd[tag_reg[w][ga]][TAG_W-1:0];
        if (a_cmp[TBW'(tag_reg[w][ga])]) begin
          a_hit       = 1'b1;
          a_hit_way   = WW'(w);
          a_hit_state = mesi_t'(a_rd[tag_reg[w][ga]][31:30]);
        end
        if (b_cmp[TBW'(tag_reg[w][gb])]) begin
          b_hit       = 1'b1;
          b_hit_way   = WW'(w);
          b_hit_state = mesi_t'(b_rd[tag_reg[w][gb]][31:30]);
        end
      end
    end
    a_rword = a_rd[data_reg[a_hit_way][ga][a_word_q]];
    b_rword = b_rd[data_reg[b_hit_way][gb][b_word_q]];
  end

  // whole line of one way (its select may depend on the LRU victim)
  always_comb
    for (int k = 0; k < MAX_WORDS; k++)
      a_line[k] = a_rd[data_reg[a_line_way][a_set_q[SET_W-1:LOG_L]][k]];

  // ----------------------------------------------------------------- LRU
  logic [MAX_WAYS-1:0] a_valid;
  always_comb
    for (int w = 0; w < MAX_WAYS; w++) a_valid[w] = (a_way_state[w] != ST_I);

  replacement_controller #(
    .LOG_L(LOG_L), .MAX_SETS(MAX_SETS), .MAX_WAYS(MAX_WAYS), .SET_W(SET_W), .WW(WW)
  ) u_lru (
    .clk, .way_bits(cfg.way_bits),
    .rd_set(a_set_q), .valid(a_valid), .victim(a_victim),
    .touch(lru_touch), .touch_set(a_set_q), .touch_way(lru_way),
    .clr_line(a_clear), .clr_idx(a_set[LOG_L-1:0])
  );

endmodule
