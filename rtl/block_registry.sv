// block_registry: where every memory block sits in the cache's logical structure.
//
// The cache is seen as a 3D structure (ways x sets x words). Each memory block
// covers one block-depth slice of sets, called a group here, and either holds
// the tags of one (way, group) or one word column of one (way, group). The
// allocation rule is fixed: blocks 0 .. T-1 hold tags, T = ways*groups, block
// g*ways+w holding the tags of way w, group g; the data blocks follow, the k-th
// word of (w, g) in block T + (g*ways+w)*words + k. Tag storage therefore never
// leaves the first MAX_TAG_BLOCKS blocks, so only those feed tag comparators.
// The rule reproduces the block numbering of the allocation figures of the
// design (4-way/1-word, direct-mapped/2-word, direct-mapped/4-word); ordering
// the tags of several ways and groups as g*ways+w is this design's choice.
//
// Three tables are loaded, one cycle after `load`, from the configuration:
//   tag_reg  [way][group]        -> block number   (the 2D tag_registry)
//   data_reg [way][group][word]  -> block number   (the 3D data_registry)
//   blk_*    [block]             -> is_tag, used, way, group, word
//                                   (the distributed registry: four small
//                                   registers kept beside every block)
// The centralized tables steer the read multiplexers; the distributed one
// drives each block's write enable and write-data select.
module block_registry
  import cache_pkg::*;
#(
  parameter int N_BLOCKS       = 20,
  parameter int MAX_TAG_BLOCKS = 8,
  parameter int MAX_WAYS       = 8,
  parameter int MAX_OFF        = 4,
  parameter int MAX_GROUPS     = MAX_TAG_BLOCKS,
  parameter int MAX_WORDS      = 1 << MAX_OFF,
  parameter int BW             = $clog2(N_BLOCKS),
  parameter int WW             = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1,
  parameter int GW             = (MAX_GROUPS > 1) ? $clog2(MAX_GROUPS) : 1,
  parameter int OW             = (MAX_WORDS > 1) ? $clog2(MAX_WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  cfg_t          cfg,
  output logic [BW-1:0] tag_reg  [MAX_WAYS][MAX_GROUPS],
  output logic [BW-1:0] data_reg [MAX_WAYS][MAX_GROUPS][MAX_WORDS],
  output logic          blk_is_tag [N_BLOCKS],
  output logic          blk_used   [N_BLOCKS],
  output logic [WW-1:0] blk_way    [N_BLOCKS],
  output logic [GW-1:0] blk_grp    [N_BLOCKS],
  output logic [OW-1:0] blk_word   [N_BLOCKS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BLOCKS; b++) begin
        blk_is_tag[b] <= 1'b0;
        blk_used[b]   <= 1'b0;
        blk_way[b]    <= '0;
        blk_grp[b]    <= '0;
        blk_word[b]   <= '0;
      end
      for (int w = 0; w < MAX_WAYS; w++)
        for (int g = 0; g < MAX_GROUPS; g++) begin
          tag_reg[w][g] <= '0;
          for (int k = 0; k < MAX_WORDS; k++) data_reg[w][g][k] <= '0;
        end
    end else if (load) begin
      int ways, words, ntag;
      ways  = 1 << cfg.way_bits;
      words = 1 << cfg.off_bits;
      ntag  = ways << cfg.grp_bits;
      for (int b = 0; b < N_BLOCKS; b++) begin
        int t, k;
        if (b < ntag) begin
          t = b;
          k = 0;
        end else begin
          t = (b - ntag) >> cfg.off_bits;
          k = (b - ntag) & (words - 1);
        end
        blk_is_tag[b] <= (b < ntag);
        blk_used[b]   <= (t < ntag);
        blk_way[b]    <= WW'(t & (ways - 1));
        blk_grp[b]    <= GW'(t >> cfg.way_bits);
        blk_word[b]   <= OW'(k);
      end
      for (int w = 0; w < MAX_WAYS; w++)
        for (int g = 0; g < MAX_GROUPS; g++) begin
          tag_reg[w][g] <= BW'(g * ways + w);
          for (int k = 0; k < MAX_WORDS; k++)
            data_reg[w][g][k] <= BW'(ntag + (g * ways + w) * words + k);
        end
    end
  end

endmodule
