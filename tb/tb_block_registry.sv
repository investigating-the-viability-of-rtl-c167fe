// tb_block_registry: self-checking testbench for block_registry, which turns
// a cache configuration (ways, groups, words per line) into the centralized
// tag and data registries and the per-block distributed registry.
// For every configuration that fits 20 blocks it loads the registry and checks
// each entry against the allocation rule: tag blocks first, block g*ways+w
// holds the tags of way w of group g, and word k of that way/group lives in
// block T+(g*ways+w)*words+k (T = ways*groups). It also checks that the
// distributed registry of every block points back at the same way, group and
// word. The rule follows the published design's block-allocation figures; the exact
// numbering is this design's choice.
module tb_block_registry;
  import cache_pkg::*;
  localparam int N_BLOCKS = 20, MAX_TAG_BLOCKS = 8, MAX_WAYS = 8, MAX_OFF = 4;
  localparam int MAX_GROUPS = MAX_TAG_BLOCKS, MAX_WORDS = 1 << MAX_OFF;
  localparam int BW = $clog2(N_BLOCKS), WW = 3, GW = 3, OW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_cfg = 0;

  logic rst_n, load;
  cfg_t cfg;
  logic [BW-1:0] tag_reg  [MAX_WAYS][MAX_GROUPS];
  logic [BW-1:0] data_reg [MAX_WAYS][MAX_GROUPS][MAX_WORDS];
  logic          blk_is_tag [N_BLOCKS];
  logic          blk_used   [N_BLOCKS];
  logic [WW-1:0] blk_way    [N_BLOCKS];
  logic [GW-1:0] blk_grp    [N_BLOCKS];
  logic [OW-1:0] blk_word   [N_BLOCKS];

  block_registry #(.N_BLOCKS(N_BLOCKS), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS),
                   .MAX_WAYS(MAX_WAYS), .MAX_OFF(MAX_OFF)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg %0d-%0d-%0d", what, cfg.way_bits, cfg.grp_bits, cfg.off_bits);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; cfg = '0;
    #12 rst_n = 1;
    for (int wb = 0; wb <= 3; wb++)
      for (int gb = 0; gb <= 3; gb++)
        for (int ob = 0; ob <= MAX_OFF; ob++) begin
          int ways, groups, words, t;
          logic seen [N_BLOCKS];
          if (cfg_fits(wb, gb, ob, N_BLOCKS, MAX_TAG_BLOCKS, MAX_WAYS, MAX_OFF)) begin
          n_cfg++;
          ways = 1 << wb; groups = 1 << gb; words = 1 << ob; t = ways * groups;
          @(negedge clk);
          cfg = '{way_bits: 3'(wb), grp_bits: 3'(gb), off_bits: 3'(ob)}; load = 1;
          @(negedge clk); load = 0;
          foreach (seen[b]) seen[b] = 0;
          for (int g = 0; g < groups; g++)
            for (int w = 0; w < ways; w++) begin
              int tb_;
              tb_ = g * ways + w;
              chk(int'(tag_reg[w][g]) == tb_, "tag registry");
              chk(blk_is_tag[tb_] && blk_used[tb_] && int'(blk_way[tb_]) == w && int'(blk_grp[tb_]) == g,
                  "tag block distributed registry");
              seen[tb_] = 1;
              for (int k = 0; k < words; k++) begin
                int db;
                db = t + tb_ * words + k;
                chk(int'(data_reg[w][g][k]) == db, "data registry");
                chk(!blk_is_tag[db] && blk_used[db] && int'(blk_way[db]) == w &&
                    int'(blk_grp[db]) == g && int'(blk_word[db]) == k, "data block distributed registry");
                seen[db] = 1;
              end
            end
          for (int b = 0; b < N_BLOCKS; b++)
            if (!seen[b]) chk(!blk_used[b], "spare block marked unused");
          end
        end
    chk(n_cfg == 26, "all 26 configurations");
    $display("%0d configurations checked", n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
