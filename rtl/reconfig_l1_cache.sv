// reconfig_l1_cache: one run-time reconfigurable, self-tuning L1 cache that
// reconfigures itself when it suspects a cache side-channel attack.
//
// Structure (as in the baseline L1 it extends): cache_memory (memory blocks,
// registry, comparators, LRU), cache_controller, snooper and bus_interface.
// Added around them: perf_counters, miss_class_table, utilization_tables,
// eviction_table (attack detector) and tuning_logic, which requests a
// reconfiguration when an attack is suspected or, with perf_en, when the
// hit rate and cycle count since the last reconfiguration are too poor.
// ext_rc_req/ext_rc_cfg let the outside force a configuration (for instance
// between two programs); an internal request has priority.
//
// Processor interface: cpu_req/cpu_we/cpu_addr/cpu_wdata are taken when
// cpu_ready is high; cpu_resp pulses with cpu_rdata when the access is done,
// one cycle later on a hit. Word (32-bit) accesses only.
// Bus interface: the master and snoop sides of shared_bus, see there.
// Sizes: N_BLOCKS blocks of DEPTH words; at most MAX_TAG_BLOCKS of them hold
// tags, at most MAX_WAYS ways, at most 1<<MAX_OFF words per line. The reset
// configuration is 4 ways, 256 sets, 4-word (16-byte) lines, which uses the
// default 20 blocks completely (4 tag + 16 data).
module reconfig_l1_cache
  import cache_pkg::*;
#(
  parameter int   N_BLOCKS       = 20,
  parameter int   DEPTH          = 256,
  parameter int   MAX_TAG_BLOCKS = 8,
  parameter int   MAX_WAYS       = 8,
  parameter int   MAX_OFF        = 4,
  parameter cfg_t RESET_CFG      = '{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd2},
  parameter int   CHECK_N        = 4096,
  parameter int   HIT_PCT        = 80,
  parameter int   CPR_MAX        = 4,
  parameter int   N_ENT          = 8,
  parameter int   W_THR          = 8,
  parameter int   K_THR          = 4,
  parameter int   PTAG_W         = 8,
  parameter int   MAX_WORDS      = 1 << MAX_OFF
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output logic              cpu_ready,
  output logic              cpu_resp,
  output logic [31:0]       cpu_rdata,
  // control and status
  input  logic              perf_en,
  input  logic              ext_rc_req,
  input  cfg_t              ext_rc_cfg,
  output cfg_t              cfg,
  output logic              rc_busy,
  output logic              attack,
  output cache_stats_t      stats,
  // shared bus, master side
  output logic              m_req,
  input  logic              m_grant,
  output logic              m_cmd_valid,
  output bus_req_t          m_cmd,
  output logic              m_wvalid,
  output logic [ADDR_W-1:0] m_waddr,
  output logic [31:0]       m_wdata,
  input  logic              m_wready,
  input  logic              m_rvalid,
  input  logic [31:0]       m_rdata,
  input  logic              m_done,
  input  logic              m_shared,
  // shared bus, snoop side
  input  logic              snp_valid,
  input  bus_req_t          snp_cmd,
  output logic              snp_busy,
  output logic              snp_shared,
  output logic              fl_wvalid,
  output logic [ADDR_W-1:0] fl_waddr,
  output logic [31:0]       fl_wdata,
  input  logic              fl_wready
);

  localparam int LOG_L        = $clog2(DEPTH);
  localparam int MAX_GRP_BITS = $clog2(MAX_TAG_BLOCKS);
  localparam int SET_W        = LOG_L + MAX_GRP_BITS;
  localparam int TAG_W        = 30 - LOG_L;
  localparam int OW           = (MAX_OFF > 0) ? MAX_OFF : 1;
  localparam int WW           = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1;

  // controller <-> memory
  logic [SET_W-1:0] a_set;
  logic [TAG_W-1:0] a_tag;
  logic [OW-1:0]    a_word;
  logic [WW-1:0]    a_sel_way, a_hit_way, a_line_way, a_victim, lru_way;
  logic             a_clear, a_tag_we, a_line_we, a_word_we, a_hit, lru_touch, cfg_load;
  mesi_t            a_state, a_hit_state;
  logic [31:0]      a_line_wdata [MAX_WORDS];
  logic [31:0]      a_line [MAX_WORDS];
  logic [31:0]      a_wdata, a_rword;
  mesi_t            a_way_state [MAX_WAYS];
  logic [TAG_W-1:0] a_way_tag [MAX_WAYS];
  // snooper <-> memory
  logic [SET_W-1:0] b_set;
  logic [TAG_W-1:0] b_tag;
  logic [OW-1:0]    b_word;
  logic             b_state_we, b_hit;
  logic [WW-1:0]    b_way, b_hit_way;
  mesi_t            b_state, b_hit_state;
  logic [31:0]      b_rword;
  // controller <-> bus interface
  logic             bi_start, bi_lock, bi_idle, bi_done, bi_shared;
  bus_req_t         bi_req;
  logic [31:0]      bi_wline [MAX_WORDS];
  logic [31:0]      bi_rline [MAX_WORDS];
  // events
  logic             ev_req, ev_hit, ev_miss, ev_evict, ev_install, ev_wb;
  logic             wait_miss, wait_shared_wr, wait_bus, wait_mem, rc_done;
  logic [TAG_W-1:0] evict_tag, ev_tag;
  logic [WW-1:0]    evict_way, install_way, inv_way;
  logic [SET_W-1:0] ev_set, inv_set;
  logic             ev_coh, ev_inv;
  // tuning
  logic             rc_req, int_rc_req, rc_for_attack;
  cfg_t             rc_cfg, int_rc_cfg;
  logic             is_conflict;
  logic [SET_W:0]   unused_sets;
  logic             scan_done;
  logic [15:0]      n_rc;

  assign rc_req = int_rc_req || ext_rc_req;
  assign rc_cfg = int_rc_req ? int_rc_cfg : ext_rc_cfg;

  cache_controller #(
    .DEPTH(DEPTH), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS), .MAX_WAYS(MAX_WAYS),
    .MAX_OFF(MAX_OFF), .RESET_CFG(RESET_CFG)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ready, .cpu_resp, .cpu_rdata,
    .rc_req, .rc_cfg, .rc_busy, .rc_done, .cfg, .cfg_load,
    .a_set, .a_tag, .a_word, .a_sel_way, .a_clear, .a_tag_we, .a_state, .a_line_we,
    .a_line_wdata, .a_word_we, .a_wdata, .a_hit, .a_hit_way, .a_hit_state, .a_rword,
    .a_way_state, .a_way_tag, .a_line_way, .a_line, .a_victim, .lru_touch, .lru_way,
    .bi_start, .bi_req, .bi_wline, .bi_lock, .bi_done, .bi_shared, .bi_rline,
    .ev_req, .ev_hit, .ev_miss, .ev_evict, .evict_tag, .evict_way, .ev_install,
    .install_way, .ev_set, .ev_tag, .ev_wb, .wait_miss, .wait_shared_wr
  );

  cache_memory #(
    .N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS),
    .MAX_WAYS(MAX_WAYS), .MAX_OFF(MAX_OFF)
  ) u_mem (
    .clk, .rst_n, .cfg, .cfg_load,
    .a_set, .a_tag, .a_word, .a_sel_way, .a_clear, .a_tag_we, .a_state, .a_line_we,
    .a_line_wdata, .a_word_we, .a_wdata, .a_hit, .a_hit_way, .a_hit_state, .a_rword,
    .a_way_state, .a_way_tag, .a_line_way, .a_line, .a_victim, .lru_touch, .lru_way,
    .b_set, .b_tag, .b_word, .b_state_we, .b_way, .b_state, .b_hit, .b_hit_way,
    .b_hit_state, .b_rword
  );

  snooper #(
    .LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF), .MAX_WAYS(MAX_WAYS)
  ) u_snoop (
    .clk, .rst_n, .cfg, .snp_valid, .snp_cmd, .busy(snp_busy), .shared(snp_shared),
    .fl_wvalid, .fl_waddr, .fl_wdata, .fl_wready,
    .b_set, .b_tag, .b_word, .b_state_we, .b_way, .b_state, .b_hit, .b_hit_way,
    .b_hit_state, .b_rword, .ev_coh, .ev_inv, .inv_set, .inv_way
  );

  bus_interface #(.MAX_OFF(MAX_OFF)) u_bi (
    .clk, .rst_n, .start(bi_start), .req(bi_req), .wline(bi_wline), .lock(bi_lock),
    .idle(bi_idle), .done(bi_done), .shared(bi_shared), .rline(bi_rline),
    .wait_bus, .wait_mem,
    .m_req, .m_grant, .m_cmd_valid, .m_cmd, .m_wvalid, .m_waddr, .m_wdata, .m_wready,
    .m_rvalid, .m_rdata, .m_done, .m_shared
  );

  // --------------------------------------------------------------- monitors
  logic [31:0] requests, hits, cycles, coh_ops, w_bus, w_mem, w_shwr, wbs, w_miss, rc_cyc;
  perf_counters u_cnt (
    .clk, .rst_n, .clear(rc_done), .ev_req, .ev_hit, .ev_coh,
    .wait_bus_i(wait_bus), .wait_mem_i(wait_mem), .wait_shared_wr_i(wait_shared_wr),
    .ev_wb, .wait_miss_i(wait_miss), .rc_busy,
    .requests, .hits, .cycles, .coh_ops, .wait_bus(w_bus), .wait_mem(w_mem),
    .wait_shared_wr(w_shwr), .write_backs(wbs), .wait_miss(w_miss), .rc_cycles(rc_cyc)
  );

  logic [31:0] conflict_misses, capacity_misses;
  miss_class_table #(.SET_W(SET_W), .TAG_W(TAG_W), .PTAG_W(PTAG_W)) u_mct (
    .clk, .rst_n, .clear(rc_done),
    .ev_evict, .evict_set(ev_set), .evict_tag,
    .ev_miss, .miss_set(ev_set), .miss_tag(ev_tag),
    .is_conflict, .conflict_misses, .capacity_misses
  );

  logic [$clog2(MAX_WAYS):0] set_util [1 << SET_W];
  logic [SET_W:0]            way_util [MAX_WAYS];
  utilization_tables #(.LOG_L(LOG_L), .SET_W(SET_W), .MAX_WAYS(MAX_WAYS), .WW(WW)) u_util (
    .clk, .rst_n, .grp_bits(cfg.grp_bits),
    .clr_line(a_clear), .clr_idx(a_set[LOG_L-1:0]),
    .inc(ev_install), .inc_set(ev_set), .inc_way(install_way),
    .dec_a(ev_evict), .dec_a_set(ev_set), .dec_a_way(evict_way),
    .dec_b(ev_inv), .dec_b_set(inv_set), .dec_b_way(inv_way),
    .set_util, .way_util, .unused_sets, .scan_done
  );

  logic [$clog2(N_ENT):0] suspicious;
  logic                   evt_busy;
  logic [15:0]            evt_dropped;
  eviction_table #(.SET_W(SET_W), .N_ENT(N_ENT), .W_THR(W_THR), .K_THR(K_THR)) u_evt (
    .clk, .rst_n, .clear(rc_done), .ev_evict, .evict_set(ev_set),
    .attack, .suspicious, .busy(evt_busy), .dropped(evt_dropped)
  );

  logic [15:0] n_attack_rc, n_perf_rc;
  tuning_logic #(
    .N_BLOCKS(N_BLOCKS), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS), .MAX_WAYS(MAX_WAYS),
    .MAX_OFF(MAX_OFF), .CHECK_N(CHECK_N), .HIT_PCT(HIT_PCT), .CPR_MAX(CPR_MAX),
    .SET_CW(SET_W + 1)
  ) u_tune (
    .clk, .rst_n, .cfg, .log_l(8'(LOG_L)), .perf_en, .attack, .rc_busy, .rc_done,
    .requests, .hits, .cycles, .conflict_misses, .capacity_misses, .unused_sets,
    .rc_req(int_rc_req), .rc_cfg(int_rc_cfg), .rc_for_attack, .n_attack_rc, .n_perf_rc
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n_rc <= '0;
    else if (rc_done) n_rc <= n_rc + 1'b1;

  assign stats = '{
    requests: requests, hits: hits, cycles: cycles, coh_ops: coh_ops,
    wait_bus: w_bus, wait_mem: w_mem, wait_shared_wr: w_shwr, write_backs: wbs,
    wait_miss: w_miss, rc_cycles: rc_cyc, conflict_misses: conflict_misses,
    capacity_misses: capacity_misses, unused_sets: 16'(unused_sets),
    n_attack_rc: n_attack_rc, n_perf_rc: n_perf_rc, n_rc: n_rc
  };

endmodule
