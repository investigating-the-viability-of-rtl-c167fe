// cache_controller: control FSM of the run-time reconfigurable L1 cache.
//
// Normal operation is that of a blocking, write-back, write-allocate L1:
//   IDLE   accepts one processor request (cpu_req && cpu_ready) and presents
//          its set/tag to cache_memory in the same cycle;
//   CHECK  one cycle later: a read hit, or a write hit on an E/M line, answers
//          (cpu_resp) and updates LRU, so a hit takes one cycle; a write hit
//          on an S line first broadcasts BUS_UPGR; a miss picks the LRU victim,
//          writes it back if dirty (BUS_WB, address from address_builder) and
//          fetches the line (BUS_RD, or BUS_RDX for a write) through the bus
//          interface, installs it (E, or S when another cache keeps a copy),
//          and replays the lookup, which now hits.
// Reconfiguration (rc_req with the new configuration rc_cfg):
//   RC_ACQ   a dummy read through the bus interface with `lock` held, so the
//            cache keeps the bus once the read completes;
//   RC_READ/RC_WAY/RC_WB  every set of the current configuration is read and
//            every dirty way written back to the level below over the held bus;
//   RC_APPLY the new configuration is stored and the block registry reloaded;
//   INIT     every memory line (and the LRU state) is cleared, then the bus
//            is released (RC_REL) and rc_done pulses.
// INIT also runs after reset, with the configuration RESET_CFG.
// Write-back before reconfiguration, holding the bus from a dummy read, and
// the address splitter/builder follow the design. Clearing every line after
// applying the new configuration (instead of invalidating line by line) is
// this design's choice: a block that held data may hold tags afterwards.
// Event outputs feed the performance counters and monitoring tables.
module cache_controller
  import cache_pkg::*;
#(
  parameter int   DEPTH          = 256,
  parameter int   MAX_TAG_BLOCKS = 8,
  parameter int   MAX_WAYS       = 8,
  parameter int   MAX_OFF        = 4,
  parameter cfg_t RESET_CFG      = '{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd2},
  parameter int   LOG_L          = $clog2(DEPTH),
  parameter int   MAX_GRP_BITS   = $clog2(MAX_TAG_BLOCKS),
  parameter int   MAX_WORDS      = 1 << MAX_OFF,
  parameter int   SET_W          = LOG_L + MAX_GRP_BITS,
  parameter int   TAG_W          = 30 - LOG_L,
  parameter int   OW             = (MAX_OFF > 0) ? MAX_OFF : 1,
  parameter int   WW             = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
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
  // reconfiguration
  input  logic              rc_req,
  input  cfg_t              rc_cfg,
  output logic              rc_busy,
  output logic              rc_done,
  output cfg_t              cfg,
  output logic              cfg_load,
  // cache_memory port A
  output logic [SET_W-1:0]  a_set,
  output logic [TAG_W-1:0]  a_tag,
  output logic [OW-1:0]     a_word,
  output logic [WW-1:0]     a_sel_way,
  output logic              a_clear,
  output logic              a_tag_we,
  output mesi_t             a_state,
  output logic              a_line_we,
  output logic [31:0]       a_line_wdata [MAX_WORDS],
  output logic              a_word_we,
  output logic [31:0]       a_wdata,
  input  logic              a_hit,
  input  logic [WW-1:0]     a_hit_way,
  input  mesi_t             a_hit_state,
  input  logic [31:0]       a_rword,
  input  mesi_t             a_way_state [MAX_WAYS],
  input  logic [TAG_W-1:0]  a_way_tag   [MAX_WAYS],
  output logic [WW-1:0]     a_line_way,
  input  logic [31:0]       a_line      [MAX_WORDS],
  input  logic [WW-1:0]     a_victim,
  output logic              lru_touch,
  output logic [WW-1:0]     lru_way,
  // bus interface
  output logic              bi_start,
  output bus_req_t          bi_req,
  output logic [31:0]       bi_wline [MAX_WORDS],
  output logic              bi_lock,
  input  logic              bi_done,
  input  logic              bi_shared,
  input  logic [31:0]       bi_rline [MAX_WORDS],
  // events
  output logic              ev_req,
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_evict,
  output logic [TAG_W-1:0]  evict_tag,
  output logic [WW-1:0]     evict_way,
  output logic              ev_install,
  output logic [WW-1:0]     install_way,
  output logic [SET_W-1:0]  ev_set,
  output logic [TAG_W-1:0]  ev_tag,
  output logic              ev_wb,
  output logic              wait_miss,
  output logic              wait_shared_wr
);

  typedef enum logic [3:0] {
    C_INIT, C_IDLE, C_CHECK, C_UPGR, C_WB, C_FETCH, C_FILL, C_REPLAY,
    C_RC_ACQ, C_RC_READ, C_RC_WAY, C_RC_WB, C_RC_APPLY, C_RC_REL
  } cstate_t;

  cstate_t           st;
  logic [ADDR_W-1:0] addr_q;
  logic              we_q;
  logic [31:0]       wdata_q;
  logic              upg_q;         // upgrade done for this request
  logic              rc_pend, rc_init;
  cfg_t              rc_cfg_q;
  logic [WW-1:0]     vic_q;
  logic [TAG_W-1:0]  vtag_q;
  logic [SET_W-1:0]  walk_set;
  logic [WW:0]       walk_way;
  logic [LOG_L-1:0]  init_idx;
  logic [31:0]       wline_q [MAX_WORDS];
  logic              sent;          // bus request issued in this state

  // ------------------------------------------------------ address fields
  logic [OW-1:0]     s_word;
  logic [SET_W-1:0]  s_set;
  logic [TAG_W-1:0]  s_tag;
  logic [ADDR_W-1:0] b_addr;
  logic [TAG_W-1:0]  b_tag_in;
  logic [SET_W-1:0]  b_set_in;

  address_splitter #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF)) u_split (
    .addr((st == C_IDLE) ? cpu_addr : addr_q), .cfg, .word(s_word), .set(s_set), .tag(s_tag)
  );
  address_builder #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF)) u_build (
    .tag(b_tag_in), .set(b_set_in), .word('0), .cfg, .addr(b_addr)
  );

  int ways, nsets;
  assign ways  = 1 << cfg.way_bits;
  assign nsets = DEPTH << cfg.grp_bits;

  logic in_walk;
  assign in_walk  = (st == C_RC_READ || st == C_RC_WAY || st == C_RC_WB);
  assign b_set_in = in_walk ? walk_set : s_set;
  assign b_tag_in = in_walk ? a_way_tag[walk_way[WW-1:0]] : vtag_q;

  // line address of the current request
  logic [ADDR_W-1:0] req_line;
  assign req_line = addr_q & ~((ADDR_W'(4) << cfg.off_bits) - 1);

  logic writable;
  assign writable = a_hit && (a_hit_state == ST_M || a_hit_state == ST_E ||
                              (a_hit_state == ST_S && upg_q));

  // ------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_INIT;
      cfg      <= RESET_CFG;
      addr_q   <= '0;
      we_q     <= 1'b0;
      wdata_q  <= '0;
      upg_q    <= 1'b0;
      rc_pend  <= 1'b0;
      rc_init  <= 1'b0;
      rc_cfg_q <= RESET_CFG;
      vic_q    <= '0;
      vtag_q   <= '0;
      walk_set <= '0;
      walk_way <= '0;
      init_idx <= '0;
      sent     <= 1'b0;
      for (int k = 0; k < MAX_WORDS; k++) wline_q[k] <= '0;
    end else begin
      if (rc_req && !rc_pend) begin
        rc_pend  <= 1'b1;
        rc_cfg_q <= rc_cfg;
      end
      sent <= 1'b0;
      case (st)
        C_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (int'(init_idx) == DEPTH - 1) begin
            st      <= rc_init ? C_RC_REL : C_IDLE;
            rc_init <= 1'b0;
          end
        end
        C_IDLE:
          if (rc_pend) st <= C_RC_ACQ;
          else if (cpu_req) begin
            addr_q  <= cpu_addr;
            we_q    <= cpu_we;
            wdata_q <= cpu_wdata;
            upg_q   <= 1'b0;
            st      <= C_CHECK;
          end
        C_CHECK:
          if (a_hit && (!we_q || writable)) st <= C_IDLE;
          else if (a_hit) begin
            st <= C_UPGR;
          end else begin
            vic_q  <= a_victim;
            vtag_q <= a_way_tag[a_victim];
            for (int k = 0; k < MAX_WORDS; k++) wline_q[k] <= a_line[k];
            st <= (a_way_state[a_victim] == ST_M) ? C_WB : C_FETCH;
          end
        C_UPGR:
          if (bi_done) begin
            upg_q <= 1'b1;
            st    <= C_REPLAY;
          end else sent <= 1'b1;
        C_WB:
          if (bi_done) st <= C_FETCH;
          else sent <= 1'b1;
        C_FETCH: st <= C_FILL;
        C_FILL:  if (bi_done) st <= C_REPLAY;
        C_REPLAY: st <= C_CHECK;
        // ---------------------------------------------- reconfiguration
        C_RC_ACQ:
          if (bi_done) begin
            walk_set <= '0;
            st       <= C_RC_READ;
          end else sent <= 1'b1;
        C_RC_READ: begin
          walk_way <= '0;
          st       <= C_RC_WAY;
        end
        C_RC_WAY:
          if (int'(walk_way) < ways) begin
            if (a_way_state[walk_way[WW-1:0]] == ST_M) begin
              for (int k = 0; k < MAX_WORDS; k++) wline_q[k] <= a_line[k];
              st <= C_RC_WB;
            end else walk_way <= walk_way + 1'b1;
          end else if (int'(walk_set) == nsets - 1) st <= C_RC_APPLY;
          else begin
            walk_set <= walk_set + 1'b1;
            st       <= C_RC_READ;
          end
        C_RC_WB:
          if (bi_done) begin
            walk_way <= walk_way + 1'b1;
            st       <= C_RC_WAY;
          end else sent <= 1'b1;
        C_RC_APPLY: begin
          cfg      <= rc_cfg_q;
          rc_init  <= 1'b1;
          init_idx <= '0;
          st       <= C_INIT;
        end
        C_RC_REL: begin
          rc_pend <= 1'b0;
          st      <= C_IDLE;
        end
        default: st <= C_INIT;
      endcase
    end
  end

  // ---------------------------------------------------------- memory port A
  always_comb begin
    a_set        = s_set;
    a_tag        = s_tag;
    a_word       = s_word;
    a_sel_way    = vic_q;
    a_clear      = 1'b0;
    a_tag_we     = 1'b0;
    a_state      = ST_I;
    a_line_we    = 1'b0;
    a_word_we    = 1'b0;
    a_wdata      = wdata_q;
    a_line_wdata = bi_rline;
    a_line_way   = vic_q;
    lru_touch    = 1'b0;
    lru_way      = a_hit_way;
    case (st)
      C_INIT: begin
        a_set   = SET_W'(init_idx);
        a_clear = 1'b1;
      end
      C_CHECK: begin
        a_line_way = a_victim;
        if (a_hit && (!we_q || writable)) begin
          lru_touch = 1'b1;
          if (we_q) begin
            a_sel_way = a_hit_way;
            a_word_we = 1'b1;
            a_tag_we  = 1'b1;
            a_state   = ST_M;
          end
        end
      end
      C_FILL:
        if (bi_done) begin
          a_line_we = 1'b1;
          a_tag_we  = 1'b1;
          a_state   = (we_q || !bi_shared) ? ST_E : ST_S;
        end
      C_RC_READ, C_RC_WAY, C_RC_WB: begin
        a_set      = walk_set;
        a_line_way = walk_way[WW-1:0];
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ bus requests
  always_comb begin
    bi_start = 1'b0;
    bi_req   = '0;
    bi_req.off_bits = cfg.off_bits;
    case (st)
      C_UPGR:   begin bi_start = !sent; bi_req.op = BUS_UPGR; bi_req.addr = req_line; end
      C_WB:     begin bi_start = !sent; bi_req.op = BUS_WB;   bi_req.addr = b_addr;   end
      C_FETCH:  begin bi_start = 1'b1;  bi_req.op = we_q ? BUS_RDX : BUS_RD;
                      bi_req.addr = req_line; end
      C_RC_ACQ: begin bi_start = !sent; bi_req.op = BUS_RD;   bi_req.addr = '0;
                      bi_req.off_bits = '0; end
      C_RC_WB:  begin bi_start = !sent; bi_req.op = BUS_WB;   bi_req.addr = b_addr;   end
      default: ;
    endcase
  end
  assign bi_wline = wline_q;
  assign bi_lock  = rc_pend && (st != C_IDLE) && (st != C_RC_REL);

  // ----------------------------------------------------------- processor side
  assign cpu_ready = (st == C_IDLE) && !rc_pend;
  assign cpu_resp  = (st == C_CHECK) && a_hit && (!we_q || writable);
  assign cpu_rdata = a_rword;
  assign rc_busy   = rc_pend;
  assign rc_done   = (st == C_RC_REL);
  assign cfg_load  = (st == C_INIT);

  // ----------------------------------------------------------------- events
  // a lookup repeated after a fill or an upgrade is not a new hit or miss
  logic replayed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) replayed <= 1'b0;
    else if (st == C_IDLE) replayed <= 1'b0;
    else if (st == C_REPLAY) replayed <= 1'b1;

  assign ev_req         = cpu_resp;
  assign ev_hit         = (st == C_CHECK) && a_hit && !replayed;
  assign ev_miss        = (st == C_CHECK) && !a_hit && !replayed;
  assign ev_evict       = (st == C_CHECK) && !a_hit && a_way_state[a_victim] != ST_I;
  assign evict_tag      = a_way_tag[a_victim];
  assign evict_way      = a_victim;
  assign ev_install     = (st == C_FILL) && bi_done;
  assign install_way    = vic_q;
  assign ev_set         = s_set;
  assign ev_tag         = s_tag;
  assign ev_wb          = ((st == C_WB) || (st == C_RC_WB)) && bi_done;
  assign wait_miss      = (st == C_WB) || (st == C_FETCH) || (st == C_FILL) ||
                          (st == C_REPLAY && !upg_q);
  assign wait_shared_wr = (st == C_UPGR);

  assert property (@(posedge clk) disable iff (!rst_n) cpu_resp |-> a_hit)
    else $error("cache_controller: response without a hit");

endmodule
