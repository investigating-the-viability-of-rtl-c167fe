// cache_pkg: types and constants shared by the run-time reconfigurable L1 cache.
//
// A cache configuration is written (ways - index bits - word offset bits), the
// notation used throughout this design. Internally the index is split into the
// address bits of one memory block (LOG_L, fixed at synthesis) and the "group"
// bits that select which row of tag blocks a set lives in, so a configuration is
// held as three small log2 fields: ways = 1<<way_bits, sets = L<<grp_bits,
// words per line = 1<<off_bits. Coherence is MESI. Bus operations carry the
// requester's off_bits on extra lanes so that caches with different line widths
// can share one bus. The field widths and encodings are this design's choices.
package cache_pkg;

  localparam int ADDR_W = 32;  // byte address
  localparam int WORD_W = 32;  // memory blocks and the shared bus are one word wide

  // MESI coherence state, kept in the top two bits of every tag word
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } mesi_t;

  // Current logical organisation of the memory blocks
  typedef struct packed {
    logic [2:0] way_bits;  // log2(ways)
    logic [2:0] grp_bits;  // log2(rows of tag blocks); index bits = LOG_L + grp_bits
    logic [2:0] off_bits;  // log2(words per line), the OFFSET_BITS carried on the bus
  } cfg_t;

  // Shared bus commands
  typedef enum logic [2:0] {
    BUS_NONE = 3'd0,
    BUS_RD   = 3'd1,  // read a line, share it
    BUS_RDX  = 3'd2,  // read a line for writing, others invalidate
    BUS_UPGR = 3'd3,  // invalidate other copies of a line held Shared
    BUS_WB   = 3'd4   // write a dirty line back to the level below
  } bus_op_t;

  // Requests from the controller to the bus interface
  typedef struct packed {
    bus_op_t            op;
    logic [ADDR_W-1:0]  addr;      // line base address (byte)
    logic [2:0]         off_bits;  // line width of this transfer
  } bus_req_t;

  // Snapshot of one cache's counters and monitors
  typedef struct packed {
    logic [31:0] requests;
    logic [31:0] hits;
    logic [31:0] cycles;
    logic [31:0] coh_ops;
    logic [31:0] wait_bus;
    logic [31:0] wait_mem;
    logic [31:0] wait_shared_wr;
    logic [31:0] write_backs;
    logic [31:0] wait_miss;
    logic [31:0] rc_cycles;
    logic [31:0] conflict_misses;
    logic [31:0] capacity_misses;
    logic [15:0] unused_sets;
    logic [15:0] n_attack_rc;
    logic [15:0] n_perf_rc;
    logic [15:0] n_rc;
  } cache_stats_t;

  // A configuration fits when its tag blocks stay within the tag-capable blocks,
  // its associativity within the LRU storage, and tag plus data blocks within
  // the blocks that exist. Field overflow (a step below zero or past 7) is
  // caught by the caller, which works in wider integers.
  function automatic logic cfg_fits(input int way_bits, input int grp_bits, input int off_bits,
                                    input int n_blocks, input int max_tag_blocks,
                                    input int max_ways, input int max_off);
    int ways, grps, words;
    if (way_bits < 0 || grp_bits < 0 || off_bits < 0) return 1'b0;
    if (way_bits > 7 || grp_bits > 7 || off_bits > max_off) return 1'b0;
    ways  = 1 << way_bits;
    grps  = 1 << grp_bits;
    words = 1 << off_bits;
    return (ways <= max_ways) && (ways * grps <= max_tag_blocks) &&
           (ways * grps * (1 + words) <= n_blocks);
  endfunction

endpackage
