// tuning_logic: decides when the cache reconfigures and into what.
//
// Two triggers:
//  * security: when the eviction table reports a potential attack, the next
//    configuration is the first one that fits from this list (changes in
//    log2 of ways, sets, words per line), which puts associativity first,
//    then a smaller line, then the set count, and always moves memory blocks
//    into another parameter so that the cache stays fully used:
//      ways x2 & line /2,  ways x2 & sets /2,  ways /2 & sets x2,
//      ways /2 & line x2,  line /2 & sets x2,  sets /2 & line x2
//  * performance (when perf_en): every CHECK_N answered requests the hit rate
//    and the cycles per request since the last reconfiguration are checked
//    against HIT_PCT and CPR_MAX. If either misses, the next configuration is
//    chosen from the miss classification and set utilization:
//      more than half the sets empty   -> ways x2 & sets /2 first
//      conflict misses dominate        -> ways x2 & line /2, ways x2 & sets /2
//      capacity misses dominate        -> line x2 & sets /2, line x2 & ways /2
//    followed by the security list as fall-back.
// A configuration fits when cache_pkg::cfg_fits accepts it for this cache's
// sizes. rc_req pulses for one cycle with rc_cfg; nothing is requested while a
// reconfiguration runs. The triggers, the security ordering and the use of
// hit rate together with cycles follow the design; the thresholds, CHECK_N
// and the exact performance ordering are this design's own choices.
module tuning_logic
  import cache_pkg::*;
#(
  parameter int N_BLOCKS       = 20,
  parameter int MAX_TAG_BLOCKS = 8,
  parameter int MAX_WAYS       = 8,
  parameter int MAX_OFF        = 4,
  parameter int CHECK_N        = 4096,
  parameter int HIT_PCT        = 80,
  parameter int CPR_MAX        = 4,
  parameter int SET_CW         = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic [7:0]        log_l,
  input  logic              perf_en,
  input  logic              attack,
  input  logic              rc_busy,
  input  logic              rc_done,
  input  logic [31:0]       requests,
  input  logic [31:0]       hits,
  input  logic [31:0]       cycles,
  input  logic [31:0]       conflict_misses,
  input  logic [31:0]       capacity_misses,
  input  logic [SET_CW-1:0] unused_sets,
  output logic              rc_req,
  output cfg_t              rc_cfg,
  output logic              rc_for_attack,
  output logic [15:0]       n_attack_rc,
  output logic [15:0]       n_perf_rc
);

  localparam int NC = 6;
  // candidate steps {d_ways, d_grp, d_off} in log2
  typedef int step_t [NC][3];
  localparam step_t SEC  = '{'{1, 0, -1}, '{1, -1, 0}, '{-1, 1, 0}, '{-1, 0, 1}, '{0, 1, -1}, '{0, -1, 1}};
  localparam step_t CONF = '{'{1, 0, -1}, '{1, -1, 0}, '{-1, 1, 0}, '{-1, 0, 1}, '{0, 1, -1}, '{0, -1, 1}};
  localparam step_t CAPA = '{'{0, -1, 1}, '{-1, 0, 1}, '{1, 0, -1}, '{1, -1, 0}, '{-1, 1, 0}, '{0, 1, -1}};
  localparam step_t UNUS = '{'{1, -1, 0}, '{1, 0, -1}, '{-1, 1, 0}, '{-1, 0, 1}, '{0, 1, -1}, '{0, -1, 1}};

  function automatic cfg_t pick(input step_t lst, input cfg_t c, output logic ok);
    cfg_t r;
    r  = c;
    ok = 1'b0;
    for (int i = NC - 1; i >= 0; i--) begin
      int wb, gb, ob;
      wb = int'(c.way_bits) + lst[i][0];
      gb = int'(c.grp_bits) + lst[i][1];
      ob = int'(c.off_bits) + lst[i][2];
      if (cfg_fits(wb, gb, ob, N_BLOCKS, MAX_TAG_BLOCKS, MAX_WAYS, MAX_OFF)) begin
        r  = '{way_bits: 3'(wb), grp_bits: 3'(gb), off_bits: 3'(ob)};
        ok = 1'b1;
      end
    end
    return r;
  endfunction

  cfg_t sec_cfg, perf_cfg;
  logic sec_ok, perf_ok;
  int   nsets;
  assign nsets = 1 << (int'(log_l) + int'(cfg.grp_bits));

  always_comb begin
    sec_cfg = pick(SEC, cfg, sec_ok);
    if (2 * int'(unused_sets) > nsets) perf_cfg = pick(UNUS, cfg, perf_ok);
    else if (conflict_misses > capacity_misses) perf_cfg = pick(CONF, cfg, perf_ok);
    else perf_cfg = pick(CAPA, cfg, perf_ok);
  end

  logic [31:0] next_check;
  logic        poor;
  assign poor = (64'(hits) * 100 < 64'(requests) * HIT_PCT) ||
                (64'(cycles) > 64'(requests) * CPR_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_req        <= 1'b0;
      rc_cfg        <= '0;
      rc_for_attack <= 1'b0;
      next_check    <= 32'(CHECK_N);
      n_attack_rc   <= '0;
      n_perf_rc     <= '0;
    end else begin
      rc_req <= 1'b0;
      if (rc_done) next_check <= 32'(CHECK_N);
      else if (!rc_busy && !rc_req) begin
        if (attack && sec_ok) begin
          rc_req        <= 1'b1;
          rc_cfg        <= sec_cfg;
          rc_for_attack <= 1'b1;
          n_attack_rc   <= n_attack_rc + 1'b1;
        end else if (requests >= next_check) begin
          next_check <= requests + 32'(CHECK_N);
          if (perf_en && poor && perf_ok) begin
            rc_req        <= 1'b1;
            rc_cfg        <= perf_cfg;
            rc_for_attack <= 1'b0;
            n_perf_rc     <= n_perf_rc + 1'b1;
          end
        end
      end
    end
  end

endmodule
