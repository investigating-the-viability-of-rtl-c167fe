// tb_tuning_logic: self-checking testbench for the tuning logic, which picks
// the next cache configuration when an attack is flagged or when performance
// is poor.
// For 600 random scenarios it puts the unit in a random configuration that
// fits 20 blocks, applies either an attack flag or a performance check point
// (requests reaching CHECK_N after a reconfiguration) with random hit, cycle,
// miss-class and unused-set statistics, and compares rc_req, rc_cfg and
// rc_for_attack with a reference: the first candidate of the relevant list
// that fits, no request when performance is good or perf_en is low, and
// nothing while a reconfiguration is in progress. The candidate lists are
// restated here independently of the RTL; the order of the performance lists
// and the thresholds are this design's choice.
module tb_tuning_logic;
  import cache_pkg::*;
  localparam int N_BLOCKS = 20, MAX_TAG_BLOCKS = 8, MAX_WAYS = 8, MAX_OFF = 4;
  localparam int CHECK_N = 4096, HIT_PCT = 80, CPR_MAX = 4, SET_CW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_att = 0, n_perf = 0, n_quiet = 0;

  logic rst_n, perf_en, attack, rc_busy, rc_done, rc_req, rc_for_attack;
  cfg_t cfg, rc_cfg;
  logic [7:0] log_l;
  logic [31:0] requests, hits, cycles, conflict_misses, capacity_misses;
  logic [SET_CW-1:0] unused_sets;
  logic [15:0] n_attack_rc, n_perf_rc;

  tuning_logic #(.N_BLOCKS(N_BLOCKS), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS), .MAX_WAYS(MAX_WAYS),
                 .MAX_OFF(MAX_OFF), .CHECK_N(CHECK_N), .HIT_PCT(HIT_PCT), .CPR_MAX(CPR_MAX),
                 .SET_CW(SET_CW)) dut (.*);

  // candidate steps: {d log2 ways, d log2 groups, d log2 words}
  int sec_l  [6][3] = '{'{1,0,-1}, '{1,-1,0}, '{-1,1,0}, '{-1,0,1}, '{0,1,-1}, '{0,-1,1}};
  int capa_l [6][3] = '{'{0,-1,1}, '{-1,0,1}, '{1,0,-1}, '{1,-1,0}, '{-1,1,0}, '{0,1,-1}};
  int unus_l [6][3] = '{'{1,-1,0}, '{1,0,-1}, '{-1,1,0}, '{-1,0,1}, '{0,1,-1}, '{0,-1,1}};

  function automatic bit first_fit(input int l [6][3], input cfg_t c, output cfg_t r);
    for (int i = 0; i < 6; i++) begin
      int w, g, o;
      w = int'(c.way_bits) + l[i][0]; g = int'(c.grp_bits) + l[i][1]; o = int'(c.off_bits) + l[i][2];
      if (w >= 0 && g >= 0 && o >= 0 && o <= MAX_OFF && (1 << w) <= MAX_WAYS &&
          (1 << (w + g)) <= MAX_TAG_BLOCKS && (1 << (w + g)) * (1 + (1 << o)) <= N_BLOCKS) begin
        r = '{way_bits: 3'(w), grp_bits: 3'(g), off_bits: 3'(o)};
        return 1;
      end
    end
    r = c;
    return 0;
  endfunction

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d cfg %0d-%0d-%0d", what, got, exp,
                                  cfg.way_bits, cfg.grp_bits, cfg.off_bits);
    end
  endtask

  initial begin
    #5000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; perf_en = 0; attack = 0; rc_busy = 0; rc_done = 0; cfg = '{2, 0, 2};
    log_l = 8'd8; requests = 0; hits = 0; cycles = 0; conflict_misses = 0;
    capacity_misses = 0; unused_sets = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      cfg_t exp_cfg;
      bit exp_req, exp_att, poor;
      int got_req;
      // random fitting configuration; a finished reconfiguration resets the check point
      do cfg = '{way_bits: 3'($urandom % 4), grp_bits: 3'($urandom % 4), off_bits: 3'($urandom % 5)};
      while (!cfg_fits(int'(cfg.way_bits), int'(cfg.grp_bits), int'(cfg.off_bits), N_BLOCKS, MAX_TAG_BLOCKS, MAX_WAYS, MAX_OFF));
      @(negedge clk); rc_busy = 1; attack = 0; requests = 0;
      @(negedge clk); rc_done = 1;
      @(negedge clk); rc_done = 0; rc_busy = 0;
      perf_en = $urandom % 4 != 0;
      hits = $urandom % CHECK_N; cycles = CHECK_N + $urandom % (6 * CHECK_N);
      conflict_misses = $urandom % 500; capacity_misses = $urandom % 500;
      unused_sets = SET_CW'($urandom % (2 << (8 + cfg.grp_bits)) / 2);
      if ($urandom % 3 == 0) hits = CHECK_N - $urandom % 200;
      if ($urandom % 3 == 0) cycles = CHECK_N + $urandom % 100;
      poor = (hits * 100 < CHECK_N * HIT_PCT) || (cycles > CHECK_N * CPR_MAX);
      if ($urandom % 3 == 0) begin
        attack = 1;
        exp_req = first_fit(sec_l, cfg, exp_cfg); exp_att = 1;
      end else begin
        requests = CHECK_N;
        exp_att = 0;
        if (2 * int'(unused_sets) > (256 << cfg.grp_bits)) exp_req = first_fit(unus_l, cfg, exp_cfg);
        else if (conflict_misses > capacity_misses) exp_req = first_fit(sec_l, cfg, exp_cfg);
        else exp_req = first_fit(capa_l, cfg, exp_cfg);
        exp_req = exp_req && perf_en && poor;
      end
      // one request (or none) within the next four cycles
      got_req = 0;
      repeat (4) begin
        @(posedge clk); #1;
        if (rc_req) begin
          got_req++;
          cmp("rc_cfg", int'(rc_cfg), int'(exp_cfg));
          cmp("rc_for_attack", int'(rc_for_attack), int'(exp_att));
          rc_busy = 1;     // the cache starts reconfiguring
        end
      end
      cmp("rc_req", got_req, int'(exp_req));
      if (exp_req && exp_att) n_att++;
      else if (exp_req) n_perf++;
      else n_quiet++;
    end
    cmp("attack reconfigurations counted", int'(n_attack_rc), n_att);
    cmp("performance reconfigurations counted", int'(n_perf_rc), n_perf);
    cmp("each outcome seen", int'(n_att > 20 && n_perf > 20 && n_quiet > 20), 1);
    $display("attack %0d performance %0d none %0d", n_att, n_perf, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
