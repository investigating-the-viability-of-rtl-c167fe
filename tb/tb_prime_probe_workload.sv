// tb_prime_probe_workload: the prime+probe attack experiment on one
// reconfigurable L1 cache (reconfig_l1_cache, shared_bus with one master, the
// behavioural L2), for the three geometries the attack study uses: 4-way,
// 2-way and direct-mapped, each with 256 sets and 16-byte lines.
//
// For each geometry the cache is forced into it, and then an attacker and a
// victim share the cache for ROUNDS rounds of:
//   prime   for each of NS monitored sets, read `ways` attacker lines that map
//           to that set (the eviction set; tags differ in bits 16 and up, so
//           they stay in one set in every geometry);
//   victim  read one line in each of the NSEC secret sets (fixed per run);
//   probe   read the eviction sets again, timing each access: any access that
//           is not a one-cycle hit marks the set as "touched by the victim".
// The attacker's accuracy is the share of monitored sets guessed right. The
// attacker keeps the eviction sets of the original geometry throughout.
//
// Checked: every read returns the right data; every round that completes
// before any reconfiguration guesses all sets right (the undefended cache leaks
// completely); the eviction table flags the attack and the cache reconfigures
// to the first security candidate that fits (4-8-2 -> 2-9-2, 2-8-2 -> 4-8-1,
// 1-8-2 -> 2-8-1); and from the first reconfiguration on, the mean accuracy
// falls below 100 %. The geometries come from the attack study; the set
// counts, round counts and address layout are this testbench's choices.
module tb_prime_probe_workload;
  import cache_pkg::*;
  localparam int NS     = 32;  // monitored sets
  localparam int NSEC   = 8;   // secret sets touched by the victim
  localparam int ROUNDS = 10;
  localparam logic [31:0] A_BASE = 32'h0200_0000;
  localparam logic [31:0] V_BASE = 32'h0400_0000;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;

  logic cpu_req, cpu_we, cpu_ready, cpu_resp, perf_en, ext_rc_req, rc_busy, attack;
  logic [ADDR_W-1:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  cfg_t ext_rc_cfg, cfg;
  cache_stats_t stats;
  logic m_req, m_grant, m_cmd_valid, m_wvalid, m_wready, m_rvalid, m_done, m_shared;
  bus_req_t m_cmd, snp_cmd, l2_cmd;
  logic [ADDR_W-1:0] m_waddr, fl_waddr, l2_waddr;
  logic [31:0] m_wdata, m_rdata, fl_wdata, l2_wdata, l2_rdata;
  logic snp_valid, snp_busy, snp_shared, fl_wvalid, fl_wready;
  logic l2_cmd_valid, l2_wvalid, l2_wready, l2_rvalid, l2_done, bus_busy;

  reconfig_l1_cache dut (.*);

  shared_bus #(.NM(1)) u_bus (
    .clk, .rst_n, .m_req, .m_grant, .m_cmd_valid, .m_cmd('{m_cmd}), .m_wvalid,
    .m_waddr('{m_waddr}), .m_wdata('{m_wdata}), .m_wready, .m_rvalid, .m_rdata, .m_done,
    .m_shared, .snp_valid, .snp_cmd, .snp_busy, .snp_shared, .fl_wvalid, .fl_waddr('{fl_waddr}),
    .fl_wdata('{fl_wdata}), .fl_wready, .l2_cmd_valid, .l2_cmd, .l2_wvalid, .l2_waddr,
    .l2_wdata, .l2_wready, .l2_rvalid, .l2_rdata, .l2_done, .busy(bus_busy));

  l2_model #(.LAT(4)) u_l2 (
    .clk, .rst_n, .cmd_valid(l2_cmd_valid), .cmd(l2_cmd), .wvalid(l2_wvalid),
    .waddr(l2_waddr), .wdata(l2_wdata), .wready(l2_wready), .rvalid(l2_rvalid),
    .rdata(l2_rdata), .done(l2_done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // read one word; returns the cycles waited beyond a one-cycle hit
  task automatic rd(input logic [31:0] a, output int extra);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_req = 0;
    extra = 0;
    while (!cpu_resp) begin
      @(negedge clk);
      extra++;
    end
    chk(cpu_rdata == ({a[31:2], 2'b00} ^ 32'h5A5A_5A5A), "read data");
  endtask

  task automatic reconfigure(input cfg_t c);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    ext_rc_req = 1; ext_rc_cfg = c;
    @(negedge clk); ext_rc_req = 0;
    @(posedge clk iff rc_busy);
    @(posedge clk iff !rc_busy);
    @(negedge clk);
    chk(cfg.way_bits == c.way_bits && cfg.grp_bits == c.grp_bits && cfg.off_bits == c.off_bits,
        "geometry applied");
  endtask

  // geometry right after the first attack-driven reconfiguration of a run
  int   att_base;
  bit   got_first;
  cfg_t first_cfg;
  bit   rc_busy_q;
  always @(negedge clk) begin
    rc_busy_q <= rc_busy;
    if (rc_busy_q && !rc_busy && !got_first && int'(stats.n_attack_rc) > att_base) begin
      got_first <= 1'b1;
      first_cfg <= cfg;
    end
  end

  initial begin
    #50000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  task automatic run_attack(input cfg_t c, input cfg_t exp_next);
    bit secret [NS];
    bit guess  [NS];
    int ways, extra, ok, rc_base, n_base_rounds, sum_after, n_after;
    bit defended;
    string name;
    reconfigure(c);
    ways = 1 << c.way_bits;
    name = $sformatf("%0d-way, %0d sets, %0d-byte lines", ways, 256 << c.grp_bits,
                     4 << c.off_bits);
    foreach (secret[s]) secret[s] = 0;
    for (int k = 0; k < NSEC; ) begin
      int s;
      s = int'($urandom % NS);
      if (!secret[s]) begin secret[s] = 1; k++; end
    end
    att_base = int'(stats.n_attack_rc);
    got_first = 0;
    rc_base = int'(stats.n_rc);
    n_base_rounds = 0; sum_after = 0; n_after = 0; defended = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int s = 0; s < NS; s++)
        for (int j = 0; j < ways; j++) rd(A_BASE + (j << 16) + (s << 4), extra);
      for (int s = 0; s < NS; s++)
        if (secret[s]) rd(V_BASE + (s << 4), extra);
      for (int s = 0; s < NS; s++) begin
        guess[s] = 0;
        for (int j = 0; j < ways; j++) begin
          rd(A_BASE + (j << 16) + (s << 4), extra);
          if (extra != 0) guess[s] = 1;
        end
      end
      ok = 0;
      foreach (guess[s]) if (guess[s] == secret[s]) ok++;
      if (int'(stats.n_rc) != rc_base || rc_busy) defended = 1;
      if (!defended) begin
        n_base_rounds++;
        chk(ok == NS, "undefended round leaks every set");
      end else begin
        sum_after += ok;
        n_after++;
      end
      $display("%s round %0d: attacker right on %0d of %0d sets%s", name, r, ok, NS,
               defended ? " (reconfigured)" : "");
    end
    chk(n_base_rounds >= 1, "at least one round before detection");
    chk(int'(stats.n_attack_rc) > att_base, "attack detected and cache reconfigured");
    chk(got_first && first_cfg.way_bits == exp_next.way_bits &&
        first_cfg.grp_bits == exp_next.grp_bits && first_cfg.off_bits == exp_next.off_bits,
        "first security candidate");
    chk(n_after > 0 && sum_after < n_after * NS, "accuracy drops once the cache reconfigures");
    $display("%s: undefended rounds %0d at 100 %%, later rounds %0d at %0d %% mean, %0d attack reconfigurations",
             name, n_base_rounds, n_after, n_after > 0 ? (100 * sum_after) / (n_after * NS) : 0,
             int'(stats.n_attack_rc) - att_base);
  endtask

  initial begin
    rst_n = 0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; perf_en = 0;
    ext_rc_req = 0; ext_rc_cfg = '0; snp_valid = 0; snp_cmd = '0; fl_wready = 0;
    att_base = 0; got_first = 0; first_cfg = '0; rc_busy_q = 0;
    #22 rst_n = 1;
    @(posedge clk iff cpu_ready);
    run_attack('{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd2},
               '{way_bits: 3'd1, grp_bits: 3'd1, off_bits: 3'd2});
    run_attack('{way_bits: 3'd1, grp_bits: 3'd0, off_bits: 3'd2},
               '{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd1});
    run_attack('{way_bits: 3'd0, grp_bits: 3'd0, off_bits: 3'd2},
               '{way_bits: 3'd1, grp_bits: 3'd0, off_bits: 3'd1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
