// tb_adaptive_cache_system: end-to-end test of two reconfigurable L1 caches on
// the shared bus, with the top at its default parameters.
//
// A reference memory in the testbench tracks the value every processor write
// leaves at each word; every read answered by either cache is compared with
// it, whatever the caches did in between (misses, evictions, write-backs,
// snooper flushes and invalidations, reconfigurations).
// Phases:
//   1 random reads and writes from both caches on a shared region (hits,
//     misses, dirty evictions, sharing, upgrades, snooper flushes);
//   2 cache 0 is forced to 2 ways / 256 sets / 8-word lines, so the two
//     caches use different line widths, and phase 1 traffic is repeated;
//   3 cache 1 runs a prime-like sweep (many tags into four sets); its
//     eviction table must flag an attack and the cache must reconfigure;
//   4 cache 0 is given performance tuning and a poor-hit-rate stream, so
//     it must reconfigure itself after CHECK_N requests.
// Each mechanism is counted and a failure recorded for any that never
// happened. Also checked: a hit answers one cycle after the request is taken.
module tb_adaptive_cache_system;
  import cache_pkg::*;

  localparam int NC = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]     cpu_req, cpu_we, cpu_ready, cpu_resp, perf_en, ext_rc_req, rc_busy, attack;
  logic [ADDR_W-1:0] cpu_addr  [NC];
  logic [31:0]       cpu_wdata [NC];
  logic [31:0]       cpu_rdata [NC];
  cfg_t              ext_rc_cfg [NC];
  cfg_t              cfg [NC];
  cache_stats_t      stats [NC];
  logic              l2_cmd_valid, l2_wvalid, l2_wready, l2_rvalid, l2_done, bus_busy;
  bus_req_t          l2_cmd;
  logic [ADDR_W-1:0] l2_waddr;
  logic [31:0]       l2_wdata, l2_rdata;

  adaptive_cache_system dut (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ready, .cpu_resp,
    .cpu_rdata, .perf_en, .ext_rc_req, .ext_rc_cfg, .cfg, .rc_busy, .attack, .stats,
    .l2_cmd_valid, .l2_cmd, .l2_wvalid, .l2_waddr, .l2_wdata, .l2_wready, .l2_rvalid,
    .l2_rdata, .l2_done, .bus_busy
  );

  l2_model #(.LAT(4)) u_l2 (
    .clk, .rst_n, .cmd_valid(l2_cmd_valid), .cmd(l2_cmd), .wvalid(l2_wvalid),
    .waddr(l2_waddr), .wdata(l2_wdata), .wready(l2_wready), .rvalid(l2_rvalid),
    .rdata(l2_rdata), .done(l2_done)
  );

  int checks = 0, failures = 0;
  logic [31:0] refm [logic [29:0]];

  function automatic logic [31:0] ref_rd(input logic [ADDR_W-1:0] a);
    return refm.exists(a[31:2]) ? refm[a[31:2]] : ({a[31:2], 2'b00} ^ 32'h5A5A_5A5A);
  endfunction

  // mechanism counters
  int n_hit1 = 0, n_upgr_seen = 0, n_multi_snoop = 0, n_width_mismatch = 0;
  int n_contention = 0;

  // one access on cache c; returns when answered
  task automatic access(input int c, input logic we, input logic [ADDR_W-1:0] a,
                        input logic [31:0] d);
    int t0;
    logic [31:0] exp;
    @(negedge clk);
    while (!cpu_ready[c]) @(negedge clk);
    cpu_req[c] = 1'b1; cpu_we[c] = we; cpu_addr[c] = a; cpu_wdata[c] = d;
    @(negedge clk);
    cpu_req[c] = 1'b0;
    t0 = 0;
    while (!cpu_resp[c]) begin @(negedge clk); t0++; end
    if (t0 == 0) n_hit1++;
    if (!we) begin
      exp = ref_rd(a);
      checks++;
      if (cpu_rdata[c] !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL cache%0d read %h got %h exp %h t=%0t", c, a, cpu_rdata[c], exp, $time);
      end
    end else refm[a[31:2]] = d;
  endtask

  // random traffic from both caches at once on a small shared region
  task automatic mixed_traffic(input int n, input int seed);
    fork
      begin
        for (int i = 0; i < n; i++) begin
          logic [ADDR_W-1:0] a;
          a = 32'h0001_0000 + ((($urandom % 4096)) << 2);
          if ($urandom % 4 == 0) a = 32'h0002_0000 + (($urandom % 64) << 2);  // hot shared
          access(0, ($urandom % 3) == 0, a, $urandom);
        end
      end
      begin
        for (int i = 0; i < n; i++) begin
          logic [ADDR_W-1:0] a;
          a = 32'h0001_0000 + ((($urandom % 4096)) << 2);
          if ($urandom % 4 == 0) a = 32'h0002_0000 + (($urandom % 64) << 2);
          access(1, ($urandom % 3) == 0, a, $urandom);
        end
      end
    join
    if (seed < 0) $display("unused");
  endtask

  // observe mechanisms
  int n_wb = 0, n_coh = 0, n_conf = 0, n_cap = 0, n_shw = 0, n_wbus = 0;
  always @(posedge clk) if (rst_n) begin
    n_wb   += int'(dut.g_l1[0].u_l1.ev_wb) + int'(dut.g_l1[1].u_l1.ev_wb);
    n_coh  += int'(dut.g_l1[0].u_l1.ev_coh) + int'(dut.g_l1[1].u_l1.ev_coh);
    n_shw  += int'(dut.g_l1[0].u_l1.wait_shared_wr) + int'(dut.g_l1[1].u_l1.wait_shared_wr);
    n_wbus += int'(dut.g_l1[0].u_l1.wait_bus) + int'(dut.g_l1[1].u_l1.wait_bus);
    if (dut.g_l1[0].u_l1.ev_miss &&  dut.g_l1[0].u_l1.is_conflict) n_conf++;
    if (dut.g_l1[0].u_l1.ev_miss && !dut.g_l1[0].u_l1.is_conflict) n_cap++;
    if (dut.g_l1[1].u_l1.ev_miss &&  dut.g_l1[1].u_l1.is_conflict) n_conf++;
    if (dut.g_l1[1].u_l1.ev_miss && !dut.g_l1[1].u_l1.is_conflict) n_cap++;
    if (l2_cmd_valid && l2_cmd.op == BUS_UPGR) n_upgr_seen++;
    if (dut.snp_valid != '0 && cfg[0].off_bits != cfg[1].off_bits) n_width_mismatch++;
    if (dut.m_req == '1) n_contention++;
    // a snooped request wider than the snooping cache's line covers several lines
    for (int i = 0; i < 2; i++)
      if (dut.snp_valid[i] && dut.snp_cmd.off_bits > cfg[i].off_bits &&
          dut.snp_cmd.op != BUS_WB) n_multi_snoop++;
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: ctrl0 st=%0d ctrl1 st=%0d bi0=%0d bus=%0d", dut.g_l1[0].u_l1.u_ctrl.st,
             dut.g_l1[1].u_l1.u_ctrl.st, dut.g_l1[0].u_l1.u_bi.st, dut.u_bus.ts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", name);
    end else $display("mechanism %-28s seen %0d", name, n);
  endtask

  int rc0_before, rc1_before;
  cfg_t c1_before;

  initial begin
    cpu_req = '0; cpu_we = '0; perf_en = '0; ext_rc_req = '0;
    for (int i = 0; i < NC; i++) begin
      cpu_addr[i] = '0; cpu_wdata[i] = '0; ext_rc_cfg[i] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    // wait for the initialisation walks
    while (cpu_ready != '1) @(posedge clk);
    checks++;
    if (cfg[0] != '{3'd2, 3'd0, 3'd2}) begin failures++; $display("FAIL reset cfg"); end

    // ---------------------------------------------------------- phase 1
    mixed_traffic(1500, 1);
    // five lines cycling through one 4-way set: every miss hits the tag the
    // set evicted last (conflict misses); half of them written (dirty evictions)
    for (int r = 0; r < 40; r++)
      access(0, r % 2 == 0, 32'h0300_0040 + ((r % 5) << 12), 32'(r));

    // ---------------------------------------------------------- phase 2
    rc0_before = int'(stats[0].n_rc);
    @(posedge clk);
    ext_rc_cfg[0] <= '{3'd1, 3'd0, 3'd3};
    ext_rc_req[0] <= 1'b1;
    @(posedge clk);
    ext_rc_req[0] <= 1'b0;
    while (!rc_busy[0]) @(posedge clk);
    while (rc_busy[0]) @(posedge clk);
    @(posedge clk);
    checks++;
    if (cfg[0] != '{3'd1, 3'd0, 3'd3} || int'(stats[0].n_rc) != rc0_before + 1) begin
      failures++; $display("FAIL external reconfiguration");
    end
    $display("reconfiguration of cache 0 took %0d cycles", stats[0].rc_cycles);
    mixed_traffic(1500, 2);

    // ---------------------------------------------------------- phase 3
    rc1_before = int'(stats[1].n_attack_rc);
    c1_before  = cfg[1];
    for (int r = 0; r < 24 && stats[1].n_attack_rc == 16'(rc1_before); r++)
      for (int s = 0; s < 4; s++)
        access(1, 1'b0, 32'h0100_0000 + (r << 12) + (s << 4), 0);
    repeat (2000) @(posedge clk);
    while (!cpu_ready[1]) @(posedge clk);
    checks++;
    if (int'(stats[1].n_attack_rc) != rc1_before + 1 || cfg[1] == c1_before) begin
      failures++; $display("FAIL attack not handled");
    end
    $display("cache 1 after attack: ways=%0d sets=%0d words=%0d", 1 << cfg[1].way_bits,
             256 << cfg[1].grp_bits, 1 << cfg[1].off_bits);
    // contents still correct after the security reconfiguration
    for (int i = 0; i < 200; i++)
      access(1, 1'b0, 32'h0001_0000 + (($urandom % 4096) << 2), 0);

    // ---------------------------------------------------------- phase 4
    perf_en[0] <= 1'b1;
    for (int i = 0; i < 4200 && stats[0].n_perf_rc == 0; i++)
      access(0, ($urandom % 2) == 0, 32'h0400_0000 + (($urandom % 65536) << 2), $urandom);
    perf_en[0] <= 1'b0;
    repeat (3000) @(posedge clk);

    // ---------------------------------------------------------- summary
    mech("hit answered in one cycle", n_hit1);
    mech("dirty write-back", n_wb);
    mech("snooper coherence operation", n_coh);
    mech("upgrade of a shared line", n_upgr_seen);
    mech("wait for shared write", n_shw);
    mech("bus contention", n_contention);
    mech("wait for bus grant", n_wbus);
    mech("capacity miss", n_cap);
    mech("conflict miss", n_conf);
    mech("snoop across line widths", n_width_mismatch);
    mech("one request, several lines", n_multi_snoop);
    mech("external reconfiguration", int'(stats[0].n_rc));
    mech("attack detected", int'(stats[1].n_attack_rc));
    mech("performance reconfiguration", int'(stats[0].n_perf_rc));
    mech("L2 write-back transactions", u_l2.n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
