// tb_reconfig_l1_cache: self-checking testbench for one reconfigurable L1
// cache (reconfig_l1_cache) on a one-master shared bus with the behavioural L2.
// Part 1 walks the cache through every configuration that fits its 20 blocks
// (forced reconfigurations through ext_rc_req), running 250 random reads and
// writes in each, and checks every read against a reference memory, so data
// written in one configuration must survive the write-back walk into the next.
// It also checks the reported configuration and that the bus stays owned from
// the dummy read that starts a reconfiguration until it ends. Part 2 returns
// to the reset configuration and runs a prime-and-probe-like sweep (24 tags over 4 sets); the eviction table
// must flag an attack and the tuning logic must move the cache to 2 ways,
// 512 sets, 4-word lines, the first security candidate that fits. The
// behaviour checked follows the published design; the numbers are this design's.
module tb_reconfig_l1_cache;
  import cache_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_cfgs = 0;
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

  logic [31:0] refm [logic [29:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return refm.exists(a[31:2]) ? refm[a[31:2]] : ({a[31:2], 2'b00} ^ 32'h5A5A_5A5A);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_req = 0;
    while (!cpu_resp) @(negedge clk);
    if (!we) begin
      checks++;
      if (cpu_rdata !== ref_rd(a)) begin
        failures++;
        if (failures < 10) $display("FAIL read %h got %h exp %h cfg %0d-%0d-%0d", a, cpu_rdata,
                                    ref_rd(a), cfg.way_bits, cfg.grp_bits, cfg.off_bits);
      end
    end else refm[a[31:2]] = d;
  endtask

  // the bus must stay owned while a reconfiguration runs (after it got the bus)
  bit rc_owned;
  int n_held = 0;
  always @(posedge clk) begin
    if (!rc_busy) rc_owned <= 0;
    else if (m_cmd_valid && m_cmd.op == BUS_RD && m_cmd.addr == '0) rc_owned <= 1;  // dummy read
    if (rc_busy && rc_owned) begin
      n_held++;
      chk(m_grant, "bus held during reconfiguration");
    end
  end

  task automatic reconfigure(input cfg_t c);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    ext_rc_req = 1; ext_rc_cfg = c;
    @(negedge clk); ext_rc_req = 0;
    @(posedge clk iff rc_busy);
    @(posedge clk iff !rc_busy);
    @(negedge clk);
    chk(cfg == c, "configuration applied");
  endtask

  initial begin
    #100000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; perf_en = 0;
    ext_rc_req = 0; ext_rc_cfg = '0; snp_valid = 0; snp_cmd = '0; fl_wready = 0;
    #22 rst_n = 1;
    @(posedge clk iff cpu_ready);
    chk(cfg.way_bits == 2 && cfg.grp_bits == 0 && cfg.off_bits == 2, "reset configuration 4-8-2");
    for (int wb = 0; wb <= 3; wb++)
      for (int gb = 0; gb <= 3; gb++)
        for (int ob = 0; ob <= 4; ob++) begin
          if (!cfg_fits(wb, gb, ob, 20, 8, 8, 4)) continue;
          reconfigure('{way_bits: 3'(wb), grp_bits: 3'(gb), off_bits: 3'(ob)});
          n_cfgs++;
          for (int n = 0; n < 250; n++) begin
            logic [31:0] a;
            a = 32'h0010_0000 + (($urandom % 8192) << 2);
            if ($urandom % 8 == 0) a = a + 32'h0004_0000 * ($urandom % 4);  // aliasing tags
            access($urandom % 3 == 0, a, $urandom);
          end
        end
    chk(n_cfgs == 26, "all 26 configurations visited");
    // part 2: attack detection
    reconfigure('{2, 0, 2});
    for (int r = 0; r < 24; r++)
      for (int s = 0; s < 4; s++) begin
        access(0, 32'h0100_0000 + (r << 12) + (s << 4), 0);
        if (rc_busy) break;
      end
    repeat (20) @(negedge clk);
    while (rc_busy) @(negedge clk);
    chk(stats.n_attack_rc == 1, "one reconfiguration for an attack");
    chk(cfg.way_bits == 1 && cfg.grp_bits == 1 && cfg.off_bits == 2, "security candidate 2-9-2 chosen");
    for (int n = 0; n < 200; n++) access(0, 32'h0010_0000 + (($urandom % 8192) << 2), 0);
    chk(n_held > 26 * 256, "reconfiguration walks observed");
    $display("%0d configurations, %0d L2 write-backs, %0d cycles with the bus held",
             n_cfgs, u_l2.n_wb, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
