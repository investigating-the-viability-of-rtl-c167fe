// tb_small_cache_workload: the 4 KB reconfiguration experiment on one
// reconfigurable L1 cache built from 40 blocks of 32 words (4 KB of data plus
// up to 8 tag blocks), on a one-master shared bus with the behavioural L2.
//
// The study compares 4 KB caches with 32 sets: 2-5-4 (2 ways, 5 index bits,
// 16-word lines), 8-5-2 and 4-5-3, and reconfigures between the first two when
// one program ends and the next begins. Those geometries need 32-set blocks,
// so this testbench overrides DEPTH to 32 and N_BLOCKS to 40. The benchmark
// traces are not available, so two synthetic programs stand in:
//   stream    reads 1024 consecutive words once (spatial locality, no reuse);
//   conflict  cycles 20 times through 8 lines in each of 8 sets, reading and
//             writing (more lines per set than 2 or 4 ways hold).
// Both run in each geometry, starting from 2-5-4 (the reset geometry) and
// moving to 8-5-2 and 4-5-3 through forced reconfigurations. The conflict
// program evicts like a priming attacker, so attack detection is switched off
// here (K_THR above the number of table entries), as in the study's
// performance runs, which had no detector.
// Checked: every read against a reference memory (written data must survive
// the write-back walk); each geometry is applied; the bus stays owned from the
// dummy read to the end of each reconfiguration; streaming hits more with
// 16-word lines than with 4-word lines; the conflict program hits more with 8
// ways than with 2 or 4. The cycles each reconfiguration took are printed.
// The geometries come from the study; the programs are this testbench's.
module tb_small_cache_workload;
  import cache_pkg::*;
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

  reconfig_l1_cache #(.N_BLOCKS(40), .DEPTH(32), .K_THR(9),
    .RESET_CFG('{way_bits: 3'd1, grp_bits: 3'd0, off_bits: 3'd4})) dut (.*);

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

  int run_id = 0;
  // hits and requests of one program, from the counters (cleared at reconfiguration)
  task automatic program_stream(output int h, output int n);
    int h0, n0;
    repeat (2) @(negedge clk);
    h0 = int'(stats.hits); n0 = int'(stats.requests);
    for (int k = 0; k < 1024; k++) access(0, 32'h0100_0000 + (run_id << 16) + (k << 2), 0);
    run_id++;
    repeat (2) @(negedge clk);
    h = int'(stats.hits) - h0; n = int'(stats.requests) - n0;
  endtask

  task automatic program_conflict(output int h, output int n);
    int h0, n0;
    repeat (2) @(negedge clk);
    h0 = int'(stats.hits); n0 = int'(stats.requests);
    for (int it = 0; it < 20; it++)
      for (int s = 0; s < 8; s++)
        for (int t = 0; t < 8; t++) begin
          logic [31:0] a;
          a = 32'h0200_0000 + (t << 16) + (s << 6) + 4 * ((it + t) % 4);
          access((it + s + t) % 4 == 0, a, $urandom);
        end
    repeat (2) @(negedge clk);
    h = int'(stats.hits) - h0; n = int'(stats.requests) - n0;
  endtask

  int hs [3], ns [3], hc [3], nc [3], rcc [3];
  initial begin
    rst_n = 0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; perf_en = 0;
    ext_rc_req = 0; ext_rc_cfg = '0; snp_valid = 0; snp_cmd = '0; fl_wready = 0;
    #22 rst_n = 1;
    @(posedge clk iff cpu_ready);
    chk(cfg.way_bits == 1 && cfg.grp_bits == 0 && cfg.off_bits == 4, "reset geometry 2-5-4");
    program_stream(hs[0], ns[0]);
    program_conflict(hc[0], nc[0]);
    rcc[0] = 0;
    reconfigure('{way_bits: 3'd3, grp_bits: 3'd0, off_bits: 3'd2});
    rcc[1] = int'(stats.rc_cycles);
    program_stream(hs[1], ns[1]);
    program_conflict(hc[1], nc[1]);
    reconfigure('{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd3});
    rcc[2] = int'(stats.rc_cycles);
    program_stream(hs[2], ns[2]);
    program_conflict(hc[2], nc[2]);
    for (int i = 0; i < 3; i++)
      $display("%s: stream %0d/%0d hits, conflict %0d/%0d hits%s", i == 0 ? "2-5-4" : i == 1 ? "8-5-2" : "4-5-3",
               hs[i], ns[i], hc[i], nc[i], i == 0 ? "" : $sformatf(", reached in %0d cycles", rcc[i]));
    foreach (ns[i]) chk(ns[i] == 1024 && nc[i] == 1280 && hs[i] <= ns[i] && hc[i] <= nc[i], "request counts");
    chk(hs[0] > hs[1] && hs[2] > hs[1], "longer lines help the streaming program");
    chk(hc[1] > hc[0] && hc[1] > hc[2], "more ways help the conflict program");
    chk(rcc[1] > 0 && rcc[2] > 0 && n_held > 0, "reconfigurations took place with the bus held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
