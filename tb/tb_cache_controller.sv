// tb_cache_controller: self-checking testbench for the L1 cache controller.
// The controller's ports are the storage array, the bus interface and the
// monitors, so it is exercised inside two complete caches (the top level at
// its default sizes) with the behavioural L2, using directed sequences whose
// outcome is known exactly:
//   read miss (bus read, L2 read count +1) then read hit in one cycle;
//   write hit on an exclusive line: silent E->M, no bus traffic;
//   read by the other cache: the modified copy is flushed and both share it;
//   write to a shared line: one upgrade, the other copy is invalidated;
//   write miss: write-allocate, the next read hits;
//   five dirty lines through one 4-way set: exactly one write-back, on the
//     fifth fill, and the evicted data is read back correctly;
//   reconfiguration with dirty lines: every dirty line is written back,
//     the new configuration is reported and all data survives;
//   requests arriving during a reconfiguration wait until it ends.
// Every read is also compared with a reference memory. MESI, write-back,
// write-allocate and the reconfiguration steps follow the published design; the
// timing is this design's choice.
module tb_cache_controller;
  import cache_pkg::*;
  localparam int NC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  adaptive_cache_system dut (.*);

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
      if (failures < 12) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  int lat;
  task automatic access(input int c, input logic we, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    while (!cpu_ready[c]) @(negedge clk);
    cpu_req[c] = 1; cpu_we[c] = we; cpu_addr[c] = a; cpu_wdata[c] = d;
    @(negedge clk); cpu_req[c] = 0;
    lat = 0;
    while (!cpu_resp[c]) begin @(negedge clk); lat++; end
    if (!we) begin
      checks++;
      if (cpu_rdata[c] !== ref_rd(a)) begin
        failures++;
        if (failures < 12) $display("FAIL cache%0d read %h got %h exp %h", c, a, cpu_rdata[c], ref_rd(a));
      end
    end else refm[a[31:2]] = d;
  endtask

  int rd0, wb0, up0;
  task automatic snap();
    rd0 = u_l2.n_rd; wb0 = u_l2.n_wb; up0 = u_l2.n_upgr;
  endtask

  initial begin
    #50000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  localparam logic [31:0] A = 32'h0000_4A40, B = 32'h0007_0080;

  initial begin
    cpu_req = '0; cpu_we = '0; perf_en = '0; ext_rc_req = '0;
    for (int i = 0; i < NC; i++) begin cpu_addr[i] = 0; cpu_wdata[i] = 0; ext_rc_cfg[i] = '0; end
    #22 rst_n = 1;
    // read miss, then hit
    snap();
    access(0, 0, A, 0);
    chk(u_l2.n_rd == rd0 + 1 && lat > 1, "read miss goes to the L2");
    access(0, 0, A + 4, 0);
    chk(lat == 0 && u_l2.n_rd == rd0 + 1, "read hit answered in one cycle");
    // silent E -> M
    snap();
    access(0, 1, A, 32'h1111_0001);
    chk(lat == 0 && u_l2.n_rd == rd0 && u_l2.n_upgr == up0, "write hit on E is silent");
    // the other cache reads: modified copy flushed, data forwarded through L2
    access(1, 0, A, 0);
    chk(u_l2.n_rd == rd0 + 1, "remote read is one bus read");
    // write to the shared copy: upgrade, other copy invalidated
    snap();
    access(1, 1, A + 8, 32'h2222_0002);
    chk(u_l2.n_upgr == up0 + 1, "write to a shared line upgrades");
    access(0, 0, A + 8, 0);
    chk(lat > 1, "invalidated copy misses");
    access(0, 0, A, 0);
    // write miss: write-allocate
    snap();
    access(0, 1, B, 32'h3333_0003);
    chk(u_l2.n_rd == rd0 + 1, "write miss fetches the line");
    access(0, 0, B, 0);
    chk(lat == 0, "written line is now a hit");
    // five dirty lines through one set of the 4-way cache (set stride 4 KB)
    snap();
    for (int r = 0; r < 5; r++) access(0, 1, 32'h0010_0100 + (r << 12), 32'h4444_0000 + r);
    chk(u_l2.n_wb == wb0 + 1, "one write-back on the fifth fill");
    for (int r = 0; r < 5; r++) access(0, 0, 32'h0010_0100 + (r << 12), 0);
    // dirty lines, then a reconfiguration: every dirty line is written back
    for (int r = 0; r < 20; r++) access(0, 1, 32'h0020_0000 + (r << 6), r);
    snap();
    fork
      begin
        @(negedge clk); ext_rc_req[0] = 1; ext_rc_cfg[0] = '{way_bits: 3'd1, grp_bits: 3'd0, off_bits: 3'd3};
        @(negedge clk); ext_rc_req[0] = 0;
      end
      begin
        // a request right behind the reconfiguration request waits for it
        repeat (3) @(negedge clk);
        chk(rc_busy[0], "reconfiguration running");
        access(0, 0, 32'h0020_0000, 0);
        chk(!rc_busy[0], "request served after the reconfiguration");
      end
    join
    chk(u_l2.n_wb >= wb0 + 20, "dirty lines written back by the reconfiguration walk");
    chk(cfg[0].way_bits == 1 && cfg[0].off_bits == 3, "new configuration 2-8-3");
    for (int r = 0; r < 20; r++) access(0, 0, 32'h0020_0000 + (r << 6), 0);
    for (int r = 0; r < 5; r++) access(0, 0, 32'h0010_0100 + (r << 12), 0);
    access(0, 0, A, 0); access(0, 0, B, 0);
    access(1, 0, B, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
