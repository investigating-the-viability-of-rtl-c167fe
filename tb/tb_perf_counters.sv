// tb_perf_counters: self-checking testbench for the performance counters.
// Random event pulses drive all nine event inputs for several thousand
// cycles; the testbench counts the same events and compares all counters,
// including after a clear (the counters restart at zero) and across a
// reconfiguration window (the reconfiguration-cycle counter restarts when
// rc_busy rises and counts while it is high). The list of counters and their
// clearing after a reconfiguration follow the published design; the exact
// clear timing is this design's choice.
module tb_perf_counters;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, clear, ev_req, ev_hit, ev_coh, wait_bus_i, wait_mem_i, wait_shared_wr_i;
  logic ev_wb, wait_miss_i, rc_busy;
  logic [31:0] requests, hits, cycles, coh_ops, wait_bus, wait_mem, wait_shared_wr;
  logic [31:0] write_backs, wait_miss, rc_cycles;
  int m [10];

  perf_counters dut (.*);

  task automatic cmp(input string what, input logic [31:0] got, input int exp);
    checks++;
    if (got !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    cmp("requests", requests, m[0]);       cmp("hits", hits, m[1]);
    cmp("cycles", cycles, m[2]);           cmp("coherence ops", coh_ops, m[3]);
    cmp("wait bus", wait_bus, m[4]);       cmp("wait mem", wait_mem, m[5]);
    cmp("wait shared wr", wait_shared_wr, m[6]); cmp("write-backs", write_backs, m[7]);
    cmp("wait miss", wait_miss, m[8]);     cmp("rc cycles", rc_cycles, m[9]);
  endtask

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    {clear, ev_req, ev_hit, ev_coh, wait_bus_i, wait_mem_i, wait_shared_wr_i, ev_wb, wait_miss_i, rc_busy} = '0;
    rst_n = 0;
    foreach (m[i]) m[i] = 0;
    m[2] = 1;  // the cycle counter also counts the edge before the first check
    #12 rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      logic busy_before;
      @(negedge clk);
      check_all();
      busy_before = rc_busy;
      {ev_req, ev_hit, ev_coh, wait_bus_i, wait_mem_i, wait_shared_wr_i, ev_wb, wait_miss_i} = 8'($urandom);
      clear = (n % 1500) == 777;
      if (n % 1000 == 300) rc_busy = 1;
      if (n % 1000 == 340) rc_busy = 0;
      if (clear) for (int i = 0; i < 9; i++) m[i] = 0;
      else begin
        m[0] += ev_req; m[1] += ev_hit; m[2] += 1; m[3] += ev_coh; m[4] += wait_bus_i;
        m[5] += wait_mem_i; m[6] += wait_shared_wr_i; m[7] += ev_wb; m[8] += wait_miss_i;
      end
      if (rc_busy && !busy_before) m[9] = 1;
      else if (rc_busy) m[9] += 1;
    end
    @(negedge clk); check_all();
    cmp("reconfiguration length", rc_cycles, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
