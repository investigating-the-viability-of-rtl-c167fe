// tb_shared_bus: self-checking testbench for the shared bus, with three
// bus_interface masters, the behavioural L2 (l2_model) and scripted snoopers.
// Each master runs 150 random transactions (line read, read-exclusive,
// upgrade, write-back) of 1 to 16 words at line-aligned addresses in a small
// region, so they collide. Scripted snoopers stay busy 1-3 cycles on every
// broadcast, randomly report a shared copy and sometimes push one flush word
// through their flush channel. Checks: at most one grant at a time, a snoop
// reaches every cache but the owner, a read returns the reference memory
// contents (write-backs and flushes included), the shared answer equals the OR
// of the snoopers' answers for that transaction, and a master holding lock
// keeps the bus across two back-to-back transactions. Round-robin arbitration,
// the phase order and the flush channel are this design's choices; the width
// lanes (off_bits on every command) follow the published design.
module tb_shared_bus;
  import cache_pkg::*;
  localparam int NM = 3, MAX_OFF = 4, MAX_WORDS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_flush = 0, n_shared = 0, n_lock = 0;
  logic rst_n;

  logic [NM-1:0] start, lock, idle, done, shared, wait_bus, wait_mem;
  bus_req_t req [NM];
  logic [31:0] wline [NM][MAX_WORDS];
  logic [31:0] rline [NM][MAX_WORDS];
  logic [NM-1:0] m_req, m_grant, m_cmd_valid, m_wvalid, m_wready, m_rvalid, m_done;
  bus_req_t m_cmd [NM];
  logic [ADDR_W-1:0] m_waddr [NM];
  logic [31:0] m_wdata [NM], m_rdata;
  logic m_shared;
  logic [NM-1:0] snp_valid, snp_busy, snp_shared, fl_wvalid, fl_wready;
  bus_req_t snp_cmd;
  logic [ADDR_W-1:0] fl_waddr [NM];
  logic [31:0] fl_wdata [NM];
  logic l2_cmd_valid, l2_wvalid, l2_wready, l2_rvalid, l2_done, busy;
  bus_req_t l2_cmd;
  logic [ADDR_W-1:0] l2_waddr;
  logic [31:0] l2_wdata, l2_rdata;

  for (genvar i = 0; i < NM; i++) begin : g_m
    bus_interface #(.MAX_OFF(MAX_OFF)) u_bi (
      .clk, .rst_n, .start(start[i]), .req(req[i]), .wline(wline[i]), .lock(lock[i]),
      .idle(idle[i]), .done(done[i]), .shared(shared[i]), .rline(rline[i]),
      .wait_bus(wait_bus[i]), .wait_mem(wait_mem[i]), .m_req(m_req[i]), .m_grant(m_grant[i]),
      .m_cmd_valid(m_cmd_valid[i]), .m_cmd(m_cmd[i]), .m_wvalid(m_wvalid[i]),
      .m_waddr(m_waddr[i]), .m_wdata(m_wdata[i]), .m_wready(m_wready[i]),
      .m_rvalid(m_rvalid[i]), .m_rdata(m_rdata), .m_done(m_done[i]), .m_shared(m_shared));
  end

  shared_bus #(.NM(NM)) dut (.*);

  l2_model #(.LAT(3)) u_l2 (
    .clk, .rst_n, .cmd_valid(l2_cmd_valid), .cmd(l2_cmd), .wvalid(l2_wvalid),
    .waddr(l2_waddr), .wdata(l2_wdata), .wready(l2_wready), .rvalid(l2_rvalid),
    .rdata(l2_rdata), .done(l2_done));

  // reference memory
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

  // one grant at most; snoops reach everyone but the owner
  always @(posedge clk) if (rst_n) begin
    chk($countones(m_grant) <= 1, "single owner");
    if (snp_valid != '0) chk(snp_valid == ~m_grant, "snoop broadcast to all but owner");
  end

  // scripted snoopers; the shared answer of the running transaction is recorded
  logic txn_shared;
  for (genvar i = 0; i < NM; i++) begin : g_s
    initial begin
      snp_busy[i] = 0; snp_shared[i] = 0; fl_wvalid[i] = 0; fl_waddr[i] = 0; fl_wdata[i] = 0;
      forever begin
        @(posedge clk iff snp_valid[i]);
        #1;
        snp_busy[i] = 1;
        snp_shared[i] = ($urandom % 3) == 0;
        if (snp_shared[i]) txn_shared = 1;
        repeat (1 + $urandom % 3) @(posedge clk);
        #1;
        if (($urandom % 4) == 0) begin
          // push one word of modified data ahead of the transfer
          fl_wvalid[i] = 1;
          fl_waddr[i] = snp_cmd.addr;
          fl_wdata[i] = $urandom;
          @(posedge clk iff fl_wready[i]);
          refm[fl_waddr[i][31:2]] = fl_wdata[i];
          n_flush++;
          #1 fl_wvalid[i] = 0;
        end
        snp_busy[i] = 0; snp_shared[i] = 0;
      end
    end
  end

  // a master: one transaction at a time
  semaphore ref_lock = new(1);
  task automatic txn(input int i, input bus_op_t op, input logic [31:0] a, input int ob, input bit lk);
    @(negedge clk);
    while (!idle[i]) @(negedge clk);
    req[i] = '{op: op, addr: a, off_bits: 3'(ob)};
    lock[i] = lk;
    for (int k = 0; k < MAX_WORDS; k++) wline[i][k] = $urandom;
    start[i] = 1;
    @(negedge clk); start[i] = 0;
    @(posedge clk iff m_cmd_valid[i]);
    txn_shared = 0;
    @(posedge clk iff done[i]);
    #1;
    if (op == BUS_WB) for (int k = 0; k < (1 << ob); k++) refm[30'((a >> 2) + k)] = wline[i][k];
    if (op == BUS_RD || op == BUS_RDX)
      for (int k = 0; k < (1 << ob); k++) begin
        checks++;
        if (rline[i][k] !== ref_rd(a + 4 * k)) begin
          failures++;
          if (failures < 10) $display("FAIL m%0d read %h word %0d got %h exp %h", i, a, k,
                                      rline[i][k], ref_rd(a + 4 * k));
        end
      end
    chk(shared[i] == txn_shared, "shared answer");
    if (shared[i]) n_shared++;
  endtask

  // random traffic, one process per master; each master has its own 8-line
  // region, so a flush and a write-back of the same word never race
  bit go = 0;
  int n_fin = 0;
  for (genvar i = 0; i < NM; i++) begin : g_run
    initial begin
      wait (go);
      for (int n = 0; n < 150; n++)
        txn(i, bus_op_t'(1 + $urandom % 4), 32'h0001_0000 + i * 32'h1000 + (($urandom % 8) << 6),
            $urandom % 5, 1'b0);
      n_fin++;
    end
  end

  initial begin
    #20000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; start = '0; lock = '0;
    for (int i = 0; i < NM; i++) req[i] = '0;
    #22 rst_n = 1;
    go = 1;
    wait (n_fin == NM);
    // lock: master 0 keeps the bus over two transactions
    fork
      begin
        txn(0, BUS_RD, 32'h0002_0000, 2, 1'b1);
        chk(m_grant[0], "bus kept while locked");
        txn(0, BUS_WB, 32'h0002_0040, 2, 1'b1);
        chk(m_grant[0], "bus still kept");
        n_lock++;
        @(negedge clk); lock[0] = 0;
      end
      begin
        repeat (3) @(negedge clk);
        txn(1, BUS_RD, 32'h0002_1000, 0, 1'b0);
      end
    join
    chk(n_flush > 10 && n_shared > 10 && n_lock == 1, "flushes, shared answers and lock seen");
    $display("flushes %0d shared %0d", n_flush, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
