// tb_bus_interface: self-checking testbench for bus_interface, the cache-side
// bus master. The testbench plays the shared bus: it grants after a random
// delay, expects exactly one command pulse carrying the requested op, address
// and width, returns read words with random gaps, accepts write-back words
// with random back-pressure, and ends with done and a random shared answer.
// 400 random transactions check: the command fields, the returned line, every
// write-back word and its address, done/shared, the wait_bus count (cycles
// spent requesting without a grant), wait_mem during reads, idle, and that
// lock keeps m_req high between transactions. The hand-shake is this
// design's choice; the published design does not describe the bus protocol.
module tb_bus_interface;
  import cache_pkg::*;
  localparam int MAX_OFF = 4, MAX_WORDS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, lock, idle, done, shared, wait_bus, wait_mem;
  bus_req_t req, m_cmd;
  logic [31:0] wline [MAX_WORDS], rline [MAX_WORDS];
  logic m_req, m_grant, m_cmd_valid, m_wvalid, m_wready, m_rvalid, m_done, m_shared;
  logic [ADDR_W-1:0] m_waddr;
  logic [31:0] m_wdata, m_rdata;

  bus_interface #(.MAX_OFF(MAX_OFF)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  int n_wait_bus, n_wait_mem;
  always @(posedge clk) begin
    n_wait_bus += int'(wait_bus);
    n_wait_mem += int'(wait_mem);
  end

  initial begin
    #20000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; lock = 0; req = '0; m_grant = 0; m_wready = 0; m_rvalid = 0;
    m_done = 0; m_shared = 0; m_rdata = 0;
    foreach (wline[k]) wline[k] = 0;
    #22 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int gdelay, nw, got;
      bit sh;
      logic [31:0] rd [MAX_WORDS];
      @(negedge clk);
      chk(idle, "idle between transactions");
      chk(m_req == lock, "m_req follows lock when idle");
      req = '{op: bus_op_t'(1 + $urandom % 4), addr: $urandom & ~32'h3F, off_bits: 3'($urandom % 5)};
      nw = 1 << req.off_bits;
      foreach (wline[k]) wline[k] = $urandom;
      foreach (rd[k]) rd[k] = $urandom;
      gdelay = $urandom % 5;
      sh = 1'($urandom);
      lock = ($urandom % 4) == 0;
      start = 1;
      @(negedge clk); start = 0;
      n_wait_bus = 0; n_wait_mem = 0;
      chk(m_req, "request raised");
      repeat (gdelay) @(negedge clk);
      chk(n_wait_bus == gdelay, "wait_bus counts cycles without grant");
      m_grant = 1;
      @(negedge clk);
      chk(m_cmd_valid && m_cmd == req, "command pulse with op, address and width");
      @(negedge clk);
      chk(!m_cmd_valid, "single command pulse");
      got = 0;
      if (req.op == BUS_RD || req.op == BUS_RDX) begin
        for (int k = 0; k < nw; k++) begin
          repeat ($urandom % 3) @(negedge clk);
          m_rvalid = 1; m_rdata = rd[k];
          @(negedge clk); m_rvalid = 0;
        end
      end else if (req.op == BUS_WB) begin
        while (got < nw) begin
          m_wready = 1'($urandom);
          #1;
          if (m_wvalid && m_wready) begin
            chk(m_waddr == req.addr + 4 * got, "write-back word address");
            chk(m_wdata == wline[got], "write-back word data");
            got++;
          end
          @(negedge clk);
        end
        m_wready = 0;
        #1 chk(!m_wvalid, "no extra write-back word");
      end
      m_done = 1; m_shared = sh;
      @(negedge clk); m_done = 0; m_shared = 0; m_grant = lock;
      chk(done && shared == sh, "done with shared answer");
      if (req.op == BUS_RD || req.op == BUS_RDX) begin
        chk(n_wait_mem > 0, "wait_mem during a read");
        for (int k = 0; k < nw; k++) chk(rline[k] == rd[k], "read line word");
      end else chk(n_wait_mem == 0, "no wait_mem without a read");
      chk(m_req == lock, "lock keeps the bus");
      @(negedge clk); m_grant = 0; lock = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
