// tb_snooper: self-checking testbench for the snooper, run against a real
// cache_memory (its port B) that the testbench fills through port A.
// For three local line widths (4, 8 and 1 words) it installs random lines in
// random MESI states, then sends 300 random bus commands (read, read-exclusive,
// upgrade) of 1 to 16 words, some of them wider than the local line so that
// one command covers several local lines. A reference model of the cache
// predicts, for every local line covered: the state after the snoop
// (M/E -> S on a read, anything -> I on an exclusive request), the words a
// modified line must flush (address and data, in order), the shared answer,
// and the number of coherence events; all are checked, with random
// back-pressure on the flush channel. Splitting a wider request into local
// lines follows the published design; the sequencing is this design's choice.
module tb_snooper;
  import cache_pkg::*;
  localparam int N_BLOCKS = 20, DEPTH = 256, MAX_TAG_BLOCKS = 8, MAX_WAYS = 8, MAX_OFF = 4;
  localparam int LOG_L = 8, MAX_GRP_BITS = 3, SET_W = 11, TAG_W = 22, OW = 4, WW = 3, MAX_WORDS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_multi = 0, n_flushes = 0;

  logic rst_n, cfg_load;
  cfg_t cfg;
  // port A, driven by the testbench
  logic [SET_W-1:0] a_set;
  logic [TAG_W-1:0] a_tag;
  logic [OW-1:0] a_word;
  logic [WW-1:0] a_sel_way, a_hit_way, a_line_way, a_victim, lru_way;
  logic a_clear, a_tag_we, a_line_we, a_word_we, a_hit, lru_touch;
  mesi_t a_state, a_hit_state;
  logic [31:0] a_line_wdata [MAX_WORDS], a_wdata, a_rword;
  mesi_t a_way_state [MAX_WAYS];
  logic [TAG_W-1:0] a_way_tag [MAX_WAYS];
  logic [31:0] a_line [MAX_WORDS];
  // port B, driven by the snooper
  logic [SET_W-1:0] b_set;
  logic [TAG_W-1:0] b_tag;
  logic [OW-1:0] b_word;
  logic b_state_we, b_hit;
  logic [WW-1:0] b_way, b_hit_way;
  mesi_t b_state, b_hit_state;
  logic [31:0] b_rword;
  // bus side
  logic snp_valid, busy, shared, fl_wvalid, fl_wready, ev_coh, ev_inv;
  bus_req_t snp_cmd;
  logic [ADDR_W-1:0] fl_waddr;
  logic [31:0] fl_wdata;
  logic [SET_W-1:0] inv_set;
  logic [WW-1:0] inv_way;

  cache_memory #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS),
                 .MAX_WAYS(MAX_WAYS), .MAX_OFF(MAX_OFF)) u_mem (.*);
  snooper #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF), .MAX_WAYS(MAX_WAYS)) dut (.*);

  // reference: line address -> state and data
  typedef struct { mesi_t st; logic [31:0] d [MAX_WORDS]; int way; } line_t;
  line_t lines [logic [31:0]];
  int ways, lo;

  function automatic logic [31:0] set_of(input logic [31:0] a);
    return (a >> (2 + lo)) & ((32'd1 << (LOG_L + int'(cfg.grp_bits))) - 1);
  endfunction
  function automatic logic [31:0] tag_of(input logic [31:0] a);
    return a >> (2 + lo + LOG_L + int'(cfg.grp_bits));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic install(input logic [31:0] la, input mesi_t s);
    int w;
    @(negedge clk);
    a_set = SET_W'(set_of(la)); a_tag = TAG_W'(tag_of(la));
    if (lines.exists(la)) w = lines[la].way;
    else begin
      w = $urandom % ways;
      // drop whatever that way held
      foreach (lines[x]) if (set_of(x) == set_of(la) && lines[x].way == w) lines.delete(x);
    end
    a_sel_way = WW'(w); a_state = s; a_tag_we = 1; a_line_we = 1;
    for (int k = 0; k < MAX_WORDS; k++) a_line_wdata[k] = $urandom;
    lines[la].st = s; lines[la].way = w;
    for (int k = 0; k < MAX_WORDS; k++) lines[la].d[k] = a_line_wdata[k];
    @(negedge clk); a_tag_we = 0; a_line_we = 0;
  endtask

  // flush words and coherence events seen during a snoop
  logic [31:0] fl_a [$], fl_d [$];
  int n_coh;
  bit saw_shared;
  always @(posedge clk) begin
    if (fl_wvalid && fl_wready) begin fl_a.push_back(fl_waddr); fl_d.push_back(fl_wdata); end
    if (ev_coh) n_coh++;
    if (shared) saw_shared = 1;
  end

  initial begin
    #50000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  cfg_t cfgs [3] = '{'{2,0,2}, '{1,0,3}, '{3,0,0}};
  logic [31:0] base = 32'h0004_0000;

  initial begin
    rst_n = 0; cfg_load = 0; cfg = cfgs[0];
    a_set = 0; a_tag = 0; a_word = 0; a_sel_way = 0; a_line_way = 0; lru_way = 0;
    a_clear = 0; a_tag_we = 0; a_line_we = 0; a_word_we = 0; lru_touch = 0; a_state = ST_I;
    a_wdata = 0; foreach (a_line_wdata[k]) a_line_wdata[k] = 0;
    snp_valid = 0; snp_cmd = '0; fl_wready = 0;
    #22 rst_n = 1;
    foreach (cfgs[c]) begin
      cfg = cfgs[c];
      ways = 1 << cfg.way_bits; lo = int'(cfg.off_bits);
      lines.delete();
      @(negedge clk); cfg_load = 1;
      @(negedge clk); cfg_load = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); a_clear = 1; a_set = SET_W'(i);
      end
      @(negedge clk); a_clear = 0;
      for (int n = 0; n < 300; n++) begin
        bus_req_t cmd;
        int ro, nl;
        logic [31:0] first, exp_a [$], exp_d [$];
        int exp_coh;
        bit exp_sh;
        // refresh a few lines; the region is 64 local lines, spread over sets with aliasing tags
        repeat (3) install(base + (($urandom % 64) << (2 + lo)) + (32'($urandom % 2) << 18),
                           mesi_t'($urandom % 4));
        ro = $urandom % 5;
        cmd = '{op: bus_op_t'(1 + $urandom % 3),
                addr: base + (($urandom % 64) << (2 + lo)) + (32'($urandom % 2) << 18) + 4 * ($urandom % 16),
                off_bits: 3'(ro)};
        // reference
        if (ro > lo) begin first = cmd.addr & ~((32'd4 << ro) - 1); nl = 1 << (ro - lo); n_multi++; end
        else begin first = cmd.addr & ~((32'd4 << lo) - 1); nl = 1; end
        exp_coh = 0; exp_sh = 0; exp_a.delete(); exp_d.delete();
        for (int l = 0; l < nl; l++) begin
          logic [31:0] la;
          la = first + (l << (2 + lo));
          if (lines.exists(la) && lines[la].st != ST_I) begin
            if (cmd.op == BUS_RD) exp_sh = 1;
            if (lines[la].st == ST_M) begin
              for (int k = 0; k < (1 << lo); k++) begin
                exp_a.push_back(la + 4 * k); exp_d.push_back(lines[la].d[k]);
              end
              exp_coh++;
              n_flushes++;
              lines[la].st = (cmd.op == BUS_RD) ? ST_S : ST_I;
            end else if (cmd.op == BUS_RD) lines[la].st = ST_S;
            else begin lines[la].st = ST_I; exp_coh++; end
          end
        end
        // drive the snoop
        fl_a.delete(); fl_d.delete(); n_coh = 0; saw_shared = 0;
        @(negedge clk); snp_valid = 1; snp_cmd = cmd;
        @(negedge clk); snp_valid = 0;
        while (busy) begin
          fl_wready = 1'($urandom);
          @(negedge clk);
        end
        fl_wready = 0;
        chk(fl_a.size() == exp_a.size(), "number of flushed words");
        for (int i = 0; i < fl_a.size() && i < exp_a.size(); i++) begin
          chk(fl_a[i] == exp_a[i], "flush address");
          chk(fl_d[i] == exp_d[i], "flush data");
        end
        chk(saw_shared == exp_sh, "shared answer");
        chk(n_coh == exp_coh, "coherence events");
        // states after the snoop, read back through port A
        for (int l = 0; l < nl; l++) begin
          logic [31:0] la;
          la = first + (l << (2 + lo));
          if (lines.exists(la)) begin
            @(negedge clk); a_set = SET_W'(set_of(la));
            @(posedge clk); #1;
            chk(a_way_state[lines[la].way] == lines[la].st, "state after snoop");
          end
        end
      end
    end
    chk(n_multi > 50 && n_flushes > 30, "wide requests and flushes seen");
    $display("wide requests %0d flushes %0d", n_multi, n_flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
