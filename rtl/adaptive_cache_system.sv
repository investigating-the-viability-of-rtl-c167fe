// adaptive_cache_system: top level. NC run-time reconfigurable L1 caches
// (for example the instruction and data caches of one core, or the caches of
// several cores) share one bus to the level below.
//
// Each cache adapts its organisation (ways, sets, line width) at run time,
// from its own performance monitors or when its eviction table suspects a
// prime+probe attack, and keeps coherent with the others over the bus even
// when their line widths differ. The processors and the level-2 cache are not
// part of this design: every cache's processor port and the bus's level-below
// port are brought out. The level below must answer a read with
// 1 << l2_cmd.off_bits words on l2_rvalid/l2_rdata and then pulse l2_done (at
// least one cycle after the last word), accept write words on l2_wvalid with
// l2_wready (each carries its address in l2_waddr), and pulse l2_done after
// the last word of a write-back or for an upgrade. Per-cache processor ports
// are arrays indexed by cache number.
module adaptive_cache_system
  import cache_pkg::*;
#(
  parameter int   NC             = 2,
  parameter int   N_BLOCKS       = 20,
  parameter int   DEPTH          = 256,
  parameter int   MAX_TAG_BLOCKS = 8,
  parameter int   MAX_WAYS       = 8,
  parameter int   MAX_OFF        = 4,
  parameter cfg_t RESET_CFG      = '{way_bits: 3'd2, grp_bits: 3'd0, off_bits: 3'd2},
  parameter int   CHECK_N        = 4096,
  parameter int   HIT_PCT        = 80,
  parameter int   CPR_MAX        = 4,
  parameter int   N_ENT          = 8,
  parameter int   W_THR          = 8,
  parameter int   K_THR          = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  logic [NC-1:0]     cpu_req,
  input  logic [NC-1:0]     cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr   [NC],
  input  logic [31:0]       cpu_wdata  [NC],
  output logic [NC-1:0]     cpu_ready,
  output logic [NC-1:0]     cpu_resp,
  output logic [31:0]       cpu_rdata  [NC],
  // control and status per cache
  input  logic [NC-1:0]     perf_en,
  input  logic [NC-1:0]     ext_rc_req,
  input  cfg_t              ext_rc_cfg [NC],
  output cfg_t              cfg        [NC],
  output logic [NC-1:0]     rc_busy,
  output logic [NC-1:0]     attack,
  output cache_stats_t      stats      [NC],
  // level below
  output logic              l2_cmd_valid,
  output bus_req_t          l2_cmd,
  output logic              l2_wvalid,
  output logic [ADDR_W-1:0] l2_waddr,
  output logic [31:0]       l2_wdata,
  input  logic              l2_wready,
  input  logic              l2_rvalid,
  input  logic [31:0]       l2_rdata,
  input  logic              l2_done,
  output logic              bus_busy
);

  logic [NC-1:0]     m_req, m_grant, m_cmd_valid, m_wvalid, m_wready, m_rvalid, m_done;
  bus_req_t          m_cmd   [NC];
  logic [ADDR_W-1:0] m_waddr [NC];
  logic [31:0]       m_wdata [NC];
  logic [31:0]       m_rdata;
  logic              m_shared;
  logic [NC-1:0]     snp_valid, snp_busy, snp_shared, fl_wvalid, fl_wready;
  bus_req_t          snp_cmd;
  logic [ADDR_W-1:0] fl_waddr [NC];
  logic [31:0]       fl_wdata [NC];

  for (genvar i = 0; i < NC; i++) begin : g_l1
    reconfig_l1_cache #(
      .N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH), .MAX_TAG_BLOCKS(MAX_TAG_BLOCKS),
      .MAX_WAYS(MAX_WAYS), .MAX_OFF(MAX_OFF), .RESET_CFG(RESET_CFG),
      .CHECK_N(CHECK_N), .HIT_PCT(HIT_PCT), .CPR_MAX(CPR_MAX),
      .N_ENT(N_ENT), .W_THR(W_THR), .K_THR(K_THR)
    ) u_l1 (
      .clk, .rst_n,
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]),
      .cpu_wdata(cpu_wdata[i]), .cpu_ready(cpu_ready[i]), .cpu_resp(cpu_resp[i]),
      .cpu_rdata(cpu_rdata[i]),
      .perf_en(perf_en[i]), .ext_rc_req(ext_rc_req[i]), .ext_rc_cfg(ext_rc_cfg[i]),
      .cfg(cfg[i]), .rc_busy(rc_busy[i]), .attack(attack[i]), .stats(stats[i]),
      .m_req(m_req[i]), .m_grant(m_grant[i]), .m_cmd_valid(m_cmd_valid[i]),
      .m_cmd(m_cmd[i]), .m_wvalid(m_wvalid[i]), .m_waddr(m_waddr[i]),
      .m_wdata(m_wdata[i]), .m_wready(m_wready[i]), .m_rvalid(m_rvalid[i]),
      .m_rdata(m_rdata), .m_done(m_done[i]), .m_shared(m_shared),
      .snp_valid(snp_valid[i]), .snp_cmd(snp_cmd), .snp_busy(snp_busy[i]),
      .snp_shared(snp_shared[i]), .fl_wvalid(fl_wvalid[i]), .fl_waddr(fl_waddr[i]),
      .fl_wdata(fl_wdata[i]), .fl_wready(fl_wready[i])
    );
  end

  shared_bus #(.NM(NC)) u_bus (
    .clk, .rst_n,
    .m_req, .m_grant, .m_cmd_valid, .m_cmd, .m_wvalid, .m_waddr, .m_wdata, .m_wready,
    .m_rvalid, .m_rdata, .m_done, .m_shared,
    .snp_valid, .snp_cmd, .snp_busy, .snp_shared, .fl_wvalid, .fl_waddr, .fl_wdata,
    .fl_wready,
    .l2_cmd_valid, .l2_cmd, .l2_wvalid, .l2_waddr, .l2_wdata, .l2_wready, .l2_rvalid,
    .l2_rdata, .l2_done, .busy(bus_busy)
  );

endmodule
