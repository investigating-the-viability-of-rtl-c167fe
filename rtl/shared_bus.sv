// shared_bus: the shared bus between the L1 caches and the level below.
//
// One cache at a time owns the bus. Arbitration is round-robin among caches
// raising m_req; the owner keeps the bus for as long as it holds m_req, which
// lets a reconfiguring cache keep it across many transactions. A transaction:
//   1. the owner pulses m_cmd_valid with op, line address and off_bits;
//      off_bits is the extra set of lanes that tells every other cache and the
//      level below how many words (1 << off_bits) the request covers;
//   2. SNOOP: the command is broadcast (snp_valid) to every other cache;
//   3. WAIT: the bus waits until no snooper is busy; meanwhile a snooper holding
//      a modified copy writes it back through its flush channel (fl_*);
//      snp_shared from any snooper is collected;
//   4. XFER: the command goes to the level below (l2_cmd_valid); read words
//      return on l2_rvalid/l2_rdata to the owner, write-back words go from the
//      owner on m_wvalid/m_waddr/m_wdata; l2_done ends it and the owner gets
//      m_done with m_shared.
// Width lanes follow the design; the phase structure, snoop hand-shake and
// flush channel are this design's own (the underlying bus protocol is not
// described). Word writes to the level below always carry their own address.
module shared_bus
  import cache_pkg::*;
#(
  parameter int NM = 2,
  parameter int IW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // masters (caches, through their bus interfaces)
  input  logic [NM-1:0]     m_req,
  output logic [NM-1:0]     m_grant,
  input  logic [NM-1:0]     m_cmd_valid,
  input  bus_req_t          m_cmd      [NM],
  input  logic [NM-1:0]     m_wvalid,
  input  logic [ADDR_W-1:0] m_waddr    [NM],
  input  logic [31:0]       m_wdata    [NM],
  output logic [NM-1:0]     m_wready,
  output logic [NM-1:0]     m_rvalid,
  output logic [31:0]       m_rdata,
  output logic [NM-1:0]     m_done,
  output logic              m_shared,
  // snoop broadcast
  output logic [NM-1:0]     snp_valid,
  output bus_req_t          snp_cmd,
  input  logic [NM-1:0]     snp_busy,
  input  logic [NM-1:0]     snp_shared,
  input  logic [NM-1:0]     fl_wvalid,
  input  logic [ADDR_W-1:0] fl_waddr   [NM],
  input  logic [31:0]       fl_wdata   [NM],
  output logic [NM-1:0]     fl_wready,
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
  // status
  output logic              busy
);

  typedef enum logic [1:0] {T_IDLE, T_SNOOP, T_WAIT, T_XFER} tstate_t;
  tstate_t          ts;
  logic             own_valid;
  logic [IW-1:0]    owner, rr_next;
  bus_req_t         cmd_q;
  logic             shared_q;

  // ------------------------------------------------------------ arbitration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_valid <= 1'b0;
      owner     <= '0;
      rr_next   <= '0;
    end else if (own_valid) begin
      if (!m_req[owner] && ts == T_IDLE) own_valid <= 1'b0;
    end else begin
      for (int k = NM - 1; k >= 0; k--) begin
        int i;
        i = (int'(rr_next) + k) % NM;
        if (m_req[i]) begin
          own_valid <= 1'b1;
          owner     <= IW'(i);
          rr_next   <= IW'((i + 1) % NM);
        end
      end
    end
  end

  always_comb begin
    m_grant = '0;
    if (own_valid) m_grant[owner] = 1'b1;
  end

  // ------------------------------------------------------------ transaction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts       <= T_IDLE;
      cmd_q    <= '0;
      shared_q <= 1'b0;
    end else begin
      case (ts)
        T_IDLE:
          if (own_valid && m_cmd_valid[owner]) begin
            cmd_q    <= m_cmd[owner];
            shared_q <= 1'b0;
            ts       <= T_SNOOP;
          end
        T_SNOOP: begin
          shared_q <= shared_q | (|snp_shared);
          ts       <= T_WAIT;
        end
        T_WAIT: begin
          shared_q <= shared_q | (|snp_shared);
          if (!(|snp_busy)) ts <= T_XFER;
        end
        T_XFER:
          if (l2_done) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  assign snp_cmd      = cmd_q;
  assign l2_cmd       = cmd_q;
  assign l2_cmd_valid = (ts == T_WAIT) && !(|snp_busy);
  assign m_rdata      = l2_rdata;
  assign m_shared     = shared_q;
  assign busy         = own_valid;

  always_comb begin
    snp_valid = '0;
    m_rvalid  = '0;
    m_done    = '0;
    m_wready  = '0;
    fl_wready = '0;
    l2_wvalid = 1'b0;
    l2_waddr  = '0;
    l2_wdata  = '0;
    if (ts == T_SNOOP) begin
      snp_valid        = '1;
      snp_valid[owner] = 1'b0;
    end
    if (ts == T_XFER) begin
      m_rvalid[owner] = l2_rvalid;
      m_done[owner]   = l2_done;
      l2_wvalid       = m_wvalid[owner];
      l2_waddr        = m_waddr[owner];
      l2_wdata        = m_wdata[owner];
      m_wready[owner] = l2_wready;
    end else begin
      // flush from the (single) snooper holding modified data
      for (int i = 0; i < NM; i++)
        if (fl_wvalid[i]) begin
          l2_wvalid    = 1'b1;
          l2_waddr     = fl_waddr[i];
          l2_wdata     = fl_wdata[i];
          fl_wready[i] = l2_wready;
        end
    end
  end

  // the owner issues commands only while it holds the bus
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_cmd_valid != '0 |-> ((m_cmd_valid & ~m_grant) == '0))
    else $error("shared_bus: command from a cache that does not own the bus");

endmodule
