// bus_interface: bridges a cache's line-wide requests and the one-word bus.
//
// The controller starts a transfer with `start` and a bus_req_t (operation,
// line address, off_bits). The interface requests the bus, issues the command
// with the line width on the bus's width lanes, then moves 1 << off_bits words:
// for BUS_RD / BUS_RDX it collects the returned words into rline, for BUS_WB it
// sends wline word by word (address of each word included), for BUS_UPGR no
// data moves. `done` pulses for one cycle when the level below ends the
// transaction; `shared` then tells whether another cache kept a copy.
// While `lock` is high the interface keeps requesting the bus between
// transfers, so a reconfiguring cache keeps ownership from its first (dummy)
// read to its last write-back. wait_bus and wait_mem report the cycles spent
// waiting for the grant and for read data. Variable word count from off_bits
// follows the design; the handshake is this design's own.
module bus_interface
  import cache_pkg::*;
#(
  parameter int MAX_OFF   = 4,
  parameter int MAX_WORDS = 1 << MAX_OFF
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller side
  input  logic              start,
  input  bus_req_t          req,
  input  logic [31:0]       wline [MAX_WORDS],
  input  logic              lock,
  output logic              idle,
  output logic              done,
  output logic              shared,
  output logic [31:0]       rline [MAX_WORDS],
  output logic              wait_bus,
  output logic              wait_mem,
  // bus side
  output logic              m_req,
  input  logic              m_grant,
  output logic              m_cmd_valid,
  output bus_req_t          m_cmd,
  output logic              m_wvalid,
  output logic [ADDR_W-1:0] m_waddr,
  output logic [31:0]       m_wdata,
  input  logic              m_wready,
  input  logic              m_rvalid,
  input  logic [31:0]       m_rdata,
  input  logic              m_done,
  input  logic              m_shared
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_CMD, S_DATA} state_t;
  state_t         st;
  bus_req_t       req_q;
  logic [MAX_OFF:0] cnt;
  int             nwords;
  assign nwords = 1 << req_q.off_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      req_q  <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      shared <= 1'b0;
      for (int k = 0; k < MAX_WORDS; k++) rline[k] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE:
          if (start) begin
            req_q <= req;
            cnt   <= '0;
            st    <= S_REQ;
          end
        S_REQ:  if (m_grant) st <= S_CMD;
        S_CMD:  st <= S_DATA;
        S_DATA: begin
          if ((req_q.op == BUS_RD || req_q.op == BUS_RDX) && m_rvalid) begin
            rline[cnt[MAX_OFF-1:0]] <= m_rdata;
            cnt <= cnt + 1'b1;
          end
          if (req_q.op == BUS_WB && m_wvalid && m_wready) cnt <= cnt + 1'b1;
          if (m_done) begin
            done   <= 1'b1;
            shared <= m_shared;
            st     <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign idle        = (st == S_IDLE) && !start;
  assign m_req       = (st != S_IDLE) || lock;
  assign m_cmd_valid = (st == S_CMD);
  assign m_cmd       = req_q;
  assign m_wvalid    = (st == S_DATA) && req_q.op == BUS_WB && int'(cnt) < nwords;
  assign m_waddr     = req_q.addr + ADDR_W'({cnt, 2'b00});
  assign m_wdata     = wline[cnt[MAX_OFF-1:0]];
  assign wait_bus    = (st == S_REQ) && !m_grant;
  assign wait_mem    = (st == S_DATA) && (req_q.op == BUS_RD || req_q.op == BUS_RDX);

endmodule
