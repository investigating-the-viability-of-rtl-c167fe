// snooper: keeps one cache coherent (MESI) with the others on the shared bus,
// when caches may use different line widths.
//
// For every command another cache puts on the bus, the snooper compares the
// request's line width (off_bits carried on the bus) with its own cache's
// current line width and works out how many local lines the request touches:
//   request wider than local lines  -> 1 << (req_off - local_off) local lines
//   request not wider               -> the one local line containing it
// It then looks each of those lines up through port B of cache_memory and
//   BUS_RD        : M -> write the line back (flush channel) then S; E -> S;
//                   any copy raises `shared`
//   BUS_RDX/UPGR  : M -> write the line back then I; E/S -> I
// A flush sends every word of the local line with its own address. The bus
// waits while `busy` is high, so the snooper keeps the bus for all of its
// write-backs. ev_coh pulses once per invalidation or write-back (the
// "coherence operations" counter), ev_inv/inv_set/inv_way report invalidated
// lines to the utilization tables. Each lookup takes two cycles, each flushed
// word two cycles plus the level below's ready. Behaviour on width mismatch
// follows the design; the exact sequencing is this design's own.
module snooper
  import cache_pkg::*;
#(
  parameter int LOG_L        = 8,
  parameter int MAX_GRP_BITS = 3,
  parameter int MAX_OFF      = 4,
  parameter int MAX_WAYS     = 8,
  parameter int OW           = (MAX_OFF > 0) ? MAX_OFF : 1,
  parameter int SET_W        = LOG_L + MAX_GRP_BITS,
  parameter int TAG_W        = 30 - LOG_L,
  parameter int WW           = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  // bus snoop
  input  logic              snp_valid,
  input  bus_req_t          snp_cmd,
  output logic              busy,
  output logic              shared,
  output logic              fl_wvalid,
  output logic [ADDR_W-1:0] fl_waddr,
  output logic [31:0]       fl_wdata,
  input  logic              fl_wready,
  // cache_memory port B
  output logic [SET_W-1:0]  b_set,
  output logic [TAG_W-1:0]  b_tag,
  output logic [OW-1:0]     b_word,
  output logic              b_state_we,
  output logic [WW-1:0]     b_way,
  output mesi_t             b_state,
  input  logic              b_hit,
  input  logic [WW-1:0]     b_hit_way,
  input  mesi_t             b_hit_state,
  input  logic [31:0]       b_rword,
  // events
  output logic              ev_coh,
  output logic              ev_inv,
  output logic [SET_W-1:0]  inv_set,
  output logic [WW-1:0]     inv_way
);

  typedef enum logic [2:0] {N_IDLE, N_LOOK, N_CHECK, N_FLRD, N_FLSEND, N_NEXT} nstate_t;
  nstate_t           st;
  bus_op_t           op_q;
  logic [ADDR_W-1:0] line_addr;
  logic [ADDR_W-1:0] step;
  logic [16:0]       lines_left;
  logic [WW-1:0]     way_q;
  logic [MAX_OFF:0]  k;
  logic [OW-1:0]     word_unused;

  address_splitter #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF)) u_split (
    .addr(line_addr), .cfg, .word(word_unused), .set(b_set), .tag(b_tag)
  );

  int lo;
  assign lo     = int'(cfg.off_bits);
  assign b_word = OW'(k);
  assign busy   = (st != N_IDLE) || snp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= N_IDLE;
      op_q       <= BUS_NONE;
      line_addr  <= '0;
      step       <= '0;
      lines_left <= '0;
      way_q      <= '0;
      k          <= '0;
    end else begin
      case (st)
        N_IDLE:
          if (snp_valid && (snp_cmd.op == BUS_RD || snp_cmd.op == BUS_RDX ||
                            snp_cmd.op == BUS_UPGR)) begin
            int ro;
            ro   = int'(snp_cmd.off_bits);
            op_q <= snp_cmd.op;
            step <= ADDR_W'(4) << lo;
            if (ro > lo) begin
              line_addr  <= snp_cmd.addr & ~((ADDR_W'(4) << ro) - 1);
              lines_left <= 17'(1 << (ro - lo));
            end else begin
              line_addr  <= snp_cmd.addr & ~((ADDR_W'(4) << lo) - 1);
              lines_left <= 17'd1;
            end
            st <= N_LOOK;
          end
        N_LOOK:  st <= N_CHECK;
        N_CHECK: begin
          way_q <= b_hit_way;
          k     <= '0;
          if (b_hit && b_hit_state == ST_M) st <= N_FLRD;
          else st <= N_NEXT;
        end
        N_FLRD:  st <= N_FLSEND;
        N_FLSEND:
          if (fl_wready) begin
            if (int'(k) == (1 << lo) - 1) st <= N_NEXT;
            else begin
              k  <= k + 1'b1;
              st <= N_FLRD;
            end
          end
        N_NEXT: begin
          k <= '0;
          if (lines_left <= 17'd1) st <= N_IDLE;
          else begin
            lines_left <= lines_left - 1'b1;
            line_addr  <= line_addr + step;
            st         <= N_LOOK;
          end
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  // state changes: clean copies change in N_CHECK, modified ones after the flush
  logic flush_last;
  assign flush_last = (st == N_FLSEND) && fl_wready && int'(k) == (1 << lo) - 1;

  always_comb begin
    b_state_we = 1'b0;
    b_way      = b_hit_way;
    b_state    = ST_I;
    if (st == N_CHECK && b_hit && b_hit_state != ST_M) begin
      if (op_q == BUS_RD) begin
        b_state_we = (b_hit_state == ST_E);
        b_state    = ST_S;
      end else begin
        b_state_we = 1'b1;
        b_state    = ST_I;
      end
    end else if (flush_last) begin
      b_state_we = 1'b1;
      b_way      = way_q;
      b_state    = (op_q == BUS_RD) ? ST_S : ST_I;
    end
  end

  assign shared    = (st == N_CHECK) && b_hit && op_q == BUS_RD;
  assign fl_wvalid = (st == N_FLSEND);
  assign fl_waddr  = line_addr + ADDR_W'({k, 2'b00});
  assign fl_wdata  = b_rword;
  assign ev_inv    = b_state_we && b_state == ST_I;
  assign inv_set   = b_set;
  assign inv_way   = b_way;
  assign ev_coh    = ev_inv || flush_last;

endmodule
