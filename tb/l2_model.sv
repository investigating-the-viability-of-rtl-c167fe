// l2_model: behavioural model of the level below the L1 caches (the L2 cache
// and memory are not part of this design). Testbench use only.
//
// A word-addressed memory; a word never written reads as init_word(addr).
// Commands from the bus: BUS_RD / BUS_RDX wait LAT cycles, then return
// 1 << off_bits words, one per cycle, then pulse done one cycle later.
// BUS_WB takes 1 << off_bits words (wready is always high) and pulses done
// after the last. BUS_UPGR pulses done the next cycle. Word writes that
// arrive outside a write-back (snooper flushes) are stored as well.
module l2_model
  import cache_pkg::*;
#(
  parameter int LAT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  bus_req_t          cmd,
  input  logic              wvalid,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [31:0]       wdata,
  output logic              wready,
  output logic              rvalid,
  output logic [31:0]       rdata,
  output logic              done
);

  logic [31:0] mem [logic [29:0]];
  int          n_rd, n_wb, n_upgr, n_words_written;

  function automatic logic [31:0] init_word(input logic [ADDR_W-1:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_5A5A;
  endfunction

  function automatic logic [31:0] peek(input logic [ADDR_W-1:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : init_word(a);
  endfunction

  typedef enum logic [2:0] {L_IDLE, L_LAT, L_RD, L_WB, L_DONE} lstate_t;
  lstate_t     st;
  bus_req_t    cq;
  int          cnt, lat;

  assign wready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; cnt <= 0; lat <= 0; cq <= '0;
      rvalid <= 1'b0; rdata <= '0; done <= 1'b0;
      n_rd <= 0; n_wb <= 0; n_upgr <= 0; n_words_written <= 0;
    end else begin
      rvalid <= 1'b0;
      done   <= 1'b0;
      if (wvalid) begin
        mem[waddr[31:2]] = wdata;
        n_words_written <= n_words_written + 1;
      end
      case (st)
        L_IDLE:
          if (cmd_valid) begin
            cq  <= cmd;
            cnt <= 0;
            lat <= 0;
            case (cmd.op)
              BUS_RD, BUS_RDX: begin st <= L_LAT; n_rd <= n_rd + 1; end
              BUS_WB:          begin st <= L_WB;  n_wb <= n_wb + 1; end
              default:         begin st <= L_DONE; n_upgr <= n_upgr + 1; end
            endcase
          end
        L_LAT: if (lat >= LAT - 1) st <= L_RD; else lat <= lat + 1;
        L_RD: begin
          rvalid <= 1'b1;
          rdata  <= peek(cq.addr + ADDR_W'(cnt * 4));
          if (cnt == (1 << cq.off_bits) - 1) st <= L_DONE;
          cnt <= cnt + 1;
        end
        L_WB: if (wvalid) begin
          if (cnt == (1 << cq.off_bits) - 1) st <= L_DONE;
          cnt <= cnt + 1;
        end
        L_DONE: begin
          done <= 1'b1;
          st   <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

endmodule
