// tb_address_builder: self-checking testbench for address_builder.
// The splitter cuts a 32-bit byte address into word offset, set index and tag
// for the active configuration (offset bits above the 2 byte bits, then
// LOG_L+group bits of index, the rest tag); the builder puts the three fields
// back together. For every combination of offset bits 0..4 and group bits
// 0..3 the test applies 300 random addresses, compares the splitter against
// shift-and-mask arithmetic, and checks that building the split fields gives
// the word-aligned address back. The field order follows the published design's
// ways-index-offset notation; the fixed-width ports are this design's choice.
module tb_address_builder;
  import cache_pkg::*;
  localparam int LOG_L = 8, MAX_GRP_BITS = 3, MAX_OFF = 4;
  localparam int OW = MAX_OFF, SET_W = LOG_L + MAX_GRP_BITS, TAG_W = 30 - LOG_L;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr, addr_out;
  cfg_t cfg;
  logic [OW-1:0] word;
  logic [SET_W-1:0] set;
  logic [TAG_W-1:0] tag;

  address_splitter #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF)) u_split (
    .addr(addr), .cfg(cfg), .word(word), .set(set), .tag(tag));
  address_builder #(.LOG_L(LOG_L), .MAX_GRP_BITS(MAX_GRP_BITS), .MAX_OFF(MAX_OFF)) u_build (
    .tag(tag), .set(set), .word(word), .cfg(cfg), .addr(addr_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr %h cfg %0d-%0d", what, addr, cfg.grp_bits, cfg.off_bits);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    for (int ob = 0; ob <= MAX_OFF; ob++)
      for (int gb = 0; gb <= MAX_GRP_BITS; gb++)
        for (int n = 0; n < 300; n++) begin
          int ib;
          logic [31:0] ew, es, et;
          ib = LOG_L + gb;
          cfg = '{way_bits: 3'd0, grp_bits: 3'(gb), off_bits: 3'(ob)};
          addr = $urandom;
          if (n == 0) addr = '1;
          if (n == 1) addr = '0;
          #1;
          ew = (addr >> 2) & ((32'd1 << ob) - 1);
          es = (addr >> (2 + ob)) & ((32'd1 << ib) - 1);
          et = addr >> (2 + ob + ib);
          chk(32'(word) == ew, "word offset");
          chk(32'(set) == es, "set index");
          chk(32'(tag) == et, "tag");
          chk(addr_out == {addr[31:2], 2'b00}, "rebuilt address");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
