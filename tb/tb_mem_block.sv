// tb_mem_block: self-checking testbench for mem_block, the one-word-wide
// dual-port memory block the L1 is assembled from.
// It drives both ports with random reads and writes for 4000 cycles and
// compares every read against a behavioural array: synchronous read, one
// cycle latency, write-first on the written port, and port A winning when both
// ports write the same address. The collision rule is this design's choice;
// the published design only asks for uniform blocks that can hold tags or data.
// Prints TB_RESULT checks/failures; a watchdog stops a hung run.
module tb_mem_block;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  logic [31:0] exp_a, exp_b;

  mem_block #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill every word through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a_we = ($urandom % 3) == 0; b_we = ($urandom % 3) == 0;
      a_addr = AW'($urandom); b_addr = (n % 7 == 0) ? a_addr : AW'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      // expected read data (write-first, port A wins a collision)
      exp_a = a_we ? a_wdata : (b_we && b_addr == a_addr) ? model[a_addr] : model[a_addr];
      exp_b = b_we ? b_wdata : model[b_addr];
      if (a_we && b_we && a_addr == b_addr) exp_b = a_wdata;
      if (!a_we && b_we && a_addr == b_addr) exp_a = model[a_addr];
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      @(posedge clk); #1;
      if (!a_we || !(b_we && a_addr == b_addr)) begin
        checks++;
        if (a_rdata !== exp_a) begin
          failures++;
          if (failures < 10) $display("FAIL A addr %0d got %h exp %h", a_addr, a_rdata, exp_a);
        end
      end
      if (!b_we && !(a_we && a_addr == b_addr)) begin
        checks++;
        if (b_rdata !== exp_b) begin
          failures++;
          if (failures < 10) $display("FAIL B addr %0d got %h exp %h", b_addr, b_rdata, exp_b);
        end
      end
    end
    // read every word back through port B
    a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (b_rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL final %0d got %h exp %h", i, b_rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
