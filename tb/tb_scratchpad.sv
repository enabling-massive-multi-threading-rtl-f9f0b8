// tb_scratchpad -- checks the two-port scratchpad at its full 16 KiB size.
//
// Random writes through both ports are mirrored in a reference array and read
// back through both ports with the one-cycle read latency; a same-word write
// collision must leave port B's value.
module tb_scratchpad;
  localparam int unsigned WORDS = 4096, AW = 12;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] ref_mem [WORDS];
  bit          known   [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scratchpad dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [AW-1:0] ra, rb;
    for (int i = 0; i < WORDS; i++) known[i] = 0;
    @(negedge clk);
    // random writes on both ports
    for (int n = 0; n < 3000; n++) begin
      a_en = 1; a_we = 1; a_addr = AW'($urandom); a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'($urandom); b_wdata = $urandom;
      if (b_addr == a_addr) b_addr = b_addr + 1'b1;
      ref_mem[a_addr] = a_wdata; known[a_addr] = 1;
      ref_mem[b_addr] = b_wdata; known[b_addr] = 1;
      @(negedge clk);
    end
    // collision: port B wins
    a_addr = 12'h123; b_addr = 12'h123; a_wdata = 32'hAAAA_0000; b_wdata = 32'hBBBB_0000;
    ref_mem[12'h123] = b_wdata; known[12'h123] = 1;
    @(negedge clk);
    a_we = 0; b_we = 0;
    // read back written words on both ports
    for (int n = 0; n < 2000; n++) begin
      do ra = AW'($urandom); while (!known[ra]);
      do rb = AW'($urandom); while (!known[rb]);
      a_addr = ra; b_addr = rb;
      @(negedge clk);
      check(a_rdata == ref_mem[ra], $sformatf("port A read %h", ra));
      check(b_rdata == ref_mem[rb], $sformatf("port B read %h", rb));
    end
    // read with en low keeps the last output
    a_addr = 12'h123; #1;
    a_en = 0; @(negedge clk);
    check(a_rdata == ref_mem[ra], "output held while not enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
