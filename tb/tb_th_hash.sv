// tb_th_hash -- checks the hash scheduling function H(N_pe, I_ex).
//
// CreateThread: the destination keeps the caller's N_id and, for a VN of
// 2^k cores, every C_id 0..2^k-1 is chosen exactly once in 2^k requests.
// CreateAF: both fields are new; over 2^LOG_PE requests every <N_id, C_id>
// pair (every tile) is chosen exactly once. VN sizes 1 and the whole chip,
// clamping of oversize vn_log, holding without a request and determinism
// after reset are checked too.
module tb_th_hash;
  import delta_pkg::*;
  localparam int unsigned LOG_PE = 8;
  logic clk = 0, rst_n = 0;
  logic req = 0, is_af = 0;
  logic [VNL_W-1:0] vn_log = 4;
  logic [ID_W-1:0]  own_nid = 8'd5;
  pe_addr_t dst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  th_hash #(.LOG_PE(LOG_PE), .SEED(7)) dut (.clk, .rst_n, .req, .is_af, .vn_log, .own_nid, .dst);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue n requests and count the tile numbers t = nid*2^k + cid produced
  int hist [256];
  pe_addr_t trace [64];
  task automatic run(int n, bit af, int k, bit rec);
    for (int i = 0; i < 256; i++) hist[i] = 0;
    is_af = af; vn_log = VNL_W'(k); req = 1;
    for (int i = 0; i < n; i++) begin
      #1;
      if (!af) check(dst.nid == own_nid, "CreateThread keeps own N_id");
      check(32'(dst.cid) < (1 << (k > LOG_PE ? LOG_PE : k)), "C_id inside the VN");
      check(32'(dst.nid) < (1 << (LOG_PE - (k > LOG_PE ? LOG_PE : k))) || !af, "N_id inside the chip");
      hist[(32'(dst.nid) << (k > LOG_PE ? LOG_PE : k)) + 32'(dst.cid) & 255]++;
      if (rec && i < 64) trace[i] = dst;
      @(posedge clk); #1;
    end
    req = 0;
  endtask

  initial begin
    pe_addr_t first [64];
    pe_addr_t held;
    int ok;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // CreateThread, VN of 16: 16 requests cover C_id 0..15 once each
    own_nid = 8'd5;
    run(16, 0, 4, 1);
    for (int i = 0; i < 64; i++) first[i] = trace[i];
    ok = 1;
    for (int c = 0; c < 16; c++) if (hist[5 * 16 + c] != 1) ok = 0;
    check(ok == 1, "VN=16: each core chosen once in 16 CreateThread");

    // VN of 64, caller in VN 2
    own_nid = 8'd2;
    run(64, 0, 6, 0);
    ok = 1;
    for (int c = 0; c < 64; c++) if (hist[2 * 64 + c] != 1) ok = 0;
    check(ok == 1, "VN=64: each core chosen once in 64 CreateThread");

    // VN of 1: the only core is C_id 0
    run(4, 0, 0, 0);
    check(hist[2] == 4, "VN=1: always C_id 0 of own VN");

    // CreateAF with VN of 16: 256 requests hit every tile once
    run(256, 1, 4, 0);
    ok = 1;
    for (int t = 0; t < 256; t++) if (hist[t] != 1) ok = 0;
    check(ok == 1, "CreateAF VN=16: every tile once in 256 requests");

    // CreateAF with VN = whole chip: N_id is 0
    run(256, 1, 8, 0);
    ok = 1;
    for (int t = 0; t < 256; t++) if (hist[t] != 1) ok = 0;
    check(ok == 1, "CreateAF VN=256: every core once");

    // oversize vn_log is clamped to the chip
    run(256, 1, 12, 0);
    ok = 1;
    for (int t = 0; t < 256; t++) if (hist[t] != 1) ok = 0;
    check(ok == 1, "vn_log above LOG_PE behaves as the whole chip");

    // no request: destination does not move
    is_af = 1; vn_log = 3; #1 held = dst;
    repeat (3) @(posedge clk);
    #1 check(dst == held, "no advance without a request");

    // determinism: after reset the same requests give the same destinations
    rst_n = 0; @(posedge clk); #1 rst_n = 1; @(negedge clk);
    own_nid = 8'd5;
    run(16, 0, 4, 1);
    ok = 1;
    for (int i = 0; i < 16; i++) if (trace[i] != first[i]) ok = 0;
    check(ok == 1, "same sequence after reset");
    // not a plain counter
    ok = 0;
    for (int i = 0; i < 15; i++) if (32'(first[i+1].cid) != ((32'(first[i].cid) + 1) & 15)) ok = 1;
    check(ok == 1, "sequence is not a simple counter");

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
