// tb_hash_uniformity -- distribution of new threads over a 256-tile chip.
//
// One hash unit per tile (each with its tile's seed, as in the chip) is
// asked for a destination on every clock (injection rate 1.0). The requests
// are CreateAF or CreateThread at random, with VNs of 16 tiles, for 200
// clocks: 51,200 requests. The number of threads landing on each tile is
// tested with Pearson's chi-square against a uniform distribution; with 255
// degrees of freedom the 1 % critical value is 310.46. The test also
// requires CreateThread requests to stay inside the caller's VN.
module tb_hash_uniformity;
  import delta_pkg::*;
  localparam int unsigned LOG_PE = 8, NT = 256, CYCLES = 200, VN = 4;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] req = '0, is_af = '0;
  pe_addr_t dst [NT];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  for (genvar t = 0; t < int'(NT); t++) begin : g_t
    th_hash #(.LOG_PE(LOG_PE), .SEED(t + 1)) u_h (
      .clk, .rst_n, .req(req[t]), .is_af(is_af[t]), .vn_log(VNL_W'(VN)),
      .own_nid(addr_of(ID_W'(t), VNL_W'(VN)).nid), .dst(dst[t]));
  end

  initial begin
    int hist [NT];
    int n_af, n_thr;
    real expct, chi2;
    for (int i = 0; i < int'(NT); i++) hist[i] = 0;
    n_af = 0; n_thr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = '1;
    for (int c = 0; c < int'(CYCLES); c++) begin
      for (int t = 0; t < int'(NT); t++) is_af[t] = 1'($urandom);
      #1;
      for (int t = 0; t < int'(NT); t++) begin
        int d;
        d = int'(tile_of(dst[t], VNL_W'(VN)));
        hist[d]++;
        if (is_af[t]) n_af++;
        else begin
          n_thr++;
          checks++;
          if (d / 16 != t / 16) begin
            failures++;
            $display("FAIL: CreateThread from tile %0d landed on %0d", t, d);
          end
        end
      end
      @(negedge clk);
    end
    req = '0;
    expct = real'(NT * CYCLES) / real'(NT);
    chi2 = 0.0;
    for (int i = 0; i < int'(NT); i++) chi2 += (real'(hist[i]) - expct) ** 2 / expct;
    $display("requests %0d (CreateAF %0d, CreateThread %0d), chi-square %f with %0d degrees of freedom",
             NT * CYCLES, n_af, n_thr, chi2, NT - 1);
    checks++;
    if (!(chi2 < 310.46)) begin
      failures++;
      $display("FAIL: chi-square above the 1%% critical value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
