// tb_debruijn_lfsr -- checks that the modified LFSR has a full 2^N period.
//
// For several widths the register is stepped 2^N times from its seed: every
// value must be seen exactly once and the register must be back at the seed.
// Holding step low must keep the state. A watchdog ends a hung run.
module tb_debruijn_lfsr;
  logic clk = 0, rst_n = 0;
  logic step;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [0:0] q1;
  logic [2:0] q3;
  logic [5:0] q6;
  logic [7:0] q8;
  logic [9:0] q10;
  debruijn_lfsr #(.N(1),  .SEED(1'b0))    u1  (.clk, .rst_n, .step, .q(q1));
  debruijn_lfsr #(.N(3),  .SEED(3'd0))    u3  (.clk, .rst_n, .step, .q(q3));
  debruijn_lfsr #(.N(6),  .SEED(6'd37))   u6  (.clk, .rst_n, .step, .q(q6));
  debruijn_lfsr #(.N(8),  .SEED(8'hA5))   u8  (.clk, .rst_n, .step, .q(q8));
  debruijn_lfsr #(.N(10), .SEED(10'h200)) u10 (.clk, .rst_n, .step, .q(q10));

  function automatic logic [9:0] cur(int n);
    case (n)
      1: return 10'(q1);
      3: return 10'(q3);
      6: return 10'(q6);
      8: return 10'(q8);
      default: return q10;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int widths[5] = '{1, 3, 6, 8, 10};

  initial begin
    bit seen [5][1024];
    logic [9:0] seed [5];
    int dup [5];
    step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < 5; w++) seed[w] = cur(widths[w]);
    check(seed[2] == 10'd37 && seed[3] == 10'hA5, "seed loaded at reset");
    // step low holds the state
    repeat (3) @(negedge clk);
    for (int w = 0; w < 5; w++) check(cur(widths[w]) == seed[w], "state held while step is low");
    // run 1024 steps; the first 2^N states of each width must be distinct
    for (int w = 0; w < 5; w++) begin dup[w] = 0; for (int v = 0; v < 1024; v++) seen[w][v] = 0; end
    step = 1;
    for (int s = 0; s < 1024; s++) begin
      for (int w = 0; w < 5; w++) begin
        if (s < (1 << widths[w])) begin
          if (seen[w][cur(widths[w])]) dup[w]++;
          seen[w][cur(widths[w])] = 1;
        end
        if (s == (1 << widths[w]) - 1) begin
          automatic int cnt = 0;
          for (int v = 0; v < (1 << widths[w]); v++) cnt += seen[w][v];
          check(cnt == (1 << widths[w]) && dup[w] == 0,
                $sformatf("N=%0d visits all %0d states once (saw %0d)", widths[w], 1 << widths[w], cnt));
        end
      end
      @(negedge clk);
      for (int w = 0; w < 5; w++)
        if (s == (1 << widths[w]) - 1)
          check(cur(widths[w]) == seed[w], $sformatf("N=%0d period is 2^N", widths[w]));
    end
    step = 0;
    $display("finished at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
