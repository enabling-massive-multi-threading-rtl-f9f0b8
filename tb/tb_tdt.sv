// tb_tdt -- checks the Thread Descriptor Table.
//
// A small table (4 rows, 8-word frames) is driven through allocation, CAM
// search and frame base, scheduling-slot decrement with saturation, the
// lowest-T_id priority encoder, the fire handshake, deletion and both cases
// of the swap-out when the table is full. Expected values are worked out by
// hand from the rules in the module header.
module tb_tdt;
  import delta_pkg::*;
  localparam int unsigned E = 4, FW = 8, AW = 6;
  localparam logic [1:0] ALLOC = 0, DEC = 1, FREE = 2;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  logic [1:0] cmd_op = 0;
  tid_t cmd_tid = '0;
  logic [SS_W-1:0] cmd_arg = 0;
  logic lk_hit, fire_valid, fire_ready = 0, spill_valid;
  logic [AW-1:0] lk_fb, fire_fb;
  tid_t fire_tid, spill_tid;
  logic [SS_W-1:0] spill_ss;
  logic [2:0] used;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tdt #(.ENTRIES(E), .FRAME_WORDS(FW), .ADDR_W(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic tid_t T(int n);
    tid_t t;
    t = '0;
    t.src.nid = 8'(n);   // high-order field: orders the T_ids
    t.cnt = 32'(n * 3);
    return t;
  endfunction

  task automatic cmd(logic [1:0] op, tid_t t, int arg);
    cmd_valid = 1; cmd_op = op; cmd_tid = t; cmd_arg = SS_W'(arg);
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  task automatic look(tid_t t, bit hit, int fb, string what);
    cmd_tid = t; #1;
    check(lk_hit == hit && (!hit || 32'(lk_fb) == fb), what);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!fire_valid && used == 0, "empty after reset");
    look(T(9), 0, 0, "miss in empty table");

    cmd(ALLOC, T(5), 2);    // row 0
    cmd(ALLOC, T(7), 0);    // row 1, runnable
    cmd(ALLOC, T(3), 1);    // row 2
    check(used == 3, "three rows used");
    look(T(5), 1, 0,  "T5 in row 0, F_b 0");
    look(T(7), 1, 8,  "T7 in row 1, F_b 8");
    look(T(3), 1, 16, "T3 in row 2, F_b 16");
    look(T(4), 0, 0,  "T4 absent");
    check(fire_valid && fire_tid == T(7) && fire_fb == 6'd8, "only T7 runnable");

    cmd(DEC, T(3), 1);      // T3 becomes runnable, lower T_id than T7
    #1 check(fire_valid && fire_tid == T(3) && fire_fb == 6'd16, "lowest runnable T_id wins");
    fire_ready = 1; @(posedge clk); #1 fire_ready = 0;
    check(fire_valid && fire_tid == T(7), "T3 started, T7 next");
    fire_ready = 1; @(posedge clk); #1 fire_ready = 0;
    check(!fire_valid, "nothing runnable left");

    cmd(DEC, T(5), 7);      // saturates at zero
    #1 check(fire_valid && fire_tid == T(5) && fire_fb == 6'd0, "saturating decrement makes T5 runnable");
    cmd(DEC, T(8), 1);      // absent: no effect
    check(used == 3, "decrement of absent thread changes nothing");

    cmd(FREE, T(3), 0);     // running thread deleted
    look(T(3), 0, 0, "T3 gone after delete");
    check(used == 2, "two rows used");

    cmd(ALLOC, T(10), 4);   // reuses row 2 -> F_b 16
    look(T(10), 1, 16, "freed row reused with its frame");
    cmd(ALLOC, T(11), 6);   // row 3
    check(used == 4, "table full");

    // full: victim is the non-running row with the highest SS: T11 (6)
    cmd(ALLOC, T(12), 2);   // 2 < 6: T11 leaves, T12 takes row 3
    check(spill_valid && spill_tid == T(11) && spill_ss == 16'd6, "stored thread with higher SS swapped out");
    look(T(12), 1, 24, "new thread in the victim's row");
    look(T(11), 0, 0, "victim gone");
    @(posedge clk); #1;
    check(!spill_valid, "spill is a one-cycle pulse");
    cmd(ALLOC, T(13), 9);   // 9 >= 4 (victim T10): new thread leaves
    check(spill_valid && spill_tid == T(13) && spill_ss == 16'd9, "new thread with higher SS swapped out");
    look(T(13), 0, 0, "new thread not stored");
    look(T(10), 1, 16, "stored thread kept");
    check(used == 4, "still full");

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
