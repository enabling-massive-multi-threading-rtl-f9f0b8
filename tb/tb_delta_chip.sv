// tb_delta_chip -- end-to-end test of the chip at a reduced size.
//
// A 4 x 4 mesh with 4-row thread tables (so that tables overflow and threads
// are swapped out) runs the producer/consumer program of chip_pe_array in two
// phases, with virtual nodes of 4 and then 8 tiles. Besides the scoreboard's
// checks, every mechanism of the design must occur at least once:
// CreateThread, CreateAF, SetVN, frame writes and reads, DecreaseSS firing a
// thread, DeleteThread, swap-out to the Thread Storage, dropped messages for
// swapped-out threads, link back-pressure in the mesh and a stalled PE
// request.
module tb_delta_chip;
  import delta_pkg::*;
  localparam int unsigned MX = 4, MY = 4, SP_AW = 8, K = 8, VN1 = 2, VN2 = 3, WD = 200000;
  localparam int unsigned NT = MX * MY;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NT-1:0]     pe_req_valid, pe_req_ready, pe_rsp_valid, fire_valid, fire_ready;
  pe_req_t           pe_req      [NT];
  pe_rsp_t           pe_rsp      [NT];
  tid_t              fire_tid    [NT];
  logic [SP_AW-1:0]  fire_fb     [NT];
  logic [NT-1:0]     pe_sp_en = '0, pe_sp_we = '0;
  logic [SP_AW-1:0]  pe_sp_addr  [NT];
  logic [DATA_W-1:0] pe_sp_wdata [NT];
  logic [DATA_W-1:0] pe_sp_rdata [NT];
  logic [NT-1:0]     spill_valid, drop_valid;
  tid_t              spill_tid   [NT];
  logic [SS_W-1:0]   spill_ss    [NT];

  initial for (int t = 0; t < int'(NT); t++) begin
    pe_sp_addr[t]  = '0;
    pe_sp_wdata[t] = '0;
  end

  delta_chip #(.MESH_X(MX), .MESH_Y(MY), .ENTRIES(4), .FRAME_WORDS(8), .SP_WORDS(256), .VN_LOG_RST(2)) u_chip (.*);

  logic done;
  int checks, failures;
  int n_thread, n_af, n_fired, n_spilled, n_dropped, n_writes, n_reads, n_decs, n_deletes, n_vn_switch, n_req_stall;
  chip_pe_array #(.MESH_X(MX), .MESH_Y(MY), .SP_AW(SP_AW), .K(K), .VN1(VN1), .VN2(VN2)) u_pes (.*);

  // link back-pressure inside the mesh
  int n_link_stall = 0, n_link_flits = 0;
  always @(posedge clk) if (rst_n)
    for (int t = 0; t < int'(NT); t++)
      for (int p = 0; p < 4; p++) begin
        if (u_chip.lo_valid[t][p] && !u_chip.lo_ready[t][p]) n_link_stall++;
        if (u_chip.lo_valid[t][p] &&  u_chip.lo_ready[t][p]) n_link_flits++;
      end

  int cycles = 0;
  always @(posedge clk) cycles++;

  task automatic seen(int n, string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: never happened: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("finished after %0d cycles", cycles);
    seen(n_thread,     "CreateThread");
    seen(n_af,         "CreateAF");
    seen(n_vn_switch,  "SetVN (VN size change)");
    seen(n_writes,     "WriteData");
    seen(n_decs,       "DecreaseSS");
    seen(n_fired,      "thread fired on SS = 0");
    seen(n_reads,      "ReadData");
    seen(n_deletes,    "DeleteThread");
    seen(n_link_flits, "flits over mesh links");
    seen(n_spilled,    "swap-out to Thread Storage");
    seen(n_dropped,    "message for swapped-out thread dropped");
    seen(n_link_stall, "link back-pressure");
    seen(n_req_stall,  "PE request stalled");
    checks++;
    if (n_fired + n_spilled != int'(NT * K * 2)) begin
      failures++;
      $display("FAIL: %0d threads created, %0d ran, %0d swapped out", NT * K * 2, n_fired, n_spilled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (fired %0d, swapped out %0d)", n_fired, n_spilled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
