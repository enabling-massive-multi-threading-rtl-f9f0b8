// tb_delta_tile -- checks one tile (router + Thread Dispatcher + scratchpad).
//
// Tile 0 of a 2 x 1 mesh; the testbench plays the PE and the neighbouring
// tile 1 on the east link. Checked: a thread created for the own tile goes
// through the router and fires, with the measured latency; frame words
// written by message can be read by the PE on its scratchpad port and words
// the PE stores can be read with ReadData (shared scratchpad); with a VN of
// two tiles a new thread can leave on the east link; a creation message
// arriving from the east neighbour allocates a thread here.
module tb_delta_tile;
  import delta_pkg::*;
  localparam int unsigned SPW = 256, AW = 8, FW = 16;
  logic clk = 0, rst_n = 0;
  logic [3:0] link_in_valid = 0, link_in_ready, link_out_valid, link_out_ready = 4'hF;
  pkt_t link_in_pkt [4], link_out_pkt [4];
  logic pe_req_valid = 0, pe_req_ready, pe_rsp_valid;
  pe_req_t pe_req;
  pe_rsp_t pe_rsp;
  logic fire_valid, fire_ready = 0;
  tid_t fire_tid;
  logic [AW-1:0] fire_fb;
  logic pe_sp_en = 0, pe_sp_we = 0;
  logic [AW-1:0] pe_sp_addr = 0;
  logic [31:0] pe_sp_wdata = 0, pe_sp_rdata;
  logic spill_valid, drop_valid;
  tid_t spill_tid;
  logic [SS_W-1:0] spill_ss;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delta_tile #(.MESH_X(2), .MESH_Y(1), .TILE(0), .ENTRIES(4), .FRAME_WORDS(FW),
               .SP_WORDS(SPW), .VN_LOG_RST(0)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  pkt_t east_q [$];
  always @(posedge clk) if (rst_n && link_out_valid[0] && link_out_ready[0]) east_q.push_back(link_out_pkt[0]);
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic op(op_e o, tid_t t, int off, int data, output pe_rsp_t r);
    bit ok;
    pe_req = '{op: o, tid: t, off: OFF_W'(off), data: DATA_W'(data)};
    pe_req_valid = 1;
    forever begin
      #1 ok = pe_req_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
    #1 pe_req_valid = 0;
    r = pe_rsp;
    @(negedge clk);
  endtask

  task automatic take_fire(output tid_t t, output logic [AW-1:0] fb);
    wait (fire_valid);
    @(negedge clk);
    t = fire_tid; fb = fire_fb;
    fire_ready = 1; @(posedge clk); #1 fire_ready = 0;
    @(negedge clk);
  endtask

  initial begin
    pe_rsp_t r;
    tid_t t0, t1, t2, tf;
    logic [AW-1:0] fb;
    int c0, n_local, n_east;
    for (int p = 0; p < 4; p++) link_in_pkt[p] = '0;
    pe_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // thread for the own tile, SS = 1
    op(OP_CREATE_THREAD, '0, 0, 1, r);
    t0 = r.data;
    check(t0.dst == '{nid: 8'd0, cid: 8'd0}, "VN of one tile: thread stays here");
    op(OP_WRITE_DATA, t0, 2, 32'h1234_5678, r);
    repeat (6) @(negedge clk);
    check(!fire_valid, "SS = 1: not runnable yet");
    // the PE sees the frame word on its own scratchpad port (row 0: F_b = 0)
    pe_sp_en = 1; pe_sp_addr = 2; @(negedge clk); pe_sp_en = 0;
    check(pe_sp_rdata == 32'h1234_5678, "frame word visible on the PE port");
    pe_sp_en = 1; pe_sp_we = 1; pe_sp_addr = 3; pe_sp_wdata = 32'h0BAD_F00D;
    @(negedge clk); pe_sp_en = 0; pe_sp_we = 0;
    op(OP_READ_DATA, t0, 3, 0, r);
    check(r.ok && r.data == 64'h0BAD_F00D, "ReadData sees the PE's store");
    op(OP_DECREASE_SS, t0, 0, 1, r);
    take_fire(tf, fb);
    check(tf == t0 && fb == 0, "thread fires once SS reaches 0");

    // latency from CreateThread (SS 0) to fire_valid
    c0 = cyc;
    op(OP_CREATE_THREAD, '0, 0, 0, r);
    t1 = r.data;
    wait (fire_valid);
    check(cyc - c0 <= 5, $sformatf("create-to-fire latency %0d cycles", cyc - c0));
    take_fire(tf, fb);
    check(tf == t1 && fb == 8'(FW), "second thread in row 1");

    // VN of two tiles: threads spread over both; the remote one leaves east
    op(OP_SET_VN, '0, 0, 1, r);
    n_local = 0; n_east = 0;
    for (int i = 0; i < 4; i++) begin
      op(OP_CREATE_THREAD, '0, 0, 5, r);
      t2 = r.data;
      if (t2.dst.cid == 0) n_local++; else n_east++;
    end
    repeat (8) @(negedge clk);
    check(n_local == 2 && n_east == 2, "VN of two: each tile chosen twice in four");
    check(east_q.size() == n_east, "remote creations leave on the east link");
    if (east_q.size() > 0) check(east_q[0].kind == PK_CREATE && east_q[0].dst_tile == 1, "east flit is a CREATE for tile 1");

    // message from the east neighbour: a thread for this tile, SS 0
    tf = '0; tf.src = '{nid: 8'd0, cid: 8'd1}; tf.cnt = 7;
    link_in_pkt[0] = '{kind: PK_CREATE, dst_tile: 8'd0, tid: tf, off: 0, data: 0};
    link_in_valid[0] = 1;
    wait (link_in_ready[0]);
    @(posedge clk); #1 link_in_valid[0] = 0;
    take_fire(t2, fb);
    check(t2 == tf, "thread from the neighbour fires here");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
