// tb_thread_dispatcher -- checks one Thread Dispatcher with the network
// looped back by the testbench.
//
// The dispatcher sits at tile 2 of a 4-tile chip with a 2-row table. The
// testbench plays the PE (instruction port, runnable-thread hand-off), the
// network (captures outgoing messages, checks them, and feeds them back or
// injects its own) and the scratchpad (a plain array with a one-cycle read).
// Checked: T_id layout and counter, message kinds and destinations,
// CreateThread staying in the caller's VN, CreateAF covering the chip, the
// frame address F_b + F_o on write and read, SS decrement firing the thread,
// lowest-T_id order, DeleteThread, dropping of messages for unknown threads,
// swap-out when the table is full, the one-cycle response latency and the
// sharing of the dispatcher between PE and network.
module tb_thread_dispatcher;
  import delta_pkg::*;
  localparam int unsigned TILE = 2, LOG_PE = 2, E = 2, FW = 16, AW = 6;
  logic clk = 0, rst_n = 0;
  logic pe_req_valid = 0, pe_req_ready, pe_rsp_valid;
  pe_req_t pe_req;
  pe_rsp_t pe_rsp;
  logic fire_valid, fire_ready = 0;
  tid_t fire_tid;
  logic [AW-1:0] fire_fb;
  logic net_out_valid, net_out_ready = 1, net_in_valid = 0, net_in_ready;
  pkt_t net_out_pkt, net_in_pkt;
  logic sp_en, sp_we;
  logic [AW-1:0] sp_addr;
  logic [31:0] sp_wdata, sp_rdata;
  logic spill_valid, drop_valid;
  tid_t spill_tid;
  logic [SS_W-1:0] spill_ss;
  logic [VNL_W-1:0] vn_log;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  thread_dispatcher #(.TILE(TILE), .LOG_PE(LOG_PE), .ENTRIES(E), .FRAME_WORDS(FW),
                      .SP_AW(AW), .VN_LOG_RST(0)) dut (.*);

  // scratchpad model
  logic [31:0] mem [64];
  always_ff @(posedge clk) if (sp_en) begin
    if (sp_we) mem[sp_addr] <= sp_wdata;
    else       sp_rdata     <= mem[sp_addr];
  end

  // network capture
  pkt_t sent_q [$];
  always @(posedge clk) if (rst_n && net_out_valid && net_out_ready) sent_q.push_back(net_out_pkt);
  int spills = 0, drops = 0;
  tid_t last_spill;
  always @(posedge clk) if (rst_n) begin
    if (spill_valid) begin spills++; last_spill = spill_tid; end
    if (drop_valid) drops++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one PE instruction; returns the response
  task automatic pe_op(op_e op, tid_t t, int off, int data, output pe_rsp_t r);
    bit ok;
    pe_req = '{op: op, tid: t, off: OFF_W'(off), data: DATA_W'(data)};
    pe_req_valid = 1;
    forever begin
      #1 ok = pe_req_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
    #1 pe_req_valid = 0;
    check(pe_rsp_valid, "response one cycle after acceptance");
    r = pe_rsp;
    @(posedge clk);
    #1 check(!pe_rsp_valid, "response is a single pulse");
    @(negedge clk);
  endtask

  // deliver one message to the dispatcher
  task automatic net_in(pkt_t p);
    bit ok;
    net_in_pkt = p;
    net_in_valid = 1;
    forever begin
      #1 ok = net_in_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
    #1 net_in_valid = 0;
    @(negedge clk);
  endtask

  task automatic loop_back(pkt_kind_e kind, string what);
    pkt_t p;
    check(sent_q.size() == 1, {what, ": one message sent"});
    if (sent_q.size() > 0) begin
      p = sent_q.pop_front();
      check(p.kind == kind && p.dst_tile == 8'(TILE), {what, ": kind and destination"});
      net_in(p);
    end
  endtask

  initial begin
    pe_rsp_t r;
    tid_t t0, t1, t2, t3, tn;
    pkt_t p;
    int hist [4];
    pe_req = '0; net_in_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // VN of one core: every thread stays on this tile
    pe_op(OP_SET_VN, '0, 0, 0, r);
    check(vn_log == 0, "SetVN 0");
    pe_op(OP_CREATE_THREAD, '0, 0, 2, r);
    t0 = r.data;
    check(t0.src == '{nid: 8'(TILE), cid: 8'd0} && t0.dst == '{nid: 8'(TILE), cid: 8'd0} && t0.cnt == 0,
          "T_id fields of the first thread");
    check(sent_q.size() == 1 && sent_q[0].data == 2, "CREATE carries the initial SS");
    loop_back(PK_CREATE, "create t0");
    pe_op(OP_CREATE_THREAD, '0, 0, 0, r);
    t1 = r.data;
    check(t1.cnt == 1, "creation counter increments");
    loop_back(PK_CREATE, "create t1");
    @(negedge clk);
    check(fire_valid && fire_tid == t1 && fire_fb == 6'(FW), "thread with SS 0 offered, frame of row 1");

    // frame write through the network and local read: l = F_b + F_o
    pe_op(OP_WRITE_DATA, t0, 5, 32'hCAFE_0005, r);
    p = sent_q[0];
    check(p.tid == t0 && p.off == 5, "WRITE carries T_id and offset");
    loop_back(PK_WRITE, "write t0");
    check(mem[5] == 32'hCAFE_0005, "word stored at F_b(row 0) + 5");
    pe_op(OP_WRITE_DATA, t1, 3, 32'hBEEF_0013, r);
    loop_back(PK_WRITE, "write t1");
    check(mem[FW + 3] == 32'hBEEF_0013, "word stored at F_b(row 1) + 3");
    pe_op(OP_READ_DATA, t1, 3, 0, r);
    check(r.ok && r.data == 64'hBEEF_0013, "ReadData returns the frame word");
    check(sent_q.size() == 0, "ReadData sends nothing");

    // DecreaseSS makes t0 runnable; it has the lower T_id
    pe_op(OP_DECREASE_SS, t0, 0, 1, r);
    loop_back(PK_DEC, "dec t0 by 1");
    check(fire_tid == t1, "t0 not yet runnable");
    pe_op(OP_DECREASE_SS, t0, 0, 1, r);
    loop_back(PK_DEC, "dec t0 by 1");
    check(fire_valid && fire_tid == t0 && fire_fb == 0, "t0 runnable and first (lowest T_id)");
    fire_ready = 1; @(posedge clk); #1 fire_ready = 0;
    @(negedge clk);
    check(fire_valid && fire_tid == t1, "after t0 starts, t1 is offered");

    // DeleteThread frees the row
    pe_op(OP_DELETE_THREAD, t0, 0, 0, r);
    loop_back(PK_DELETE, "delete t0");
    pe_op(OP_READ_DATA, t0, 5, 0, r);
    check(!r.ok, "deleted thread no longer found");

    // unknown thread: message dropped
    tn = t0; tn.cnt = 99;
    net_in('{kind: PK_WRITE, dst_tile: 8'(TILE), tid: tn, off: 0, data: 1});
    check(drops == 1, "WRITE for unknown thread dropped");

    // table full: row 0 free again, then swap-out
    pe_op(OP_CREATE_THREAD, '0, 0, 7, r);
    t2 = r.data;
    loop_back(PK_CREATE, "create t2");
    check(spills == 0, "free row used");
    pe_op(OP_CREATE_THREAD, '0, 0, 9, r);
    t3 = r.data;
    loop_back(PK_CREATE, "create t3");
    @(negedge clk);
    check(spills == 1 && last_spill == t3, "table full: new thread with higher SS swapped out");

    // PE and network at the same time: both served within two cycles
    p = '{kind: PK_DEC, dst_tile: 8'(TILE), tid: t2, off: 0, data: 1};
    fork
      net_in(p);
      pe_op(OP_READ_DATA, t1, 3, 0, r);
    join
    check(r.ok && r.data == 64'hBEEF_0013, "read served while network busy");

    // VN of two cores on a four-tile chip
    pe_op(OP_SET_VN, '0, 0, 1, r);
    check(vn_log == 1, "SetVN 1");
    for (int i = 0; i < 4; i++) hist[i] = 0;
    for (int i = 0; i < 4; i++) begin
      pe_op(OP_CREATE_THREAD, '0, 0, 1, r);
      t0 = r.data;
      check(t0.src == '{nid: 8'd1, cid: 8'd0} && t0.dst.nid == 8'd1, "CreateThread stays in own VN 1");
      p = sent_q.pop_front();
      check(p.dst_tile == 8'(2 * 32'(t0.dst.nid) + 32'(t0.dst.cid)), "destination tile from <N_id, C_id>");
      hist[p.dst_tile & 3]++;
    end
    check(hist[2] == 2 && hist[3] == 2, "CreateThread spreads evenly over the VN");
    for (int i = 0; i < 4; i++) hist[i] = 0;
    for (int i = 0; i < 4; i++) begin
      pe_op(OP_CREATE_AF, '0, 0, 1, r);
      p = sent_q.pop_front();
      hist[p.dst_tile & 3]++;
    end
    check(hist[0] == 1 && hist[1] == 1 && hist[2] == 1 && hist[3] == 1, "CreateAF covers every tile");

    // back-pressure on the outgoing message register
    net_out_ready = 0;
    pe_op(OP_WRITE_DATA, t1, 0, 0, r);
    pe_req = '{op: OP_WRITE_DATA, tid: t1, off: 1, data: 0};
    pe_req_valid = 1;
    #1 check(!pe_req_ready, "second message waits while the first is not taken");
    net_out_ready = 1;
    @(negedge clk); @(negedge clk);
    pe_req_valid = 0;
    @(negedge clk);
    check(sent_q.size() == 2, "both messages sent after back-pressure");

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
