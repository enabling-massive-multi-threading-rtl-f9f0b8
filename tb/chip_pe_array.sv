// chip_pe_array -- behavioural processing elements and scoreboard for
// chip-level tests.
//
// One sequential process per tile plays that tile's processing element.
// The PE runs one thread at a time. In each of two phases (two VN sizes,
// switched with SetVN) every PE acts as a producer: it creates K threads
// (every fourth one with CreateAF, the rest with CreateThread) with a
// scheduling slot of 2, then writes two frame words into each one and
// signals them with a single DecreaseSS of 2. Between its own steps, and
// until the phase is over, the PE accepts every runnable thread the
// dispatcher offers: it reads the two frame words with ReadData, checks their
// sum against the producer's values, checks that the thread runs on the tile
// named by its T_id, and ends it with DeleteThread.
//
// Each created thread must either run exactly once or be swapped out to the
// Thread Storage (spill port); the phase ends when that holds for all of
// them. checks/failures count the scoreboard's comparisons.
module chip_pe_array
  import delta_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned SP_AW  = 12,
  parameter int unsigned K      = 8,    // threads created per tile and phase
  parameter int unsigned VN1    = 2,    // log2 VN size, phase 1
  parameter int unsigned VN2    = 3,    // log2 VN size, phase 2
  localparam int unsigned NT    = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NT-1:0]     pe_req_valid,
  input  logic [NT-1:0]     pe_req_ready,
  output pe_req_t           pe_req       [NT],
  input  logic [NT-1:0]     pe_rsp_valid,
  input  pe_rsp_t           pe_rsp       [NT],
  input  logic [NT-1:0]     fire_valid,
  output logic [NT-1:0]     fire_ready,
  input  tid_t              fire_tid     [NT],
  input  logic [NT-1:0]     spill_valid,
  input  tid_t              spill_tid    [NT],
  input  logic [NT-1:0]     drop_valid,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_thread, n_af, n_fired, n_spilled, n_dropped,
  output int                n_writes, n_reads, n_decs, n_deletes, n_vn_switch, n_req_stall
);

  // scoreboard, indexed by T_id
  int unsigned exp_sum   [tid_t];
  int          fired_cnt [tid_t];
  bit          spilled   [tid_t];
  int          created_total, resolved_total;
  int          produced [2];
  int          left     [2];

  initial begin
    checks = 0; failures = 0; done = 0;
    n_thread = 0; n_af = 0; n_fired = 0; n_spilled = 0; n_dropped = 0;
    n_writes = 0; n_reads = 0; n_decs = 0; n_deletes = 0; n_vn_switch = 0; n_req_stall = 0;
    created_total = 0; resolved_total = 0;
    produced = '{0, 0}; left = '{0, 0};
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  // swap-outs and drops, from every tile
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < int'(NT); t++) begin
      if (spill_valid[t]) begin
        n_spilled++;
        check(exp_sum.exists(spill_tid[t]), "swapped-out thread was created");
        check(!spilled.exists(spill_tid[t]), "thread swapped out once");
        check(!fired_cnt.exists(spill_tid[t]), "swapped-out thread had not run");
        spilled[spill_tid[t]] = 1;
        resolved_total++;
      end
      if (drop_valid[t]) n_dropped++;
      if (pe_req_valid[t] && !pe_req_ready[t]) n_req_stall++;
    end
  end

  for (genvar g = 0; g < int'(NT); g++) begin : g_pe
    localparam int unsigned T = g;
    logic    v = 1'b0, fr = 1'b0;
    pe_req_t rq = '0;
    assign pe_req_valid[T] = v;
    assign pe_req[T]       = rq;
    assign fire_ready[T]   = fr;

    logic [VNL_W-1:0] vn = '0;
    tid_t mine [$];

    task automatic op(op_e o, tid_t t, int off, int data, output pe_rsp_t r);
      bit ok;
      rq = '{op: o, tid: t, off: OFF_W'(off), data: DATA_W'(data)};
      v  = 1'b1;
      forever begin
        #1 ok = pe_req_ready[T];
        @(posedge clk);
        if (ok) break;
        @(negedge clk);
      end
      #1 v = 1'b0;
      r = pe_rsp[T];
      if (!pe_rsp_valid[T]) check(0, "response one cycle after the request");
      @(negedge clk);
    endtask

    // run one runnable thread if the dispatcher offers one
    task automatic serve(output bit ran);
      tid_t    t;
      pe_rsp_t a, b, r;
      ran = 0;
      if (!fire_valid[T]) return;
      fr = 1'b1;
      t  = fire_tid[T];
      @(posedge clk);
      #1 fr = 1'b0;
      @(negedge clk);
      ran = 1;
      check(tile_of(t.dst, vn) == ID_W'(T), "thread runs on the tile named by its T_id");
      check(exp_sum.exists(t), "running thread was created");
      check(!fired_cnt.exists(t), "thread runs only once");
      check(!spilled.exists(t), "swapped-out thread does not run here");
      fired_cnt[t] = 1;
      op(OP_READ_DATA, t, 0, 0, a);
      op(OP_READ_DATA, t, 1, 0, b);
      n_reads += 2;
      check(a.ok && b.ok, "ReadData finds the running thread");
      check(exp_sum.exists(t) && a.data[31:0] + b.data[31:0] == exp_sum[t], "frame holds the producer's data");
      op(OP_DELETE_THREAD, t, 0, 0, r);
      n_deletes++;
      n_fired++;
      resolved_total++;
    endtask

    initial begin
      pe_rsp_t r;
      tid_t    t;
      bit      ran;
      int unsigned a, b;
      wait (rst_n);
      @(negedge clk);
      for (int ph = 0; ph < 2; ph++) begin
        vn = VNL_W'(ph == 0 ? VN1 : VN2);
        op(OP_SET_VN, '0, 0, int'(vn), r);
        if (T == 0) n_vn_switch++;
        mine.delete();
        // create
        for (int i = 0; i < int'(K); i++) begin
          bit af;
          af = (i % 4 == 3);
          op(af ? OP_CREATE_AF : OP_CREATE_THREAD, '0, 0, 2, r);
          t = r.data;
          check(t.src == addr_of(ID_W'(T), vn), "source field is the creator");
          if (!af) check(t.dst.nid == addr_of(ID_W'(T), vn).nid, "CreateThread stays in the caller's VN");
          check(!exp_sum.exists(t), "T_id unique");
          a = 32'(T) * 1000 + 32'(i);
          b = 32'(ph) * 77 + 32'(i) * 3;
          exp_sum[t] = a + b;
          created_total++;
          if (af) n_af++; else n_thread++;
          mine.push_back(t);
          serve(ran);
        end
        // feed
        for (int i = 0; i < int'(K); i++) begin
          t = mine[i];
          a = 32'(T) * 1000 + 32'(i);
          b = 32'(ph) * 77 + 32'(i) * 3;
          op(OP_WRITE_DATA, t, 0, int'(a), r);
          op(OP_WRITE_DATA, t, 1, int'(b), r);
          op(OP_DECREASE_SS, t, 0, 2, r);
          n_writes += 2;
          n_decs++;
          serve(ran);
        end
        produced[ph]++;
        // run what arrives until every thread of the phase has run or left
        while (!(produced[ph] == int'(NT) && resolved_total == created_total)) begin
          serve(ran);
          if (!ran) @(negedge clk);
        end
        left[ph]++;
        wait (left[ph] == int'(NT));
        repeat (20) @(negedge clk);   // last DeleteThread messages land
      end
      if (T == 0) done = 1;
    end
  end

endmodule
