// tb_ring_router -- checks one router in the middle of a 4 x 3 mesh.
//
// Random single-flit packets enter on all four ring inputs and the local
// injection port, with random back-pressure on every output. Each packet
// carries a unique tag; the scoreboard works out its output from the
// dimension-order rule (X first, then Y, then local) and checks that every
// packet leaves exactly once on that output. It also checks the one-cycle
// hop latency, that a ring flit beats a local injection for the same output,
// and that a busy output register blocks new flits.
module tb_ring_router;
  import delta_pkg::*;
  localparam int unsigned MX = 4, MY = 3, X = 1, Y = 1;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid = 0, in_ready, out_valid, out_ready = 0;
  pkt_t in_pkt [4], out_pkt [4];
  logic inj_valid = 0, inj_ready, ej_valid, ej_ready = 0;
  pkt_t inj_pkt, ej_pkt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ring_router #(.MESH_X(MX), .MESH_Y(MY), .X(X), .Y(Y)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int exp_port(logic [ID_W-1:0] d);
    int dx = int'(d) % MX, dy = int'(d) / MX;
    if (dx > int'(X)) return 0;
    if (dx < int'(X)) return 1;
    if (dy > int'(Y)) return 3;
    if (dy < int'(Y)) return 2;
    return 4;
  endfunction

  int expect_port [int];     // tag -> output
  int sent = 0, got = 0;
  bit running = 1;

  function automatic pkt_t mk(int tag);
    pkt_t p;
    p = '0;
    p.dst_tile = ID_W'($urandom_range(MX * MY - 1));
    p.data = 32'(tag);
    return p;
  endfunction

  // random sources
  initial begin
    for (int s = 0; s < 4; s++) in_pkt[s] = '0;
    inj_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // directed: latency and ring-over-local priority
    in_pkt[1] = mk(0); in_pkt[1].dst_tile = 8'(Y * MX + 3);   // from west, heading east
    inj_pkt = mk(0);   inj_pkt.dst_tile   = 8'(Y * MX + 2);   // also east
    in_valid[1] = 1; inj_valid = 1; out_ready = 4'b0000;
    #1 check(in_ready[1] && !inj_ready, "ring flit has priority over injection");
    @(negedge clk);
    in_valid[1] = 0;
    check(out_valid[0] && out_pkt[0].dst_tile == 8'(Y * MX + 3), "one-cycle hop to east output");
    #1 check(!inj_ready, "full output register blocks injection");
    out_ready[0] = 1;
    @(negedge clk);
    check(!out_valid[0], "output drained");
    #1 check(inj_ready, "injection accepted once the register is empty");
    @(negedge clk);
    inj_valid = 0;
    check(out_valid[0] && out_pkt[0].dst_tile == 8'(Y * MX + 2), "injected flit on east output");
    @(negedge clk);
    out_ready = 0;
    repeat (2) @(negedge clk);

    // random traffic
    fork
      for (int s = 0; s < 5; s++) begin
        automatic int src = s;
        fork
          begin
            for (int n = 0; n < 300; n++) begin
              automatic pkt_t p;
              automatic int tag;
              tag = src * 1000 + n + 1;
              p = mk(tag);
              expect_port[tag] = exp_port(p.dst_tile);
              sent++;
              if (src < 4) begin in_pkt[src] = p; in_valid[src] = 1; end
              else begin inj_pkt = p; inj_valid = 1; end
              forever begin
                automatic bit ok;
                #1 ok = (src < 4) ? in_ready[src] : inj_ready;
                @(posedge clk);
                if (ok) break;
                @(negedge clk);
              end
              @(negedge clk);
              if (src < 4) in_valid[src] = 0; else inj_valid = 0;
              repeat ($urandom_range(1)) @(negedge clk);
            end
          end
        join_none
      end
    join_none
    wait (sent == 1500);
    wait (got == 1500);
    repeat (5) @(posedge clk);
    check(expect_port.num() == 0, "every packet delivered");
    running = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random back-pressure and scoreboard
  always @(negedge clk) if (rst_n) begin
    out_ready <= 4'($urandom);
    ej_ready  <= 1'($urandom);
  end
  always @(posedge clk) if (rst_n && sent > 0) begin
    for (int p = 0; p < 5; p++) begin
      logic v, r;
      pkt_t k;
      v = (p < 4) ? out_valid[p] : ej_valid;
      r = (p < 4) ? out_ready[p] : ej_ready;
      k = (p < 4) ? out_pkt[p]   : ej_pkt;
      if (v && r && k.data != 0) begin
        automatic int tag = int'(k.data);
        check(expect_port.exists(tag), $sformatf("delivered packet %0d was sent and not yet delivered (port %0d, t=%0t)", tag, p, $time));
        if (expect_port.exists(tag)) begin
          check(expect_port[tag] == p, $sformatf("tag %0d on output %0d", tag, p));
          expect_port.delete(tag);
        end
        got++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (sent %0d got %0d)", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
