// ring_router -- lightweight router of the tile mesh.
//
// The chip is a physical 2D mesh formed by four unidirectional rings of
// links: eastbound, westbound, northbound and southbound. Each router joins
// the four ring links that pass through its tile with the local Thread
// Dispatcher. The architecture uses an existing two-stage lightweight router
// and does not describe its inside; what follows is this design's own
// minimal router with the same role.
//
// Packets are single flits (delta_pkg::pkt_t). Routing is dimension order:
// along the X ring towards the destination column, then along the Y ring
// towards the destination row, then out to the local port. Tile t sits at
// column t mod MESH_X, row t / MESH_X; row numbers grow southwards.
// Stage 1 routes and arbitrates, stage 2 is one output register per direction
// driving the link. For each output, traffic already on a ring has priority
// over the local injection (port order E, W, N, S, then local). An output
// register accepts a new flit only when it is empty, so a link carries at most
// one flit every two cycles and no ready signal crosses more than one hop.
// XY routing on a mesh without wrap-around cannot deadlock.
//
// Port index: 0 = east, 1 = west, 2 = north, 3 = south. in_*[p] is the link
// arriving from the neighbour on side p, out_*[p] the link leaving towards it.
// All links are valid/ready: a flit moves when both are high.
module ring_router
  import delta_pkg::*;
#(
  parameter int unsigned MESH_X = 16,
  parameter int unsigned MESH_Y = 16,
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  // ring links
  input  logic [3:0] in_valid,
  output logic [3:0] in_ready,
  input  pkt_t       in_pkt   [4],
  output logic [3:0] out_valid,
  input  logic [3:0] out_ready,
  output pkt_t       out_pkt  [4],
  // local injection (from the Thread Dispatcher)
  input  logic       inj_valid,
  output logic       inj_ready,
  input  pkt_t       inj_pkt,
  // local ejection (to the Thread Dispatcher)
  output logic       ej_valid,
  input  logic       ej_ready,
  output pkt_t       ej_pkt
);

  localparam int unsigned P_E = 0, P_W = 1, P_N = 2, P_S = 3, P_L = 4;

  initial begin
    assert (MESH_X * MESH_Y <= (1 << ID_W)) else $fatal(1, "ring_router: mesh too large");
  end

  // output direction of a flit at this router
  function automatic logic [2:0] route(logic [ID_W-1:0] dst);
    int unsigned dx, dy;
    dx = 32'(dst) % MESH_X;
    dy = 32'(dst) / MESH_X;
    if      (dx > X) return 3'(P_E);
    else if (dx < X) return 3'(P_W);
    else if (dy > Y) return 3'(P_S);
    else if (dy < Y) return 3'(P_N);
    else             return 3'(P_L);
  endfunction

  // five sources: four ring inputs then local injection
  logic [4:0] src_v;
  pkt_t       src_pkt [5];
  logic [2:0] src_dir [5];

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      src_v[s]   = in_valid[s];
      src_pkt[s] = in_pkt[s];
    end
    src_v[4]   = inj_valid;
    src_pkt[4] = inj_pkt;
    for (int s = 0; s < 5; s++) src_dir[s] = route(src_pkt[s].dst_tile);
  end

  // stage 2: output registers
  logic [4:0] oreg_v;
  pkt_t       oreg_pkt [5];
  logic [4:0] odrain;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      out_valid[p] = oreg_v[p];
      out_pkt[p]   = oreg_pkt[p];
      odrain[p]    = out_ready[p];
    end
    ej_valid  = oreg_v[P_L];
    ej_pkt    = oreg_pkt[P_L];
    odrain[4] = ej_ready;
  end

  // stage 1: fixed-priority arbitration per output
  logic [4:0] grant;          // per source
  logic [2:0] gsrc [5];       // per output: granted source
  logic [4:0] gout;           // per output: a flit is taken this cycle
  always_comb begin
    grant = '0;
    gout  = '0;
    for (int p = 0; p < 5; p++) begin
      gsrc[p] = '0;
      if (!oreg_v[p]) begin
        for (int s = 0; s < 5; s++) begin
          if (!gout[p] && src_v[s] && src_dir[s] == 3'(p)) begin
            gout[p]  = 1'b1;
            gsrc[p]  = 3'(s);
            grant[s] = 1'b1;
          end
        end
      end
    end
    in_ready  = grant[3:0];
    inj_ready = grant[4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oreg_v <= '0;
      for (int p = 0; p < 5; p++) oreg_pkt[p] <= '0;
    end else begin
      for (int p = 0; p < 5; p++) begin
        if (gout[p]) begin
          oreg_v[p]   <= 1'b1;
          oreg_pkt[p] <= src_pkt[gsrc[p]];
        end else if (oreg_v[p] && odrain[p]) begin
          oreg_v[p] <= 1'b0;
        end
      end
    end
  end

endmodule
