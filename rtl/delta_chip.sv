// delta_chip -- many-core chip with hardware thread scheduling (top level).
//
// MESH_X x MESH_Y tiles (16 x 16 = 256 by default, the largest system the
// architecture evaluates) are joined into a 2D mesh. Each tile holds a router
// with its Thread Dispatcher and a scratchpad (delta_tile). Processing
// elements are not part of this RTL: every tile's PE ports are brought out
// as arrays indexed by the linear tile number t = y*MESH_X + x, as are the
// swap-out ports towards the per-PE Thread Storage banks. Links at the mesh
// border are left idle: dimension-order routing never uses them.
//
// Virtual nodes are groups of 2^vn_log consecutive tile numbers (16 after
// reset, one mesh row), changed with the SetVN instruction of each tile.
//
// The tiled organisation, the thread hardware in every router, the scratchpad
// per tile and the 256-PE size follow the architecture. The 16 x 16 shape, the
// row-major tile numbering, the table and frame sizes and the router are this
// design's choices.
//
// Timing: all ports are synchronous to clk; rst_n is an asynchronous,
// active-low reset. Per tile, a PE request is answered one cycle after it is
// accepted; a message needs one cycle to enter the router and at least one
// cycle per hop; a thread created for the own tile with SS 0 is offered on
// fire_valid within five cycles.
module delta_chip
  import delta_pkg::*;
#(
  parameter int unsigned MESH_X      = 16,
  parameter int unsigned MESH_Y      = 16,
  parameter int unsigned ENTRIES     = 32,
  parameter int unsigned FRAME_WORDS = 64,
  parameter int unsigned SP_WORDS    = 4096,
  parameter int unsigned VN_LOG_RST  = 4,
  localparam int unsigned NT         = MESH_X * MESH_Y,
  localparam int unsigned SP_AW      = $clog2(SP_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-tile PE thread instructions
  input  logic [NT-1:0]     pe_req_valid,
  output logic [NT-1:0]     pe_req_ready,
  input  pe_req_t           pe_req       [NT],
  output logic [NT-1:0]     pe_rsp_valid,
  output pe_rsp_t           pe_rsp       [NT],
  // per-tile runnable thread hand-off
  output logic [NT-1:0]     fire_valid,
  input  logic [NT-1:0]     fire_ready,
  output tid_t              fire_tid     [NT],
  output logic [SP_AW-1:0]  fire_fb      [NT],
  // per-tile PE data port on the scratchpad
  input  logic [NT-1:0]     pe_sp_en,
  input  logic [NT-1:0]     pe_sp_we,
  input  logic [SP_AW-1:0]  pe_sp_addr   [NT],
  input  logic [DATA_W-1:0] pe_sp_wdata  [NT],
  output logic [DATA_W-1:0] pe_sp_rdata  [NT],
  // per-tile Thread Storage swap-out and status
  output logic [NT-1:0]     spill_valid,
  output tid_t              spill_tid    [NT],
  output logic [SS_W-1:0]   spill_ss     [NT],
  output logic [NT-1:0]     drop_valid
);

  localparam int unsigned P_E = 0, P_W = 1, P_N = 2, P_S = 3;

  logic [3:0] lo_valid [NT];
  logic [3:0] lo_ready [NT];
  pkt_t       lo_pkt   [NT][4];
  logic [3:0] li_valid [NT];
  logic [3:0] li_ready [NT];
  pkt_t       li_pkt   [NT][4];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned T = y * MESH_X + x;

      // link arriving from the east neighbour: its westbound output
      if (x + 1 < MESH_X) begin : g_e
        assign li_valid[T][P_E]   = lo_valid[T+1][P_W];
        assign li_pkt[T][P_E]     = lo_pkt[T+1][P_W];
        assign lo_ready[T+1][P_W] = li_ready[T][P_E];
      end else begin : g_e_edge
        assign li_valid[T][P_E] = 1'b0;
        assign li_pkt[T][P_E]   = '0;
        assign lo_ready[T][P_E] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign li_valid[T][P_W]   = lo_valid[T-1][P_E];
        assign li_pkt[T][P_W]     = lo_pkt[T-1][P_E];
        assign lo_ready[T-1][P_E] = li_ready[T][P_W];
      end else begin : g_w_edge
        assign li_valid[T][P_W] = 1'b0;
        assign li_pkt[T][P_W]   = '0;
        assign lo_ready[T][P_W] = 1'b1;
      end
      if (y > 0) begin : g_n
        assign li_valid[T][P_N]        = lo_valid[T-MESH_X][P_S];
        assign li_pkt[T][P_N]          = lo_pkt[T-MESH_X][P_S];
        assign lo_ready[T-MESH_X][P_S] = li_ready[T][P_N];
      end else begin : g_n_edge
        assign li_valid[T][P_N] = 1'b0;
        assign li_pkt[T][P_N]   = '0;
        assign lo_ready[T][P_N] = 1'b1;
      end
      if (y + 1 < MESH_Y) begin : g_s
        assign li_valid[T][P_S]        = lo_valid[T+MESH_X][P_N];
        assign li_pkt[T][P_S]          = lo_pkt[T+MESH_X][P_N];
        assign lo_ready[T+MESH_X][P_N] = li_ready[T][P_S];
      end else begin : g_s_edge
        assign li_valid[T][P_S] = 1'b0;
        assign li_pkt[T][P_S]   = '0;
        assign lo_ready[T][P_S] = 1'b1;
      end

      delta_tile #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .TILE(T), .ENTRIES(ENTRIES),
        .FRAME_WORDS(FRAME_WORDS), .SP_WORDS(SP_WORDS), .VN_LOG_RST(VN_LOG_RST)
      ) u_tile (
        .clk, .rst_n,
        .link_in_valid (li_valid[T]), .link_in_ready (li_ready[T]), .link_in_pkt (li_pkt[T]),
        .link_out_valid(lo_valid[T]), .link_out_ready(lo_ready[T]), .link_out_pkt(lo_pkt[T]),
        .pe_req_valid(pe_req_valid[T]), .pe_req_ready(pe_req_ready[T]), .pe_req(pe_req[T]),
        .pe_rsp_valid(pe_rsp_valid[T]), .pe_rsp(pe_rsp[T]),
        .fire_valid(fire_valid[T]), .fire_ready(fire_ready[T]), .fire_tid(fire_tid[T]), .fire_fb(fire_fb[T]),
        .pe_sp_en(pe_sp_en[T]), .pe_sp_we(pe_sp_we[T]), .pe_sp_addr(pe_sp_addr[T]),
        .pe_sp_wdata(pe_sp_wdata[T]), .pe_sp_rdata(pe_sp_rdata[T]),
        .spill_valid(spill_valid[T]), .spill_tid(spill_tid[T]), .spill_ss(spill_ss[T]),
        .drop_valid(drop_valid[T])
      );
    end
  end

endmodule
