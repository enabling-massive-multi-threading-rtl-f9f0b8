// delta_tile -- one tile of the chip without its processing element.
//
// A tile couples a processing element (PE) with a lightweight router that is
// extended by a Thread Dispatcher (TD). The TD's thread frames live in the
// tile's scratchpad, which the PE also uses as its data memory. This module
// holds the router (ring_router), the TD (thread_dispatcher) and the
// scratchpad; the PE, which the architecture leaves open, attaches through
// the pe_* ports (thread instructions, runnable-thread hand-off and scratchpad
// port A). The four ring links leave through link_*. The pairing of PE and
// extended router and the scratchpad as their meeting point follow the
// architecture; giving the PE its own scratchpad port and sending even
// messages for the own tile through the local router are this design's
// choices.
//
// Timing is that of the parts: TD answers one cycle after accepting a
// request, scratchpad reads take one cycle, each router hop takes at least
// one cycle.
module delta_tile
  import delta_pkg::*;
#(
  parameter int unsigned MESH_X      = 16,
  parameter int unsigned MESH_Y      = 16,
  parameter int unsigned TILE        = 0,
  parameter int unsigned ENTRIES     = 32,
  parameter int unsigned FRAME_WORDS = 64,
  parameter int unsigned SP_WORDS    = 4096,
  parameter int unsigned VN_LOG_RST  = 4,
  localparam int unsigned SP_AW      = $clog2(SP_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ring links (0 = east, 1 = west, 2 = north, 3 = south)
  input  logic [3:0]        link_in_valid,
  output logic [3:0]        link_in_ready,
  input  pkt_t              link_in_pkt  [4],
  output logic [3:0]        link_out_valid,
  input  logic [3:0]        link_out_ready,
  output pkt_t              link_out_pkt [4],
  // PE thread instructions
  input  logic              pe_req_valid,
  output logic              pe_req_ready,
  input  pe_req_t           pe_req,
  output logic              pe_rsp_valid,
  output pe_rsp_t           pe_rsp,
  // runnable thread to the PE
  output logic              fire_valid,
  input  logic              fire_ready,
  output tid_t              fire_tid,
  output logic [SP_AW-1:0]  fire_fb,
  // PE data port on the scratchpad
  input  logic              pe_sp_en,
  input  logic              pe_sp_we,
  input  logic [SP_AW-1:0]  pe_sp_addr,
  input  logic [DATA_W-1:0] pe_sp_wdata,
  output logic [DATA_W-1:0] pe_sp_rdata,
  // Thread Storage (swap-out) and status
  output logic              spill_valid,
  output tid_t              spill_tid,
  output logic [SS_W-1:0]   spill_ss,
  output logic              drop_valid
);

  localparam int unsigned LOG_PE = $clog2(MESH_X * MESH_Y);

  logic inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t inj_pkt, ej_pkt;

  logic              sp_en, sp_we;
  logic [SP_AW-1:0]  sp_addr;
  logic [DATA_W-1:0] sp_wdata, sp_rdata;

  ring_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(TILE % MESH_X), .Y(TILE / MESH_X)) u_router (
    .clk, .rst_n,
    .in_valid (link_in_valid),  .in_ready (link_in_ready),  .in_pkt (link_in_pkt),
    .out_valid(link_out_valid), .out_ready(link_out_ready), .out_pkt(link_out_pkt),
    .inj_valid, .inj_ready, .inj_pkt,
    .ej_valid,  .ej_ready,  .ej_pkt
  );

  thread_dispatcher #(
    .TILE(TILE), .LOG_PE(LOG_PE > 0 ? LOG_PE : 1), .ENTRIES(ENTRIES),
    .FRAME_WORDS(FRAME_WORDS), .SP_AW(SP_AW), .VN_LOG_RST(VN_LOG_RST)
  ) u_td (
    .clk, .rst_n,
    .pe_req_valid, .pe_req_ready, .pe_req, .pe_rsp_valid, .pe_rsp,
    .fire_valid, .fire_ready, .fire_tid, .fire_fb,
    .net_out_valid(inj_valid), .net_out_ready(inj_ready), .net_out_pkt(inj_pkt),
    .net_in_valid (ej_valid),  .net_in_ready (ej_ready),  .net_in_pkt (ej_pkt),
    .sp_en, .sp_we, .sp_addr, .sp_wdata, .sp_rdata,
    .spill_valid, .spill_tid, .spill_ss,
    .drop_valid,
    .vn_log ()
  );

  scratchpad #(.WORDS(SP_WORDS), .DATA_W(DATA_W)) u_sp (
    .clk,
    .a_en(pe_sp_en), .a_we(pe_sp_we), .a_addr(pe_sp_addr), .a_wdata(pe_sp_wdata), .a_rdata(pe_sp_rdata),
    .b_en(sp_en),    .b_we(sp_we),    .b_addr(sp_addr),    .b_wdata(sp_wdata),    .b_rdata(sp_rdata)
  );

endmodule
