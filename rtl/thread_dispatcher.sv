// thread_dispatcher -- Thread Dispatcher (TD) attached to a tile's router.
//
// The TD manages the threads of its tile through their life. It executes the
// thread instructions of the local processing element (PE) and the messages
// that arrive from the network, and starts a runnable thread on the PE
// whenever the PE is free.
//
// PE instructions (pe_req_*, valid/ready, one per clock at most):
//   CreateThread / CreateAF : H(.) (th_hash) picks the destination
//       <N_id, C_id>; the new T_id = {own <N_id, C_id>, destination, CNT} is
//       returned to the PE and a CREATE message carrying the initial SS goes
//       to the destination tile. CNT then increments.
//   WriteData / DecreaseSS / DeleteThread : a WRITE, DEC or DELETE message is
//       sent to the tile named by the destination field of the given T_id;
//       no further hashing is needed.
//   ReadData : the local TDT is searched with the T_id and the frame word at
//       F_b + F_o is read from the scratchpad.
//   SetVN : sets log2 of the virtual-node size used by this tile.
// Network messages (net_in_*): CREATE allocates a TDT row (or swaps a thread
// out to the Thread Storage, spill_*), WRITE stores a frame word at
// F_b + F_o, DEC lowers the scheduling slot, DELETE frees the row. A WRITE or
// DEC for a thread not in the table is dropped and flagged on drop_valid.
// Runnable threads leave through fire_* (lowest T_id first, from the TDT).
//
// The instruction set and the message semantics follow the architecture;
// the encodings, the one-word frame accesses, the round-robin choice between
// PE and network when both want the TD in the same cycle, and the handling
// of unknown threads are this design's choices. Even a thread created for
// the own tile travels as a message through the local router.
//
// Timing: a request is accepted in the cycle pe_req_valid && pe_req_ready;
// pe_rsp_valid pulses exactly one cycle later for every request. Requests that
// send a message wait (pe_req_ready low) while the outgoing message register
// is still full. A network message is consumed in the cycle net_in_ready is
// high.
module thread_dispatcher
  import delta_pkg::*;
#(
  parameter int unsigned TILE        = 0,     // linear tile index
  parameter int unsigned LOG_PE      = 8,     // log2 of tiles on the chip
  parameter int unsigned ENTRIES     = 32,    // TDT rows
  parameter int unsigned FRAME_WORDS = 64,    // words per frame
  parameter int unsigned SP_AW       = 12,    // scratchpad address width
  parameter int unsigned VN_LOG_RST  = 4      // VN size after reset: 2^4 = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE instruction port
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
  // network: injection into / ejection from the local router
  output logic              net_out_valid,
  input  logic              net_out_ready,
  output pkt_t              net_out_pkt,
  input  logic              net_in_valid,
  output logic              net_in_ready,
  input  pkt_t              net_in_pkt,
  // scratchpad port
  output logic              sp_en,
  output logic              sp_we,
  output logic [SP_AW-1:0]  sp_addr,
  output logic [DATA_W-1:0] sp_wdata,
  input  logic [DATA_W-1:0] sp_rdata,
  // thread swapped out to the Thread Storage
  output logic              spill_valid,
  output tid_t              spill_tid,
  output logic [SS_W-1:0]   spill_ss,
  // status
  output logic              drop_valid,
  output logic [VNL_W-1:0]  vn_log
);

  localparam logic [1:0] TDT_ALLOC = 2'd0;
  localparam logic [1:0] TDT_DEC   = 2'd1;
  localparam logic [1:0] TDT_FREE  = 2'd2;

  // ---------------- state ----------------
  logic [CNT_W-1:0] cnt_q;
  logic             turn_q;        // 1: network has priority this cycle
  logic             out_v_q;
  pkt_t             out_pkt_q;
  logic             rsp_v_q, rsp_rd_q, rsp_ok_q;
  logic [63:0]      rsp_data_q;

  pe_addr_t own;
  assign own = addr_of(ID_W'(TILE), vn_log);

  // ---------------- who is served this cycle ----------------
  logic net_sel, pe_sel, pe_needs_net;
  always_comb begin
    pe_needs_net = !(pe_req.op inside {OP_READ_DATA, OP_SET_VN});
    net_sel      = net_in_valid && (!pe_req_valid || turn_q);
    pe_sel       = pe_req_valid && !net_sel && !(pe_needs_net && out_v_q);
  end
  assign net_in_ready = net_sel;
  assign pe_req_ready = pe_sel;

  // ---------------- hash function and TDT ----------------
  pe_addr_t hdst;
  logic     is_create;
  assign is_create = pe_req.op inside {OP_CREATE_THREAD, OP_CREATE_AF};

  th_hash #(.LOG_PE(LOG_PE), .SEED(TILE + 1)) u_hash (
    .clk, .rst_n,
    .req    (pe_sel && is_create),
    .is_af  (pe_req.op == OP_CREATE_AF),
    .vn_log (vn_log),
    .own_nid(own.nid),
    .dst    (hdst)
  );

  logic             cmd_valid;
  logic [1:0]       cmd_op;
  tid_t             cmd_tid;
  logic [SS_W-1:0]  cmd_arg;
  logic             lk_hit;
  logic [SP_AW-1:0] lk_fb;

  always_comb begin
    cmd_valid = 1'b0;
    cmd_op    = TDT_ALLOC;
    cmd_tid   = net_sel ? net_in_pkt.tid : pe_req.tid;
    cmd_arg   = net_in_pkt.data[SS_W-1:0];
    if (net_sel) begin
      unique case (net_in_pkt.kind)
        PK_CREATE: begin cmd_valid = 1'b1; cmd_op = TDT_ALLOC; end
        PK_DEC:    begin cmd_valid = 1'b1; cmd_op = TDT_DEC;   end
        PK_DELETE: begin cmd_valid = 1'b1; cmd_op = TDT_FREE;  end
        default:   ;
      endcase
    end
  end

  tdt #(.ENTRIES(ENTRIES), .FRAME_WORDS(FRAME_WORDS), .ADDR_W(SP_AW)) u_tdt (
    .clk, .rst_n,
    .cmd_valid, .cmd_op, .cmd_tid, .cmd_arg,
    .lk_hit, .lk_fb,
    .fire_valid, .fire_ready, .fire_tid, .fire_fb,
    .spill_valid, .spill_tid, .spill_ss,
    .used ()
  );

  // ---------------- scratchpad access: l = F_b + F_o ----------------
  always_comb begin
    sp_en    = 1'b0;
    sp_we    = 1'b0;
    sp_addr  = '0;
    sp_wdata = net_in_pkt.data;
    if (net_sel && net_in_pkt.kind == PK_WRITE && lk_hit) begin
      sp_en   = 1'b1;
      sp_we   = 1'b1;
      sp_addr = lk_fb + SP_AW'(net_in_pkt.off);
    end else if (pe_sel && pe_req.op == OP_READ_DATA && lk_hit) begin
      sp_en   = 1'b1;
      sp_addr = lk_fb + SP_AW'(pe_req.off);
    end
  end

  assign drop_valid = net_sel && !lk_hit &&
                      (net_in_pkt.kind == PK_WRITE || net_in_pkt.kind == PK_DEC);

  // ---------------- new T_id and outgoing message ----------------
  tid_t new_tid;
  pkt_t new_pkt;
  always_comb begin
    new_tid.src = own;
    new_tid.dst = hdst;
    new_tid.cnt = cnt_q;
    new_pkt.tid  = is_create ? new_tid : pe_req.tid;
    new_pkt.off  = pe_req.off;
    new_pkt.data = pe_req.data;
    unique case (pe_req.op)
      OP_WRITE_DATA:    new_pkt.kind = PK_WRITE;
      OP_DECREASE_SS:   new_pkt.kind = PK_DEC;
      OP_DELETE_THREAD: new_pkt.kind = PK_DELETE;
      default:          new_pkt.kind = PK_CREATE;
    endcase
    new_pkt.dst_tile = tile_of(new_pkt.tid.dst, vn_log);
  end

  assign net_out_valid = out_v_q;
  assign net_out_pkt   = out_pkt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      turn_q     <= 1'b0;
      out_v_q    <= 1'b0;
      out_pkt_q  <= '0;
      rsp_v_q    <= 1'b0;
      rsp_rd_q   <= 1'b0;
      rsp_ok_q   <= 1'b0;
      rsp_data_q <= '0;
      vn_log     <= VNL_W'(VN_LOG_RST);
    end else begin
      if (net_in_valid && pe_req_valid) turn_q <= !turn_q;
      if (out_v_q && net_out_ready) out_v_q <= 1'b0;
      rsp_v_q  <= pe_sel;
      rsp_rd_q <= pe_sel && pe_req.op == OP_READ_DATA;
      rsp_ok_q <= 1'b1;
      if (pe_sel) begin
        if (pe_needs_net) begin
          out_v_q   <= 1'b1;
          out_pkt_q <= new_pkt;
        end
        unique case (pe_req.op)
          OP_CREATE_THREAD, OP_CREATE_AF: begin
            rsp_data_q <= new_tid;
            cnt_q      <= cnt_q + 1'b1;
          end
          OP_READ_DATA: begin
            rsp_ok_q   <= lk_hit;
            rsp_data_q <= '0;
          end
          OP_SET_VN: begin
            vn_log     <= (pe_req.data > LOG_PE) ? VNL_W'(LOG_PE) : VNL_W'(pe_req.data);
            rsp_data_q <= '0;
          end
          default: rsp_data_q <= pe_req.tid;
        endcase
      end
    end
  end

  assign pe_rsp_valid = rsp_v_q;
  always_comb begin
    pe_rsp.ok   = rsp_ok_q;
    pe_rsp.data = (rsp_rd_q && rsp_ok_q) ? {32'b0, sp_rdata} : rsp_data_q;
  end

  // a request must stay stable until it is accepted
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      pe_req_valid && !pe_req_ready |=> pe_req_valid && $stable(pe_req);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
