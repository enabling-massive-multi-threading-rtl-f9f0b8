// th_hash -- the hash scheduling function H(N_pe, I_ex) of a Thread Dispatcher.
//
// It picks the destination <N_id, C_id> of a newly created thread. The module
// holds one full-period LFSR (debruijn_lfsr) per possible VN size: an LFSR
// of width k for every k = 1..LOG_PE yields the candidate C_id for a VN of
// 2^k cores. All candidates are computed in
// parallel; a first multiplexer, steered by the current VN size (vn_log = k),
// selects the right width, and a second multiplexer, steered by the executed
// instruction, chooses the pair <new N_id, new C_id> (CreateAF: anywhere on
// the chip) or <own N_id, new C_id> (CreateThread: inside the caller's VN).
// This two-multiplexer structure follows the architecture.
//
// For CreateAF both fields come from one LOG_PE-bit LFSR whose value is read
// as a tile number and split at bit k into <N_id, C_id>. Taking the two
// fields from two separate LFSRs of equal period would only ever produce a
// few of the possible pairs; with one full-width register every tile of the
// chip is chosen once per 2^LOG_PE CreateAF requests. This is this design's
// choice where the architecture only says that LFSRs produce both fields.
//
// Each LFSR is seeded differently, from SEED, so that different tiles walk
// different sequences; the seed derivation is this design's choice. All LFSRs
// advance together by one step on each request, so for a fixed VN size every
// core of the VN is chosen exactly once in every 2^k CreateThread requests.
//
// Timing: dst is combinational from the LFSR state, own_nid, vn_log and is_af;
// req advances the state at the clock edge, so the next request gets a new
// destination. One destination per clock.
module th_hash
  import delta_pkg::*;
#(
  parameter int unsigned LOG_PE = 8,          // log2 of the number of tiles on the chip
  parameter int unsigned SEED   = 32'h1       // per-tile seed
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,       // a CreateThread/CreateAF is executed: advance
  input  logic             is_af,     // I_ex: 1 = CreateAF, 0 = CreateThread
  input  logic [VNL_W-1:0] vn_log,    // N_pe = 2^vn_log (clamped to LOG_PE)
  input  logic [ID_W-1:0]  own_nid,   // N_id of the requesting tile
  output pe_addr_t         dst
);

  initial begin
    assert (LOG_PE >= 1 && LOG_PE <= ID_W) else $fatal(1, "th_hash: LOG_PE out of range");
  end

  // cand_c[k] : C_id candidate for a VN of 2^k cores
  logic [ID_W-1:0] cand_c [LOG_PE+1];
  assign cand_c[0] = '0;

  for (genvar k = 1; k <= LOG_PE; k++) begin : g_bank
    localparam logic [31:0] SC = (SEED * 32'h9E37_79B1) ^ (32'(k) * 32'h85EB_CA6B);
    logic [k-1:0] qc;
    debruijn_lfsr #(.N(k), .SEED(SC[k-1:0])) u_c (.clk, .rst_n, .step(req), .q(qc));
    assign cand_c[k] = ID_W'(qc);
  end

  // whole-chip LFSR for CreateAF: a tile number
  localparam logic [31:0] SA = (SEED * 32'hC2B2_AE35) ^ 32'h5555_5555;
  logic [LOG_PE-1:0] q_af;
  debruijn_lfsr #(.N(LOG_PE), .SEED(SA[LOG_PE-1:0])) u_af (.clk, .rst_n, .step(req), .q(q_af));

  logic [VNL_W-1:0] k_eff;
  logic [ID_W-1:0]  af_tile;
  pe_addr_t         new_thread, new_af;

  always_comb begin
    k_eff   = (32'(vn_log) > LOG_PE) ? VNL_W'(LOG_PE) : vn_log;
    af_tile = ID_W'(q_af);
    // first multiplexer: VN size
    new_thread.nid = own_nid;
    new_thread.cid = cand_c[k_eff];
    new_af         = addr_of(af_tile, k_eff);
    // second multiplexer: executed instruction
    dst = is_af ? new_af : new_thread;
  end

endmodule
