// tdt -- Thread Descriptor Table of one tile.
//
// The table is two fixed-size arrays of ENTRIES rows. The first is a
// content-addressable memory keyed by the 64-bit T_id; the second holds, per
// row, the scheduling slot SS (inputs still awaited), the frame base F_b and a
// running flag. A search with cmd_tid returns, combinationally, whether the
// thread is present and its frame base, so that the caller forms the frame
// location l = F_b + F_o. A priority encoder offers the runnable thread
// (SS = 0, not yet started) with the lowest T_id to the processing element.
// These mechanisms follow the architecture.
//
// This design's choices: row i owns the fixed frame window starting at
// F_b = i*FRAME_WORDS of the scratchpad, written into the row at allocation.
// SS decrements saturate at zero. When a thread arrives and no row is free,
// the table takes the non-running row with the highest SS and compares it with
// the new thread: whichever has the higher SS (the new one on a tie) leaves
// for the Thread Storage through the spill port, which reports its T_id and
// SS. Moving the spilled thread's frame words and bringing threads back from
// the Thread Storage are not done here.
//
// Commands (one per clock, cmd_valid high):
//   TDT_ALLOC : insert cmd_tid with SS = cmd_arg
//   TDT_DEC   : SS of cmd_tid -= cmd_arg (no effect if absent)
//   TDT_FREE  : remove cmd_tid (DeleteThread)
// Lookup outputs are valid in the same cycle as cmd_tid. spill_* is a
// registered one-cycle pulse in the cycle after the ALLOC. fire_valid/fire_ready
// is a valid/ready handshake; the accepted row becomes running.
module tdt
  import delta_pkg::*;
#(
  parameter int unsigned ENTRIES     = 32,
  parameter int unsigned FRAME_WORDS = 64,
  parameter int unsigned ADDR_W      = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  input  logic [1:0]        cmd_op,
  input  tid_t              cmd_tid,
  input  logic [SS_W-1:0]   cmd_arg,
  // search result for cmd_tid
  output logic              lk_hit,
  output logic [ADDR_W-1:0] lk_fb,
  // runnable thread for the PE
  output logic              fire_valid,
  input  logic              fire_ready,
  output tid_t              fire_tid,
  output logic [ADDR_W-1:0] fire_fb,
  // thread swapped out to the Thread Storage
  output logic              spill_valid,
  output tid_t              spill_tid,
  output logic [SS_W-1:0]   spill_ss,
  // number of rows in use
  output logic [$clog2(ENTRIES+1)-1:0] used
);

  localparam logic [1:0] TDT_ALLOC = 2'd0;
  localparam logic [1:0] TDT_DEC   = 2'd1;
  localparam logic [1:0] TDT_FREE  = 2'd2;
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  initial begin
    assert (ENTRIES * FRAME_WORDS <= (1 << ADDR_W))
      else $fatal(1, "tdt: frames do not fit in the address space");
  end

  logic [ENTRIES-1:0] valid_q, run_q;
  tid_t               key_q [ENTRIES];
  logic [SS_W-1:0]    ss_q  [ENTRIES];
  logic [ADDR_W-1:0]  fb_q  [ENTRIES];

  // ---------------- CAM search ----------------
  logic [IW-1:0] hit_idx;
  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!lk_hit && valid_q[i] && key_q[i] == cmd_tid) begin
        lk_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    end
    lk_fb = fb_q[hit_idx];
  end

  // ---------------- free row / swap victim ----------------
  logic          have_free, have_victim;
  logic [IW-1:0] free_idx, vic_idx;
  always_comb begin
    have_free   = 1'b0;
    free_idx    = '0;
    have_victim = 1'b0;
    vic_idx     = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!have_free && !valid_q[i]) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
      if (valid_q[i] && !run_q[i] && (!have_victim || ss_q[i] > ss_q[vic_idx])) begin
        have_victim = 1'b1;
        vic_idx     = IW'(i);
      end
    end
  end

  // ---------------- priority encoder: lowest runnable T_id ----------------
  logic [IW-1:0] sel_idx;
  always_comb begin
    fire_valid = 1'b0;
    sel_idx    = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && !run_q[i] && ss_q[i] == '0 &&
          (!fire_valid || key_q[i] < key_q[sel_idx])) begin
        fire_valid = 1'b1;
        sel_idx    = IW'(i);
      end
    end
    fire_tid = key_q[sel_idx];
    fire_fb  = fb_q[sel_idx];
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used += valid_q[i];
  end

  // ---------------- update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q     <= '0;
      run_q       <= '0;
      spill_valid <= 1'b0;
      spill_tid   <= '0;
      spill_ss    <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        key_q[i] <= '0;
        ss_q[i]  <= '0;
        fb_q[i]  <= ADDR_W'(i * FRAME_WORDS);
      end
    end else begin
      spill_valid <= 1'b0;
      if (fire_valid && fire_ready) run_q[sel_idx] <= 1'b1;
      if (cmd_valid) begin
        unique case (cmd_op)
          TDT_ALLOC: begin
            if (have_free) begin
              valid_q[free_idx] <= 1'b1;
              run_q[free_idx]   <= 1'b0;
              key_q[free_idx]   <= cmd_tid;
              ss_q[free_idx]    <= cmd_arg;
              fb_q[free_idx]    <= ADDR_W'(32'(free_idx) * FRAME_WORDS);
            end else if (have_victim && cmd_arg < ss_q[vic_idx]) begin
              // the stored thread waits longer: swap it out, keep the new one
              spill_valid      <= 1'b1;
              spill_tid        <= key_q[vic_idx];
              spill_ss         <= ss_q[vic_idx];
              key_q[vic_idx]   <= cmd_tid;
              ss_q[vic_idx]    <= cmd_arg;
            end else begin
              spill_valid <= 1'b1;
              spill_tid   <= cmd_tid;
              spill_ss    <= cmd_arg;
            end
          end
          TDT_DEC: begin
            if (lk_hit)
              ss_q[hit_idx] <= (ss_q[hit_idx] > cmd_arg) ? ss_q[hit_idx] - cmd_arg : '0;
          end
          TDT_FREE: begin
            if (lk_hit) begin
              valid_q[hit_idx] <= 1'b0;
              run_q[hit_idx]   <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
