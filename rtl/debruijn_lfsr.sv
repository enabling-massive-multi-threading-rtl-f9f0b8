// debruijn_lfsr -- maximum-length LFSR extended to a full 2^N-state cycle.
//
// A Fibonacci LFSR shifts left and feeds the XOR of its tap bits into bit 0;
// with a primitive feedback polynomial it cycles through the 2^N-1 non-zero
// states. As the hash scheduling function requires every configuration to be
// reachable, the feedback bit is additionally inverted whenever bits
// [N-2:0] are all zero. This splices the all-zero state between 100..0 and
// 00..01, so the register visits all 2^N values once per period (a de Bruijn
// counter). Over any 2^N consecutive steps each value therefore appears
// exactly once: a pseudo-random round-robin.
//
// The tap sets are standard maximum-length choices for N = 2..16 (this
// design's choice; the architecture only asks for maximum-length LFSRs).
// N = 1 degenerates to a toggle.
//
// Interface: on reset q takes SEED (any value, zero included). While step is
// high the register advances by one state per clock. q is the current state.
module debruijn_lfsr #(
  parameter int unsigned N    = 6,
  parameter logic [N-1:0] SEED = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] q
);

  // Tap mask: bit (t-1) set for each tap position t of the polynomial.
  function automatic logic [15:0] tap_mask(int unsigned n);
    case (n)
      2:       return 16'h0003;  // 2,1
      3:       return 16'h0006;  // 3,2
      4:       return 16'h000C;  // 4,3
      5:       return 16'h0014;  // 5,3
      6:       return 16'h0030;  // 6,5
      7:       return 16'h0060;  // 7,6
      8:       return 16'h00B8;  // 8,6,5,4
      9:       return 16'h0110;  // 9,5
      10:      return 16'h0240;  // 10,7
      11:      return 16'h0500;  // 11,9
      12:      return 16'h0829;  // 12,6,4,1
      13:      return 16'h100D;  // 13,4,3,1
      14:      return 16'h2015;  // 14,5,3,1
      15:      return 16'h6000;  // 15,14
      16:      return 16'hD008;  // 16,15,13,4
      default: return 16'h0001;
    endcase
  endfunction

  initial begin
    assert (N >= 1 && N <= 16) else $fatal(1, "debruijn_lfsr: N must be 1..16");
  end

  logic [N-1:0] q_next;

  if (N == 1) begin : g_toggle
    assign q_next = ~q;
  end else begin : g_lfsr
    localparam logic [N-1:0] TAPS = N'(tap_mask(N));
    logic fb;
    assign fb     = (^(q & TAPS)) ^ (q[N-2:0] == '0);
    assign q_next = {q[N-2:0], fb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (step) q <= q_next;
  end

endmodule
