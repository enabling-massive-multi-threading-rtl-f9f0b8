// scratchpad -- per-tile scratchpad memory (16 KiB by default).
//
// It takes the place of an L1 data cache and is the point where the
// processing element and the router's Thread Dispatcher exchange data: thread
// frames live here. The size (16 KiB) follows the architecture; the two
// independent ports and the 32-bit word are this design's choices.
//
// Port A serves the processing element, port B the Thread Dispatcher. Each
// port reads or writes one word per clock; a read returns its word in the
// cycle after en is sampled (registered output). If both ports write the same
// word in one cycle, port B wins.
module scratchpad #(
  parameter int unsigned WORDS  = 4096,   // 16 KiB of 32-bit words
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  // port A (processing element)
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B (Thread Dispatcher)
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
