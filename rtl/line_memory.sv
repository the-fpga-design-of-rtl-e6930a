// line_memory: the embedded line store between the horizontal and the
// vertical scalar.
//
// NUM_LINES banks (4), each holding one horizontally scaled line of DEPTH
// (1280) RGB pixels: 4 x 1280 x 3 bytes = 15 kB, the "16 kB" of embedded
// block RAM of the design. Each bank is a separate array so that it maps
// onto its own block RAMs.
//
// Interface: one write port (we, wbank, waddr, wdata) that writes one pixel
// into one bank per clock, and one read address raddr that reads the same
// column of all banks at once, so the vertical scalar gets its four
// vertical taps in one clock. Reads are synchronous: rdata[b] holds
// bank b at raddr one clock after re. A read and a write in the same clock
// use different addresses in this design; the read returns the old data.
// The four-line, 16 kB size follows the original memory block; the port
// arrangement and the synchronous read are this design's choice.
module line_memory
  import scan_pkg::*;
#(
  parameter int unsigned DEPTH = 1280
) (
  input  logic clk,
  input  logic we,
  input  logic [$clog2(NUM_LINES)-1:0] wbank,
  input  logic [$clog2(DEPTH)-1:0]     waddr,
  input  rgb_t wdata,
  input  logic re,
  input  logic [$clog2(DEPTH)-1:0]     raddr,
  output rgb_t rdata [NUM_LINES]
);

  for (genvar b = 0; b < NUM_LINES; b++) begin : g_bank
    rgb_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we && wbank == b) mem[waddr] <= wdata;
    end

    always_ff @(posedge clk) begin
      if (re) rdata[b] <= mem[raddr];
    end
  end

endmodule
