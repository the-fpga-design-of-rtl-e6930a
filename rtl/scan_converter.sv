// scan_converter: VGA-to-720p scan converter with adaptive cubic
// convolution (ACC).
//
// A 640x480 RGB frame is scaled to 1280x720 in two separable passes:
//   VGA in -> h_scaler (640 -> 1280 pixels per line, 4-tap ACC)
//          -> line_memory (4 line banks of 1280 RGB pixels, 15 kB)
//          -> v_scaler (480 -> 720 lines, 4-tap ACC across the banks)
//          -> 24-bit RGB out
// scan_ctrl chooses the write bank, the read banks and the addresses, and
// clk_synth supplies the 25 / 50 / 75 MHz pixel rates as enables of the one
// 75 MHz master clock: input pixels are taken at most at the 25 MHz rate,
// the horizontal scalar runs at 50 MHz and the vertical one at 75 MHz.
// The block structure follows the design; the handshakes and timing are
// this implementation's own.
//
// Interface: the input is a stream of frames in raster order on
// vga_valid/vga_ready (no sync flags; the block counts pixels and lines
// from reset). The output has no back-pressure: out_valid marks a pixel,
// out_sof the first pixel of a frame and out_eol the last one of a line;
// out_adapt and h_adapt report which ACC case (0 plain, 1 A>A_LEVEL,
// 2 A<-A_LEVEL) produced each vertical and horizontal pixel.
// The input is held off (vga_ready low) while no line bank is free, so a
// frame takes somewhat longer than the 921,600 clocks of 1280x720 at one
// pixel per clock; see the documentation for the measured figure.
module scan_converter
  import scan_pkg::*;
#(
  parameter int unsigned W_IN        = 640,
  parameter int unsigned H_IN        = 480,
  parameter int unsigned W_OUT       = 1280,
  parameter int unsigned H_OUT       = 720,
  parameter int unsigned A_LEVEL     = 32,
  parameter int unsigned ADAPT_SHIFT = 0
) (
  input  logic clk,        // 75 MHz master clock
  input  logic rst_n,
  input  logic vga_valid,
  output logic vga_ready,
  input  rgb_t vga_pix,
  output logic out_valid,
  output rgb_t out_pix,
  output logic out_sof,
  output logic out_eol,
  output logic [5:0] out_adapt,     // {r,g,b} vertical ACC case of out_pix
  output logic       h_adapt_valid, // a horizontally scaled pixel is written
  output logic [5:0] h_adapt,       // {r,g,b} horizontal ACC case of it
  output logic [$clog2(H_IN+1)-1:0]  lines_written,
  output logic [$clog2(H_OUT+1)-1:0] lines_read
);

  localparam int unsigned X_W = $clog2(W_OUT);

  logic en25, en50, en75;

  clk_synth u_clk (.clk, .rst_n, .en25, .en50, .en75);

  // ---------------- horizontal scalar ----------------
  logic h_in_valid, h_in_ready, start_ok, line_start;
  logic h_valid, h_last;
  rgb_t h_pix;
  logic [X_W-1:0] h_addr;

  assign h_in_valid = vga_valid && en25;
  assign vga_ready  = h_in_ready && en25;

  h_scaler #(.W_IN(W_IN), .W_OUT(W_OUT), .A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_h (
    .clk, .rst_n, .en(en50), .start_ok,
    .in_valid(h_in_valid), .in_ready(h_in_ready), .in_pix(vga_pix),
    .line_start, .out_valid(h_valid), .out_pix(h_pix), .out_addr(h_addr),
    .out_last(h_last), .out_mode(h_adapt));
  assign h_adapt_valid = h_valid;

  // ---------------- control signal -------------------
  logic [1:0] wr_bank;
  logic rd_valid, rd_first, rd_last;
  logic [X_W-1:0] rd_addr;
  logic [1:0] tap_bank [NUM_LINES];
  phase_t rd_s;

  scan_ctrl #(.W_OUT(W_OUT), .H_IN(H_IN), .H_OUT(H_OUT)) u_ctrl (
    .clk, .rst_n, .en(en75),
    .start_ok, .line_start, .wr_valid(h_valid), .wr_last(h_last), .wr_bank,
    .rd_valid, .rd_addr, .tap_bank, .rd_s, .rd_first, .rd_last,
    .lines_written, .lines_read);

  // ---------------- memory ---------------------------
  rgb_t rdata [NUM_LINES];

  line_memory #(.DEPTH(W_OUT)) u_mem (
    .clk, .we(h_valid), .wbank(wr_bank), .waddr(h_addr), .wdata(h_pix),
    .re(rd_valid), .raddr(rd_addr), .rdata);

  // ---------------- vertical scalar ------------------
  v_scaler #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_v (
    .clk, .rst_n, .rd_valid, .tap_bank, .rd_s, .rd_first, .rd_last, .rdata,
    .out_valid, .out_pix, .out_sof, .out_eol, .out_mode(out_adapt));

endmodule
