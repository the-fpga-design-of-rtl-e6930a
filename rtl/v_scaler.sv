// v_scaler: vertical scalar of the scan converter.
//
// Gets, for every column of an output line, the same column of the four
// line banks (rdata) together with the bank that holds each of the taps
// f[k-1], f[k], f[k+1], f[k+2] (tap_bank) and the vertical phase s from the
// control block. It routes the banks onto the taps and runs one acc_kernel
// per colour channel, so the vertical direction gets the same adaptive
// cubic convolution as the horizontal one, with the lines as taps.
//
// Timing: the control word (rd_valid, tap_bank, s, flags) is given in the
// clock of the memory read request; the memory data arrive one clock later,
// so the control word is delayed by one clock to meet them. The output
// pixel comes 3 clocks after rd_valid (1 memory + 2 kernel), one per clock,
// with out_sof on the first pixel of a frame and out_eol on the last pixel
// of each line. The routing and the timing are this design's own.
module v_scaler
  import scan_pkg::*;
#(
  parameter int unsigned A_LEVEL     = 32,
  parameter int unsigned ADAPT_SHIFT = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rd_valid,
  input  logic [1:0] tap_bank [NUM_LINES],
  input  phase_t rd_s,
  input  logic   rd_first,
  input  logic   rd_last,
  input  rgb_t   rdata [NUM_LINES],
  output logic   out_valid,
  output rgb_t   out_pix,
  output logic   out_sof,
  output logic   out_eol,
  output logic [5:0] out_mode
);

  // control word aligned with the memory data
  logic       v_q, first_q, last_q;
  logic [1:0] bank_q [NUM_LINES];
  phase_t     s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= rd_valid;
  end

  always_ff @(posedge clk) begin
    bank_q  <= tap_bank;
    s_q     <= rd_s;
    first_q <= rd_first;
    last_q  <= rd_last;
  end

  rgb_t  tp [NUM_LINES];
  taps_t kt_r, kt_g, kt_b;
  always_comb begin
    for (int t = 0; t < NUM_LINES; t++) tp[t] = rdata[bank_q[t]];
    kt_r = '{m1: tp[0].r, p0: tp[1].r, p1: tp[2].r, p2: tp[3].r};
    kt_g = '{m1: tp[0].g, p0: tp[1].g, p1: tp[2].g, p2: tp[3].g};
    kt_b = '{m1: tp[0].b, p0: tp[1].b, p1: tp[2].b, p2: tp[3].b};
  end

  logic kv_r, kv_g, kv_b;
  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_r (
    .clk, .rst_n, .in_valid(v_q), .in_taps(kt_r), .in_s(s_q),
    .out_valid(kv_r), .out_pix(out_pix.r), .out_mode(out_mode[5:4]));
  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_g (
    .clk, .rst_n, .in_valid(v_q), .in_taps(kt_g), .in_s(s_q),
    .out_valid(kv_g), .out_pix(out_pix.g), .out_mode(out_mode[3:2]));
  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_b (
    .clk, .rst_n, .in_valid(v_q), .in_taps(kt_b), .in_s(s_q),
    .out_valid(kv_b), .out_pix(out_pix.b), .out_mode(out_mode[1:0]));

  logic first_d [2], last_d [2];
  always_ff @(posedge clk) begin
    first_d[0] <= first_q;  first_d[1] <= first_d[0];
    last_d[0]  <= last_q;   last_d[1]  <= last_d[0];
  end

  assign out_valid = kv_r && kv_g && kv_b;   // the three run in lockstep
  assign out_sof   = out_valid && first_d[1];
  assign out_eol   = out_valid && last_d[1];

endmodule
