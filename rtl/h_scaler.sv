// h_scaler: horizontal scalar of the scan converter.
//
// Takes one video line of W_IN RGB pixels and produces W_OUT pixels
// (640 -> 1280 by default, the 2:1 horizontal ratio of VGA to 720p). The
// four filter taps f[k-1], f[k], f[k+1], f[k+2] are a shift register of
// pixel registers, as in the 4-tap FIR structure: each accepted input
// pixel shifts in at the f[k+2] end. One acc_kernel per colour channel
// computes the output pixels.
//
// Output pixel i is placed at input position i*W_IN/W_OUT: the integer part
// k selects the window, the remainder gives the phase s (a DDA with an exact
// remainder, turned into s by a constant reciprocal multiply). At the left
// edge the register is preloaded with pixel 0; at the right edge the last
// pixel is shifted in again, so the taps outside the line repeat the edge
// pixel. Both edge rules, the DDA and the handshake are this design's own.
//
// Interface: in_valid/in_ready handshake on in_pix, advanced only on cycles
// with en high (the 50 MHz rate of the clock synthesizer). A new line is
// begun only while start_ok is high; line_start pulses when its first
// pixel is taken. Outputs: out_valid with out_pix, out_addr (0..W_OUT-1)
// and out_last on the last pixel, 2 clocks after the output was decided,
// never back-pressured. Up to one output per enabled cycle; the last
// output of a window waits for the next input pixel when one is needed.
module h_scaler
  import scan_pkg::*;
#(
  parameter int unsigned W_IN        = 640,
  parameter int unsigned W_OUT       = 1280,
  parameter int unsigned A_LEVEL     = 32,
  parameter int unsigned ADAPT_SHIFT = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   start_ok,
  input  logic   in_valid,
  output logic   in_ready,
  input  rgb_t   in_pix,
  output logic   line_start,
  output logic   out_valid,
  output rgb_t   out_pix,
  output logic [$clog2(W_OUT)-1:0] out_addr,
  output logic   out_last,
  output logic [5:0] out_mode   // {r,g,b} adaptation cases of acc_kernel
);

  localparam int unsigned XI_W = $clog2(W_IN + 1);
  localparam int unsigned XO_W = $clog2(W_OUT);
  localparam int unsigned RM_W = $clog2(W_OUT + W_IN);
  localparam logic [39:0] RECIP = phase_recip(W_OUT);

  // Pixel shift register: tap[0]=f[k-1], tap[1]=f[k], tap[2]=f[k+1], tap[3]=f[k+2]
  rgb_t tap [4];

  typedef enum logic [1:0] {S_LOAD, S_EMIT} state_t;
  state_t state;

  logic [1:0]      load_cnt;   // pixels loaded in S_LOAD
  logic [XI_W-1:0] kc;         // window centre k
  logic [XO_W-1:0] oi;         // index of the next output pixel
  logic [RM_W-1:0] rem;        // phase numerator, 0 <= rem < W_OUT

  logic [RM_W-1:0] rem_next;
  logic            k_step;     // next output lies in the next window
  logic            last_out;
  logic            need_in;    // the next window needs a fresh input pixel
  logic            emit, shift, take;
  phase_t          s_cur;
  logic [XI_W+RM_W+40-1:0] s_prod;

  always_comb begin
    rem_next = rem + RM_W'(W_IN);
    k_step   = (rem_next >= RM_W'(W_OUT));
    last_out = (oi == XO_W'(W_OUT - 1));
    need_in  = (32'(kc) + 32'd3 <= 32'(W_IN - 1));
    s_prod   = (XI_W+RM_W+40)'(rem) * (XI_W+RM_W+40)'(RECIP);
    s_cur    = phase_t'(s_prod >> 24);

    in_ready = 1'b0;
    emit     = 1'b0;
    shift    = 1'b0;
    if (en) begin
      if (state == S_LOAD) begin
        in_ready = (load_cnt != 2'd0) || start_ok;
      end else begin
        if (last_out || !k_step) begin
          emit = 1'b1;
        end else if (!need_in) begin
          emit  = 1'b1;
          shift = 1'b1;     // shift the edge pixel in again
        end else begin
          in_ready = 1'b1;
          emit     = in_valid;
          shift    = in_valid;
        end
      end
    end
    take       = in_ready && in_valid;
    line_start = take && (state == S_LOAD) && (load_cnt == 2'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      load_cnt <= '0;
      kc       <= '0;
      oi       <= '0;
      rem      <= '0;
    end else if (state == S_LOAD) begin
      if (take) begin
        if (load_cnt == 2'd2) begin
          state    <= S_EMIT;
          load_cnt <= '0;
          kc       <= '0;
          oi       <= '0;
          rem      <= '0;
        end else begin
          load_cnt <= load_cnt + 2'd1;
        end
      end
    end else if (emit) begin
      if (last_out) begin
        state <= S_LOAD;
      end else begin
        oi  <= oi + XO_W'(1);
        rem <= k_step ? rem_next - RM_W'(W_OUT) : rem_next;
        if (k_step) kc <= kc + XI_W'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && take) begin
      if (load_cnt == 2'd0) begin
        for (int t = 0; t < 4; t++) tap[t] <= in_pix;
      end else begin
        tap[0] <= tap[1]; tap[1] <= tap[2]; tap[2] <= tap[3]; tap[3] <= in_pix;
      end
    end else if (shift) begin
      tap[0] <= tap[1]; tap[1] <= tap[2]; tap[2] <= tap[3];
      tap[3] <= need_in ? in_pix : tap[3];
    end
  end

  // One ACC kernel per colour channel.
  taps_t kt_r, kt_g, kt_b;
  logic  kv_r, kv_g, kv_b;
  always_comb begin
    kt_r = '{m1: tap[0].r, p0: tap[1].r, p1: tap[2].r, p2: tap[3].r};
    kt_g = '{m1: tap[0].g, p0: tap[1].g, p1: tap[2].g, p2: tap[3].g};
    kt_b = '{m1: tap[0].b, p0: tap[1].b, p1: tap[2].b, p2: tap[3].b};
  end

  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_r (
    .clk, .rst_n, .in_valid(emit), .in_taps(kt_r), .in_s(s_cur),
    .out_valid(kv_r), .out_pix(out_pix.r), .out_mode(out_mode[5:4]));
  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_g (
    .clk, .rst_n, .in_valid(emit), .in_taps(kt_g), .in_s(s_cur),
    .out_valid(kv_g), .out_pix(out_pix.g), .out_mode(out_mode[3:2]));
  acc_kernel #(.A_LEVEL(A_LEVEL), .ADAPT_SHIFT(ADAPT_SHIFT)) u_k_b (
    .clk, .rst_n, .in_valid(emit), .in_taps(kt_b), .in_s(s_cur),
    .out_valid(kv_b), .out_pix(out_pix.b), .out_mode(out_mode[1:0]));

  // Address and last flag follow the kernels' 2-clock latency.
  logic [XO_W-1:0] addr_d [2];
  logic            last_d [2];
  always_ff @(posedge clk) begin
    addr_d[0] <= oi;
    last_d[0] <= emit && last_out;
    addr_d[1] <= addr_d[0];
    last_d[1] <= last_d[0];
  end
  assign out_valid = kv_r && kv_g && kv_b;   // the three run in lockstep
  assign out_addr  = addr_d[1];
  assign out_last  = kv_r && last_d[1];

  initial assert (W_IN >= 3 && W_IN <= W_OUT)
    else $error("h_scaler: needs 3 <= W_IN <= W_OUT");

endmodule
