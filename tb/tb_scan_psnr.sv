// tb_scan_psnr: the up-scaling-by-2 quality test. A synthetic 512x512 RGB
// picture (sigmoid edges with c = 3 and c = 4, letter-like strokes, a
// ramp and noise) is down-sampled by 2 to 256x256, sent through two scan
// converters set to 256x256 -> 512x512, and compared with the original:
//   u_acc : adaptive cubic convolution, A_LEVEL = 32
//   u_cub : A_LEVEL = 255, so the adaptation never fires (plain cubic
//           convolution with a = -1/2, the usual bicubic baseline)
// Every output pixel of both is checked against the reference model; the
// PSNR of each against the 512x512 original is printed for information.
module tb_scan_psnr;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_IN = 256, N_OUT = 512;

  logic clk = 0, rst_n = 0;
  logic vga_valid;
  rgb_t vga_pix;
  logic [1:0] vv, ready, ov, sof, eol, hv;
  rgb_t opix [2];
  logic [5:0] oad [2], had [2];
  logic [$clog2(N_IN+1)-1:0]  lw [2];
  logic [$clog2(N_OUT+1)-1:0] lr [2];

  scan_converter #(.W_IN(N_IN), .H_IN(N_IN), .W_OUT(N_OUT), .H_OUT(N_OUT), .A_LEVEL(32)) u_acc (
    .clk, .rst_n, .vga_valid(vv[0]), .vga_ready(ready[0]), .vga_pix,
    .out_valid(ov[0]), .out_pix(opix[0]), .out_sof(sof[0]), .out_eol(eol[0]),
    .out_adapt(oad[0]), .h_adapt_valid(hv[0]), .h_adapt(had[0]),
    .lines_written(lw[0]), .lines_read(lr[0]));
  scan_converter #(.W_IN(N_IN), .H_IN(N_IN), .W_OUT(N_OUT), .H_OUT(N_OUT), .A_LEVEL(255)) u_cub (
    .clk, .rst_n, .vga_valid(vv[1]), .vga_ready(ready[1]), .vga_pix,
    .out_valid(ov[1]), .out_pix(opix[1]), .out_sof(sof[1]), .out_eol(eol[1]),
    .out_adapt(oad[1]), .h_adapt_valid(hv[1]), .h_adapt(had[1]),
    .lines_written(lw[1]), .lines_read(lr[1]));

  always #5 clk = ~clk;

  rgb_t orig [N_OUT][N_OUT];
  rgb_t src  [N_IN][N_IN];
  rgb_t hs   [N_IN][N_OUT];
  rgb_t expv [2][N_OUT][N_OUT];

  int checks = 0, failures = 0;
  int in_y = 0, in_x = 0;
  int ox [2] = '{0, 0}, oy [2] = '{0, 0};
  logic [1:0] done = 0;
  real  sse [2] = '{0.0, 0.0};
  int   adapted = 0;

  function automatic int sigmoid(real x, real c);
    return int'(255.0 / (1.0 + $exp(-c * x)));
  endfunction

  task automatic build();
    for (int y = 0; y < N_OUT; y++)
      for (int x = 0; x < N_OUT; x++) begin
        int r, g, b;
        r = sigmoid(real'(x - 150) / 6.0, 3.0);
        g = sigmoid(real'(y - 300) / 6.0, 4.0);
        b = ((x + y) * 255) / (2 * N_OUT - 2);
        // strokes of a few pixels, like printed letters
        if ((x % 48) >= 20 && (x % 48) < 24 && y >= 40 && y < 200) begin r = 0; g = 0; b = 0; end
        if ((y % 40) >= 10 && (y % 40) < 13 && x >= 300 && x < 480) begin r = 0; g = 0; b = 0; end
        if (x > 400) g = clampi(g + $urandom_range(0, 20) - 10, 0, 255);
        orig[y][x] = '{r: pix_t'(r), g: pix_t'(g), b: pix_t'(b)};
      end
    for (int y = 0; y < N_IN; y++)
      for (int x = 0; x < N_IN; x++) src[y][x] = orig[2*y][2*x];
    for (int d = 0; d < 2; d++) begin
      int lev;
      lev = (d == 0) ? 32 : 255;
      for (int y = 0; y < N_IN; y++)
        for (int i = 0; i < N_OUT; i++) begin
          int k, s, a, b2, c;
          k = pos_k(i, N_IN, N_OUT); s = pos_s(i, N_IN, N_OUT);
          a = clampi(k - 1, 0, N_IN - 1); b2 = clampi(k + 1, 0, N_IN - 1); c = clampi(k + 2, 0, N_IN - 1);
          hs[y][i].r = pix_t'(acc_ref(src[y][a].r, src[y][k].r, src[y][b2].r, src[y][c].r, s, lev, 0).pix);
          hs[y][i].g = pix_t'(acc_ref(src[y][a].g, src[y][k].g, src[y][b2].g, src[y][c].g, s, lev, 0).pix);
          hs[y][i].b = pix_t'(acc_ref(src[y][a].b, src[y][k].b, src[y][b2].b, src[y][c].b, s, lev, 0).pix);
        end
      for (int j = 0; j < N_OUT; j++) begin
        int k, s, a, b2, c;
        k = pos_k(j, N_IN, N_OUT); s = pos_s(j, N_IN, N_OUT);
        a = clampi(k - 1, 0, N_IN - 1); b2 = clampi(k + 1, 0, N_IN - 1); c = clampi(k + 2, 0, N_IN - 1);
        for (int i = 0; i < N_OUT; i++) begin
          expv[d][j][i].r = pix_t'(acc_ref(hs[a][i].r, hs[k][i].r, hs[b2][i].r, hs[c][i].r, s, lev, 0).pix);
          expv[d][j][i].g = pix_t'(acc_ref(hs[a][i].g, hs[k][i].g, hs[b2][i].g, hs[c][i].g, s, lev, 0).pix);
          expv[d][j][i].b = pix_t'(acc_ref(hs[a][i].b, hs[k][i].b, hs[b2][i].b, hs[c][i].b, s, lev, 0).pix);
        end
      end
    end
  endtask

  // one source feeds both converters; a pixel moves on when both took it
  logic [1:0] took;
  always @(posedge clk) begin
    if (!rst_n) begin
      vga_valid <= 0; took <= 0; vga_pix <= '0;
    end else begin
      logic [1:0] t;
      t = took | (ready & vv);
      if (t == 2'b11) begin
        t = 0;
        if (in_x == N_IN - 1) begin in_x = 0; in_y++; end else in_x++;
      end
      took <= t;
      vga_valid <= (in_y < N_IN);
      if (in_y < N_IN) vga_pix <= src[in_y][in_x];
    end
  end

  // a converter that already took the pixel is not offered it again
  assign vv = {2{vga_valid}} & ~took;

  for (genvar d = 0; d < 2; d++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && ov[d]) begin
        rgb_t e, o;
        e = expv[d][oy[d]][ox[d]];
        o = orig[oy[d]][ox[d]];
        checks++;
        if (opix[d] != e) begin
          failures++;
          if (failures < 10) $display("dut %0d (%0d,%0d): got %h exp %h", d, ox[d], oy[d], opix[d], e);
        end
        if (d == 0 && oad[0] != 0) adapted++;
        sse[d] += (real'(opix[d].r) - real'(o.r)) ** 2 + (real'(opix[d].g) - real'(o.g)) ** 2
                + (real'(opix[d].b) - real'(o.b)) ** 2;
        if (ox[d] == N_OUT - 1) begin
          ox[d] = 0;
          if (oy[d] == N_OUT - 1) done[d] = 1'b1; else oy[d]++;
        end else ox[d]++;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 2'b11);
    repeat (5) @(posedge clk);
    checks++;
    if (adapted == 0) begin failures++; $display("the adaptation never fired"); end
    for (int d = 0; d < 2; d++) begin
      real mse;
      mse = sse[d] / real'(3 * N_OUT * N_OUT);
      $display("%s: PSNR %0.2f dB against the 512x512 original",
               d == 0 ? "ACC (A_LEVEL 32)   " : "cubic, no adaption", 10.0 * $log10(255.0 * 255.0 / mse));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
