// tb_scan_converter: end-to-end test of the scan converter at its default
// size: two 640x480 RGB frames in, two 1280x720 frames out, every output
// pixel compared with a reference model (separable ACC: horizontal pass
// over each input line with the edge pixel repeated, then vertical pass
// over the scaled lines with the edge lines repeated).
//
// The frames hold sigmoid edges 255/(1+exp(-c*x)) with c = 3 and c = 4,
// sharp rectangles, a ramp and noise. The source offers a pixel on every
// clock in frame 0 and on random clocks in frame 1. The test counts, and
// fails if it never sees: input held off by a full line store, source
// gaps, each of the three ACC cases in both directions, clamped outputs,
// reads over a bank being rewritten, and the restart for a second frame.
// It also checks the frame period against the bound of the line-store
// schedule.
module tb_scan_converter;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int W_IN = 640, H_IN = 480, W_OUT = 1280, H_OUT = 720;
  localparam int A_LEVEL = 32;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic vga_valid, vga_ready, out_valid, out_sof, out_eol, h_adapt_valid;
  rgb_t vga_pix, out_pix;
  logic [5:0] out_adapt, h_adapt;
  logic [$clog2(H_IN+1)-1:0]  lines_written;
  logic [$clog2(H_OUT+1)-1:0] lines_read;

  scan_converter dut (.*);

  always #5 clk = ~clk;

  rgb_t src [FRAMES][H_IN][W_IN];
  rgb_t hs  [H_IN][W_OUT];
  rgb_t ref_out [FRAMES][H_OUT][W_OUT];
  logic [5:0] ref_mode [FRAMES][H_OUT][W_OUT];

  int checks = 0, failures = 0, cyc = 0;
  int in_f = 0, in_y = 0, in_x = 0;
  int o_f = 0, o_y = 0, o_x = 0;
  int n_held = 0, n_gap = 0, n_clamp = 0, n_overlap = 0;
  int h_case [3] = '{0, 0, 0};
  int v_case [3] = '{0, 0, 0};
  int sof_cyc [FRAMES];

  function automatic int sigmoid(real x, real c);
    return int'(255.0 / (1.0 + $exp(-c * x)));
  endfunction

  function automatic rgb_t rgb3(ref_t r, ref_t g, ref_t b);
    return '{r: pix_t'(r.pix), g: pix_t'(g.pix), b: pix_t'(b.pix)};
  endfunction

  task automatic build_reference();
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H_IN; y++)
        for (int x = 0; x < W_IN; x++) begin
          int r, g, b;
          r = sigmoid(real'(x - 200 - 40 * f) / 4.0, 3.0);             // soft vertical edge
          g = sigmoid(real'(y - 240) / 4.0, 4.0);                      // soft horizontal edge
          b = (x * 255) / (W_IN - 1);                                 // ramp
          if (x >= 400 && x < 480 && y >= 100 + 10 * f && y < 180) begin r = 255 - r; g = 255; b = 0; end
          if (((x / 8 + y / 8) % 2) == 0 && x >= 520) g = 255 - g;   // checkerboard, sharp
          if (x < 100) r = clampi(r + $urandom_range(0, 60) - 30, 0, 255);
          src[f][y][x] = '{r: pix_t'(r), g: pix_t'(g), b: pix_t'(b)};
        end
      // horizontal pass
      for (int y = 0; y < H_IN; y++)
        for (int i = 0; i < W_OUT; i++) begin
          int k, s, xm, xp, xq;
          k = pos_k(i, W_IN, W_OUT); s = pos_s(i, W_IN, W_OUT);
          xm = clampi(k - 1, 0, W_IN - 1); xp = clampi(k + 1, 0, W_IN - 1); xq = clampi(k + 2, 0, W_IN - 1);
          hs[y][i] = rgb3(acc_ref(src[f][y][xm].r, src[f][y][k].r, src[f][y][xp].r, src[f][y][xq].r, s, A_LEVEL, 0),
                          acc_ref(src[f][y][xm].g, src[f][y][k].g, src[f][y][xp].g, src[f][y][xq].g, s, A_LEVEL, 0),
                          acc_ref(src[f][y][xm].b, src[f][y][k].b, src[f][y][xp].b, src[f][y][xq].b, s, A_LEVEL, 0));
        end
      // vertical pass
      for (int j = 0; j < H_OUT; j++) begin
        int k, s, ym, yp, yq;
        k = pos_k(j, H_IN, H_OUT); s = pos_s(j, H_IN, H_OUT);
        ym = clampi(k - 1, 0, H_IN - 1); yp = clampi(k + 1, 0, H_IN - 1); yq = clampi(k + 2, 0, H_IN - 1);
        for (int i = 0; i < W_OUT; i++) begin
          ref_t rr, rg, rb;
          rr = acc_ref(hs[ym][i].r, hs[k][i].r, hs[yp][i].r, hs[yq][i].r, s, A_LEVEL, 0);
          rg = acc_ref(hs[ym][i].g, hs[k][i].g, hs[yp][i].g, hs[yq][i].g, s, A_LEVEL, 0);
          rb = acc_ref(hs[ym][i].b, hs[k][i].b, hs[yp][i].b, hs[yq][i].b, s, A_LEVEL, 0);
          ref_out[f][j][i]  = rgb3(rr, rg, rb);
          ref_mode[f][j][i] = {2'(rr.mode), 2'(rg.mode), 2'(rb.mode)};
        end
      end
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // source
  always @(posedge clk) begin
    if (!rst_n) begin
      vga_valid <= 0; vga_pix <= '0;
    end else begin
      logic offer;
      if (vga_valid && vga_ready) begin
        if (in_x == W_IN - 1) begin
          in_x = 0;
          if (in_y == H_IN - 1) begin in_y = 0; in_f++; end else in_y++;
        end else in_x++;
      end
      if (vga_valid && !vga_ready && dut.en25) n_held++;
      offer = (in_f < FRAMES) && (in_f == 0 || $urandom_range(0, 4) != 0);
      if (in_f == 1 && !offer && dut.en25) n_gap++;
      vga_valid <= offer;
      if (in_f < FRAMES) vga_pix <= src[in_f][in_y][in_x];
    end
  end

  // monitors of the internal mechanisms
  always @(posedge clk) begin
    if (rst_n) begin
      if (h_adapt_valid) for (int c = 0; c < 3; c++) h_case[h_adapt[2*c +: 2]]++;
      if (dut.rd_valid && dut.u_ctrl.wr_active)
        for (int t = 0; t < NUM_LINES; t++) if (dut.tap_bank[t] == dut.wr_bank) n_overlap++;
    end
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      rgb_t e;
      e = ref_out[o_f][o_y][o_x];
      checks++;
      if (out_pix != e || out_adapt != ref_mode[o_f][o_y][o_x]) begin
        failures++;
        if (failures < 10) $display("frame %0d (%0d,%0d): got %h exp %h", o_f, o_x, o_y, out_pix, e);
      end
      checks++;
      if (out_sof != (o_x == 0 && o_y == 0) || out_eol != (o_x == W_OUT - 1)) begin
        failures++;
        if (failures < 10) $display("frame %0d (%0d,%0d): sof %b eol %b", o_f, o_x, o_y, out_sof, out_eol);
      end
      for (int c = 0; c < 3; c++) v_case[out_adapt[2*c +: 2]]++;
      if (e.r == 0 || e.r == 255 || e.g == 0 || e.g == 255) n_clamp++;
      if (out_sof) sof_cyc[o_f] = cyc;
      if (o_x == W_OUT - 1) begin
        o_x = 0;
        if (o_y == H_OUT - 1) begin
          $display("frame %0d out at clock %0d", o_f, cyc);
          o_y = 0; o_f++;
        end else o_y++;
      end else o_x++;
    end
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_reference();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (o_f == FRAMES);
    repeat (10) @(posedge clk);
    begin
      int period;
      period = sof_cyc[1] - sof_cyc[0];
      $display("frame period %0d clocks (%0d pixels out)", period, W_OUT * H_OUT);
      // the line-store schedule needs 5120 clocks per 3 output lines in
      // steady state, i.e. 1,228,800 clocks per frame, plus a fill of the
      // first lines and the frame changeover
      checks++;
      if (period > 1228800 + 4 * 3 * W_IN + 3 * W_OUT) begin
        failures++; $display("frame period too long");
      end
    end
    checks++; if (n_held == 0)    begin failures++; $display("input never held off"); end
    checks++; if (n_gap == 0)     begin failures++; $display("no source gap"); end
    checks++; if (n_clamp == 0)   begin failures++; $display("no clamped output"); end
    checks++; if (n_overlap == 0) begin failures++; $display("no read over a rewritten bank"); end
    for (int m = 0; m < 3; m++) begin
      checks++; if (h_case[m] == 0) begin failures++; $display("horizontal case %0d never", m); end
      checks++; if (v_case[m] == 0) begin failures++; $display("vertical case %0d never", m); end
    end
    checks++; if (lines_read != 0) begin failures++; $display("no restart after frame"); end
    $display("held %0d, gaps %0d, clamped %0d, overlapped reads %0d", n_held, n_gap, n_clamp, n_overlap);
    $display("horizontal cases %0d/%0d/%0d, vertical cases %0d/%0d/%0d",
             h_case[0], h_case[1], h_case[2], v_case[0], v_case[1], v_case[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
