// tb_h_scaler: self-checking test of the horizontal scalar at its default
// size (640 -> 1280). Sends random RGB lines with sharp edges, first with
// random input gaps, random start permission and random enables, then at
// the nominal rates (enable on 2 of 3 clocks, input on 1 of 3) where a
// line must take no more than 1920 clocks plus a short fill. Every output
// pixel, its address and the end-of-line flag are checked against the
// reference model with edge replication at both ends of the line.
module tb_h_scaler;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int W_IN  = 640;
  localparam int W_OUT = 1280;
  localparam int A_LEVEL = 32;
  localparam int N_RANDOM_LINES = 6;
  localparam int N_RATE_LINES   = 3;
  localparam int N_LINES = N_RANDOM_LINES + N_RATE_LINES;

  logic clk = 0, rst_n = 0;
  logic en, start_ok, in_valid, in_ready, line_start, out_valid, out_last;
  rgb_t in_pix, out_pix;
  logic [$clog2(W_OUT)-1:0] out_addr;
  logic [5:0] out_mode;

  h_scaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  rgb_t line [N_LINES][W_IN];
  int in_line = 0, in_x = 0;
  int out_line = 0, out_x = 0;
  logic rate_phase = 0;
  int   start_cyc [N_LINES];
  int   mode_seen [3] = '{0, 0, 0};
  int   edge_reps = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // stimulus
  initial begin
    for (int l = 0; l < N_LINES; l++) begin
      int v;
      v = $urandom_range(0, 255);
      for (int x = 0; x < W_IN; x++) begin
        if ($urandom_range(0, 15) == 0) v = $urandom_range(0, 255);   // edges
        else v = clampi(v + $urandom_range(0, 6) - 3, 0, 255);
        line[l][x] = '{r: pix_t'(v), g: pix_t'($urandom_range(0, 255)), b: pix_t'(255 - v)};
      end
    end
  end

  // driver
  always @(posedge clk) begin
    if (!rst_n) begin
      en <= 0; start_ok <= 0; in_valid <= 0; in_pix <= '0;
    end else begin
      logic take;
      take = in_valid && in_ready;
      if (take) begin
        if (in_x == W_IN - 1) begin in_x = 0; in_line++; end
        else in_x++;
      end
      rate_phase <= (in_line >= N_RANDOM_LINES);
      if (in_line >= N_RANDOM_LINES) begin
        en       <= ((cyc + 1) % 3) != 2;
        in_valid <= (in_line < N_LINES) && (((cyc + 1) % 3) == 0);
        start_ok <= 1'b1;
      end else begin
        en       <= $urandom_range(0, 3) != 0;
        in_valid <= $urandom_range(0, 2) != 0;
        start_ok <= $urandom_range(0, 1) != 0;
      end
      if (in_line < N_LINES) in_pix <= line[in_line][in_x];
    end
  end

  always @(posedge clk) if (rst_n && line_start) start_cyc[in_line] = cyc;

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k, s;
      rgb_t e;
      ref_t rr, rg, rb;
      k = pos_k(out_x, W_IN, W_OUT);
      s = pos_s(out_x, W_IN, W_OUT);
      if (k + 2 > W_IN - 1 || k == 0) edge_reps++;
      rr = acc_ref(line[out_line][clampi(k-1,0,W_IN-1)].r, line[out_line][k].r,
                   line[out_line][clampi(k+1,0,W_IN-1)].r, line[out_line][clampi(k+2,0,W_IN-1)].r, s, A_LEVEL, 0);
      rg = acc_ref(line[out_line][clampi(k-1,0,W_IN-1)].g, line[out_line][k].g,
                   line[out_line][clampi(k+1,0,W_IN-1)].g, line[out_line][clampi(k+2,0,W_IN-1)].g, s, A_LEVEL, 0);
      rb = acc_ref(line[out_line][clampi(k-1,0,W_IN-1)].b, line[out_line][k].b,
                   line[out_line][clampi(k+1,0,W_IN-1)].b, line[out_line][clampi(k+2,0,W_IN-1)].b, s, A_LEVEL, 0);
      e = '{r: pix_t'(rr.pix), g: pix_t'(rg.pix), b: pix_t'(rb.pix)};
      mode_seen[rr.mode]++;
      checks++;
      if (out_pix != e || out_mode != {2'(rr.mode), 2'(rg.mode), 2'(rb.mode)}) begin
        failures++;
        if (failures < 10) $display("line %0d x %0d: got %h exp %h", out_line, out_x, out_pix, e);
      end
      checks++;
      if (out_addr != $bits(out_addr)'(out_x) || out_last != (out_x == W_OUT - 1)) begin
        failures++;
        if (failures < 10) $display("line %0d x %0d: addr %0d last %b", out_line, out_x, out_addr, out_last);
      end
      if (out_x == W_OUT - 1) begin
        if (out_line >= N_RANDOM_LINES + 1) begin
          // nominal rates: 1280 outputs at 2 per 3 clocks, plus the fill
          checks++;
          if (cyc - start_cyc[out_line] > 3 * W_IN + 12) begin
            failures++;
            $display("line %0d took %0d clocks", out_line, cyc - start_cyc[out_line]);
          end else
            $display("line %0d took %0d clocks at the nominal rates", out_line, cyc - start_cyc[out_line]);
        end
        out_x = 0; out_line++;
      end else out_x++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (out_line == N_LINES);
    repeat (5) @(posedge clk);
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("adaptation case %0d never seen", m); end
    end
    checks++;
    if (edge_reps == 0) begin failures++; $display("edge replication never used"); end
    $display("adaptation plain/pos/neg %0d/%0d/%0d, edge outputs %0d",
             mode_seen[0], mode_seen[1], mode_seen[2], edge_reps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
