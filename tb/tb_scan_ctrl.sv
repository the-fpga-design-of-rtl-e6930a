// tb_scan_ctrl: self-checking test of the control-signal block at its
// default sizes (1280-pixel lines, 480 -> 720 lines), over two frames.
// A writer model plays the horizontal scalar: it begins a line whenever
// start_ok allows and writes its 1280 pixels at a random rate below one
// per clock. A shadow of the four banks records which line each column
// holds. For every read the test checks that each tap's bank holds, at
// that column, the line the vertical filter needs (k-1..k+2, clamped),
// that the phase is right, and the frame and line flags. It also counts
// reads that run while the same bank is being rewritten behind them,
// and clocks where the writer is held off.
module tb_scan_ctrl;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int W_OUT = 1280;
  localparam int H_IN  = 480;
  localparam int H_OUT = 720;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic en, start_ok, line_start, wr_valid, wr_last;
  logic [1:0] wr_bank;
  logic rd_valid, rd_first, rd_last;
  logic [$clog2(W_OUT)-1:0] rd_addr;
  logic [1:0] tap_bank [NUM_LINES];
  phase_t rd_s;
  logic [$clog2(H_IN+1)-1:0]  lines_written;
  logic [$clog2(H_OUT+1)-1:0] lines_read;

  scan_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int shadow [NUM_LINES][W_OUT];   // frame*1000 + line held at each column
  int wr_frame = 0, wr_line = 0, wr_x = 0;
  logic writing = 0;
  int rd_frame = 0, rd_j = 0, rd_x = 0;
  int overlap = 0, held = 0;

  initial for (int b = 0; b < NUM_LINES; b++) for (int a = 0; a < W_OUT; a++) shadow[b][a] = -1;

  // writer model: wr_x is the next column to issue, wr_a the column on
  // the wr_valid now presented
  int wr_a = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      line_start <= 0; wr_valid <= 0; wr_last <= 0;
    end else begin
      if (wr_valid) begin
        shadow[wr_bank][wr_a] = wr_frame * 1000 + wr_line;
        if (wr_last) begin
          writing = 0;
          if (wr_line == H_IN - 1) begin wr_line = 0; wr_frame++; end
          else wr_line++;
        end
      end
      line_start <= 0; wr_valid <= 0; wr_last <= 0;
      if (!writing && wr_frame < FRAMES) begin
        if (start_ok && !line_start) begin
          line_start <= 1; writing = 1; wr_x = 0;
        end else if (!line_start) held++;
      end else if (writing && !line_start && wr_x < W_OUT && $urandom_range(0, 2) != 0) begin
        wr_valid <= 1;
        wr_last  <= (wr_x == W_OUT - 1);
        wr_a     <= wr_x;
        wr_x++;
      end
    end
  end

  // read checker
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      int k, want, s;
      k = pos_k(rd_j, H_IN, H_OUT);
      s = pos_s(rd_j, H_IN, H_OUT);
      for (int t = 0; t < NUM_LINES; t++) begin
        want = rd_frame * 1000 + clampi(k - 1 + t, 0, H_IN - 1);
        checks++;
        if (shadow[tap_bank[t]][rd_addr] != want) begin
          failures++;
          if (failures < 10) $display("frame %0d line %0d x %0d tap %0d: bank %0d holds %0d, want %0d",
                                      rd_frame, rd_j, rd_x, t, tap_bank[t], shadow[tap_bank[t]][rd_addr], want);
        end
        if (writing && wr_bank == tap_bank[t]) overlap++;
      end
      checks++;
      if (rd_s != phase_t'(s) || rd_addr != $bits(rd_addr)'(rd_x) ||
          rd_first != (rd_j == 0 && rd_x == 0) || rd_last != (rd_x == W_OUT - 1)) begin
        failures++;
        if (failures < 10) $display("line %0d x %0d: s %0d/%0d addr %0d", rd_j, rd_x, rd_s, s, rd_addr);
      end
      if (rd_x == W_OUT - 1) begin
        rd_x = 0;
        if (rd_j == H_OUT - 1) begin rd_j = 0; rd_frame++; end
        else rd_j++;
      end else rd_x++;
    end
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rd_frame == FRAMES);
    repeat (5) @(posedge clk);
    checks++;
    if (overlap == 0) begin failures++; $display("no read ran over a bank being rewritten"); end
    checks++;
    if (held == 0) begin failures++; $display("writer never held off"); end
    checks++;
    if (lines_read != 0 || lines_written != 0) begin failures++; $display("counters not back at frame start"); end
    $display("overlapped reads %0d, writer held %0d clocks", overlap, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
