// scan_ctrl: the control-signal block. Counters and comparators that decide
// which line bank the horizontal scalar writes, which banks the vertical
// scalar reads, and the memory addresses.
//
// Write side: input line n of a frame goes to bank n mod 4. A new line may
// begin (start_ok) when its bank holds no line that the vertical scalar
// still needs. Read side: output line j sits at input line position
// j*H_IN/H_OUT (integer part k, phase s); it needs lines k-1..k+2, clamped
// to the frame, and starts once line min(k+2, H_IN-1) is completely
// written. It then reads one column per enabled clock, all four banks at
// once, and gives the bank of each tap (tap_bank) and the phase.
//
// A write may start into the bank of the line that the output line being
// read uses for the last time: the read began first and moves at least
// as fast as the writes (one column per clock against at most one pixel
// per enabled clock of the horizontal scalar), so the write never catches
// it. This interleaving of reads and writes on one bank saves a fifth line
// buffer. When all H_OUT lines of a frame have been read and all H_IN
// written, both counters restart for the next frame.
//
// The 4-bank store and the use of counters and compares follow the design;
// the exact allocation rule, the phase arithmetic and the frame handling
// are this implementation's own. Outputs rd_* are registered; the memory
// returns data one clock after rd_valid.
module scan_ctrl
  import scan_pkg::*;
#(
  parameter int unsigned W_OUT = 1280,  // pixels per scaled line
  parameter int unsigned H_IN  = 480,   // input lines per frame
  parameter int unsigned H_OUT = 720    // output lines per frame
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,                       // read-side pixel rate (75 MHz)
  // write side, from the horizontal scalar
  output logic start_ok,
  input  logic line_start,
  input  logic wr_valid,
  input  logic wr_last,
  output logic [1:0] wr_bank,
  // read side, to the line memory and the vertical scalar
  output logic rd_valid,
  output logic [$clog2(W_OUT)-1:0] rd_addr,
  output logic [1:0] tap_bank [NUM_LINES],
  output phase_t rd_s,
  output logic rd_first,                 // first pixel of a frame
  output logic rd_last,                  // last pixel of a line
  // status
  output logic [$clog2(H_IN+1)-1:0]  lines_written,
  output logic [$clog2(H_OUT+1)-1:0] lines_read
);

  localparam int unsigned LI_W = $clog2(H_IN + 1);
  localparam int unsigned LO_W = $clog2(H_OUT + 1);
  localparam int unsigned X_W  = $clog2(W_OUT);
  localparam int unsigned RM_W = $clog2(H_OUT + H_IN);
  localparam logic [39:0] RECIP = phase_recip(H_OUT);

  // ---------------- write side ----------------
  logic [LI_W-1:0] n_in;      // lines completely written in this frame
  logic            wr_active; // line n_in is being written

  // ---------------- read side -----------------
  logic [LO_W-1:0] j_out;     // current (or next) output line
  logic [LI_W-1:0] k_cur;     // integer position of line j_out
  logic [RM_W-1:0] rem_cur;   // phase numerator of line j_out
  logic            rd_active;
  logic [X_W-1:0]  x_rd;

  logic [RM_W-1:0] rem_nx;
  logic            kstep;
  logic [LI_W-1:0] k_nx, lo_cur, lo_nx, hi_cur, lo_free;
  logic            frame_done, rd_go;
  logic [RM_W+40-1:0] s_prod;

  function automatic logic [LI_W-1:0] lo_of(logic [LI_W-1:0] k);
    return (k == '0) ? '0 : k - LI_W'(1);
  endfunction

  always_comb begin
    rem_nx = rem_cur + RM_W'(H_IN);
    kstep  = (rem_nx >= RM_W'(H_OUT));
    k_nx   = kstep ? k_cur + LI_W'(1) : k_cur;
    lo_cur = lo_of(k_cur);
    lo_nx  = lo_of(k_nx);
    hi_cur = (32'(k_cur) + 32'd2 >= 32'(H_IN - 1)) ? LI_W'(H_IN - 1) : k_cur + LI_W'(2);
    // oldest line still needed once the current read is under way
    lo_free = rd_active ? ((j_out == LO_W'(H_OUT - 1)) ? LI_W'(H_IN) : lo_nx) : lo_cur;
    if (j_out == LO_W'(H_OUT)) lo_free = LI_W'(H_IN);

    start_ok = !wr_active && (n_in < LI_W'(H_IN)) &&
               ((n_in < LI_W'(NUM_LINES)) || (n_in - LI_W'(NUM_LINES) < lo_free));
    frame_done = (j_out == LO_W'(H_OUT)) && (n_in == LI_W'(H_IN)) && !wr_active;
    rd_go  = en && !rd_active && (j_out < LO_W'(H_OUT)) && (n_in > hi_cur);
    s_prod = (RM_W+40)'(rem_cur) * (RM_W+40)'(RECIP);
    wr_bank = n_in[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in      <= '0;
      wr_active <= 1'b0;
      j_out     <= '0;
      k_cur     <= '0;
      rem_cur   <= '0;
      rd_active <= 1'b0;
      x_rd      <= '0;
    end else begin
      // write side
      if (line_start) wr_active <= 1'b1;
      if (wr_valid && wr_last) begin
        wr_active <= 1'b0;
        n_in      <= n_in + LI_W'(1);
      end
      // read side
      if (rd_go) begin
        rd_active <= 1'b1;
        x_rd      <= '0;
      end else if (rd_active && en) begin
        if (x_rd == X_W'(W_OUT - 1)) begin
          rd_active <= 1'b0;
          j_out     <= j_out + LO_W'(1);
          k_cur     <= k_nx;
          rem_cur   <= kstep ? rem_nx - RM_W'(H_OUT) : rem_nx;
        end else begin
          x_rd <= x_rd + X_W'(1);
        end
      end
      // next frame
      if (frame_done) begin
        n_in    <= '0;
        j_out   <= '0;
        k_cur   <= '0;
        rem_cur <= '0;
      end
    end
  end

  // Registered read request: column x_rd of the four banks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_active && en;
  end

  always_ff @(posedge clk) begin
    if (rd_active && en) begin
      rd_addr  <= x_rd;
      rd_s     <= phase_t'(s_prod >> 24);
      rd_first <= (j_out == '0) && (x_rd == '0);
      rd_last  <= (x_rd == X_W'(W_OUT - 1));
      for (int t = 0; t < NUM_LINES; t++) begin
        int unsigned ln;   // line of tap t, clamped to the frame
        ln = 32'(k_cur) + 32'(t);
        if (ln < 1)                 ln = 0;
        else if (ln - 1 > H_IN - 1) ln = H_IN - 1;
        else                        ln = ln - 1;
        tap_bank[t] <= 2'(ln % NUM_LINES);
      end
    end
  end

  assign lines_written = n_in;
  assign lines_read    = j_out;

  // Rules of the line store: no line is begun without a free bank, and no
  // read starts while its oldest line is gone or being overwritten.
  assert property (@(posedge clk) disable iff (!rst_n) line_start |-> start_ok);
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_go |-> (32'(n_in) + 32'(wr_active) <= 32'(lo_cur) + 32'(NUM_LINES)));

  initial assert (NUM_LINES == 4 && H_IN >= 2 && H_IN <= H_OUT)
    else $error("scan_ctrl: needs 4 banks and 2 <= H_IN <= H_OUT");

endmodule
