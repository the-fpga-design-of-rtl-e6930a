// tb_acc_kernel: self-checking test of one ACC channel. Drives directed
// cases (flat, ramp, edges that select each adaptation case, overshoot that
// must clamp, s = 0 that must return f[k]) and random taps and phases, one
// per clock with random idle clocks, and checks the pixel, the adaptation
// case and the 2-clock latency against the reference model.
module tb_acc_kernel;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int A_LEVEL = 32;
  localparam int N_RAND  = 20000;

  typedef struct {
    int m1, p0, p1, p2, s;
  } stim_t;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  taps_t in_taps;
  phase_t in_s;
  logic out_valid;
  pix_t out_pix;
  logic [1:0] out_mode;

  acc_kernel dut (.*);   // default A_LEVEL = 32

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_got = 0, n_exp = 0;
  stim_t stim_q[$];
  ref_t  exp_q[$];
  int    sent_cyc[$];
  int    cyc = 0;
  int    mode_seen [3] = '{0, 0, 0};
  int    clamp_seen = 0;
  logic  done = 0;

  function automatic void add(int m1, int p0, int p1, int p2, int s);
    stim_t st;
    st = '{m1, p0, p1, p2, s};
    stim_q.push_back(st);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // driver: one stimulus per clock, with random idle clocks in between
  always @(posedge clk) begin
    if (!rst_n || stim_q.size() == 0 || $urandom_range(0, 7) == 0) begin
      in_valid <= 1'b0;
      if (rst_n && stim_q.size() == 0) done <= 1'b1;
    end else begin
      stim_t st;
      ref_t  r;
      st = stim_q.pop_front();
      in_valid <= 1'b1;
      in_taps  <= '{m1: pix_t'(st.m1), p0: pix_t'(st.p0), p1: pix_t'(st.p1), p2: pix_t'(st.p2)};
      in_s     <= phase_t'(st.s);
      r = acc_ref(st.m1, st.p0, st.p1, st.p2, st.s, A_LEVEL, 0);
      exp_q.push_back(r);
      n_exp++;
      mode_seen[r.mode]++;
      if (r.pix == 0 || r.pix == 255) clamp_seen++;
      sent_cyc.push_back(cyc + 1);   // the DUT takes it at the next edge
    end
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ref_t r;
      int   c;
      r = exp_q.pop_front();
      c = sent_cyc.pop_front();
      checks++;
      if (out_pix != pix_t'(r.pix) || out_mode != 2'(r.mode)) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d/%0d exp %0d/%0d", out_pix, out_mode, r.pix, r.mode);
      end
      checks++;
      if (cyc - c != 2) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected 2", cyc - c);
      end
      // hand-worked values: a flat line stays 100, the ramp midpoint is 25
      if (n_got < 2) begin
        checks++;
        if (out_pix != pix_t'(n_got == 0 ? 100 : 25)) begin
          failures++; $display("hand-worked value %0d wrong: %0d", n_got, out_pix);
        end
      end
      n_got++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_taps = '0; in_s = '0;
    add(100, 100, 100, 100, 128);        // flat -> 100
    add(10, 20, 30, 40, 128);            // ramp -> 25
    add(0, 0, 255, 255, 128);            // symmetric step, plain case
    add(0, 200, 255, 255, 128);          // steep left, A > A_LEVEL
    add(0, 0, 55, 255, 128);             // steep right, A < -A_LEVEL
    add(255, 0, 255, 0, 85);             // strong overshoot
    add(0, 255, 0, 255, 170);
    for (int ph = 0; ph < 256; ph += 17) add(37, 90, 201, 14, ph);
    for (int i = 0; i < 50; i++)         // s = 0 returns f[k]
      add($urandom_range(0, 255), 60 + i, $urandom_range(0, 255), $urandom_range(0, 255), 0);
    for (int i = 0; i < N_RAND; i++)
      add($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255),
          $urandom_range(0, 255), $urandom_range(0, 255));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (n_got != n_exp || exp_q.size() != 0) begin
      failures++; $display("lost outputs: %0d of %0d", n_got, n_exp);
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("adaptation case %0d never exercised", m); end
    end
    checks++;
    if (clamp_seen == 0) begin failures++; $display("clamp never exercised"); end
    $display("adaptation cases plain/pos/neg = %0d/%0d/%0d, clamped %0d",
             mode_seen[0], mode_seen[1], mode_seen[2], clamp_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
