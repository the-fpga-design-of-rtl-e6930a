// tb_v_scaler: self-checking test of the vertical scalar. Each clock it
// presents a random control word (tap-to-bank routing, phase, flags) and,
// one clock later, random data in the four banks, as the line memory
// would. The output pixel, its adaptation case and its flags are checked
// against the reference model, and so is the 3-clock latency from
// rd_valid to out_valid.
module tb_v_scaler;
  import scan_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 20000;
  localparam int A_LEVEL = 32;

  logic clk = 0, rst_n = 0;
  logic rd_valid, rd_first, rd_last;
  logic [1:0] tap_bank [NUM_LINES];
  phase_t rd_s;
  rgb_t rdata [NUM_LINES];
  logic out_valid, out_sof, out_eol;
  rgb_t out_pix;
  logic [5:0] out_mode;

  v_scaler dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    rgb_t pix; logic [5:0] mode; logic sof, eol; int cyc;
  } exp_t;

  int checks = 0, failures = 0, cyc = 0, sent = 0, got = 0;
  exp_t exp_q[$];
  logic [1:0] bank_d [NUM_LINES];
  phase_t s_d;
  logic v_d, f_d, l_d;
  int   rv_cyc;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst_n) begin
      rd_valid <= 0; v_d <= 0;
    end else begin
      rgb_t dat [NUM_LINES];
      // data for the request of the previous clock
      for (int b = 0; b < NUM_LINES; b++) dat[b] = rgb_t'(24'($urandom));
      if ($urandom_range(0, 1) == 0)   // sometimes smooth, to hit the plain case
        for (int b = 1; b < NUM_LINES; b++) dat[b] = dat[0];
      rdata <= dat;
      if (v_d) begin
        exp_t e;
        ref_t rr, rg, rb;
        rr = acc_ref(dat[bank_d[0]].r, dat[bank_d[1]].r, dat[bank_d[2]].r, dat[bank_d[3]].r, s_d, A_LEVEL, 0);
        rg = acc_ref(dat[bank_d[0]].g, dat[bank_d[1]].g, dat[bank_d[2]].g, dat[bank_d[3]].g, s_d, A_LEVEL, 0);
        rb = acc_ref(dat[bank_d[0]].b, dat[bank_d[1]].b, dat[bank_d[2]].b, dat[bank_d[3]].b, s_d, A_LEVEL, 0);
        e.pix  = '{r: pix_t'(rr.pix), g: pix_t'(rg.pix), b: pix_t'(rb.pix)};
        e.mode = {2'(rr.mode), 2'(rg.mode), 2'(rb.mode)};
        e.sof = f_d; e.eol = l_d; e.cyc = rv_cyc + 3;
        exp_q.push_back(e);
      end
      // new control word
      v_d <= 0;
      if (sent < N && $urandom_range(0, 5) != 0) begin
        logic [1:0] bk [NUM_LINES];
        phase_t s;
        logic f, l;
        for (int t = 0; t < NUM_LINES; t++) bk[t] = 2'($urandom);
        s = phase_t'($urandom);
        f = ($urandom_range(0, 9) == 0);
        l = ($urandom_range(0, 9) == 0);
        rd_valid <= 1; tap_bank <= bk; rd_s <= s; rd_first <= f; rd_last <= l;
        v_d <= 1; bank_d <= bk; s_d <= s; f_d <= f; l_d <= l;
        rv_cyc <= cyc + 1;     // clock in which the DUT sees rd_valid
        sent++;
      end else rd_valid <= 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_pix != e.pix || out_mode != e.mode || out_sof != e.sof || out_eol != e.eol) begin
        failures++;
        if (failures < 10) $display("got %h/%h exp %h/%h", out_pix, out_mode, e.pix, e.mode);
      end
      checks++;
      if (cyc != e.cyc) begin
        failures++;
        if (failures < 10) $display("latency: at %0d, expected %0d", cyc, e.cyc);
      end
      got++;
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
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent == N);
    repeat (8) @(posedge clk);
    checks++;
    if (got != N) begin failures++; $display("got %0d of %0d", got, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
