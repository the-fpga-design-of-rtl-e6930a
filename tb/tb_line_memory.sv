// tb_line_memory: self-checking test of the four-bank line store at its
// default depth (1280). Fills every bank with a distinct pattern, reads all
// four banks per column and checks the data and the one-clock read
// latency; then overwrites a bank behind a running read (write address
// below the read address, as the scan converter does) and checks that the
// read sees the old line and later reads see the new one.
module tb_line_memory;
  import scan_pkg::*;

  localparam int DEPTH = 1280;

  logic clk = 0;
  logic we, re;
  logic [1:0] wbank;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  rgb_t wdata;
  rgb_t rdata [NUM_LINES];

  line_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic rgb_t pat(int b, int a, int gen);
    return rgb_t'(24'((a * 2654435761 + b * 40503 + gen * 977) >> 3));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; waddr = 0; raddr = 0; wdata = '0;
    @(negedge clk);
    for (int b = 0; b < NUM_LINES; b++)
      for (int a = 0; a < DEPTH; a++) begin
        we = 1; wbank = 2'(b); waddr = $bits(waddr)'(a); wdata = pat(b, a, 0);
        @(negedge clk);
      end
    we = 0;
    // read every column of all banks; data one clock after re
    for (int a = 0; a < DEPTH; a++) begin
      re = 1; raddr = $bits(raddr)'(a);
      @(negedge clk);
      re = 0;
      for (int b = 0; b < NUM_LINES; b++) begin
        checks++;
        if (rdata[b] != pat(b, a, 0)) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d: %h", b, a, rdata[b]);
        end
      end
    end
    // hold: data stay while re is low
    @(negedge clk);
    checks++;
    if (rdata[0] != pat(0, DEPTH - 1, 0)) failures++;
    // read bank 2 column by column while writing a new line into it behind
    for (int a = 0; a < DEPTH; a++) begin
      re = 1; raddr = $bits(raddr)'(a);
      we = (a >= 5); wbank = 2'd2; waddr = $bits(waddr)'((a >= 5) ? a - 5 : 0); wdata = pat(2, a - 5, 1);
      @(negedge clk);
      checks++;
      if (rdata[2] != pat(2, a, 0)) begin
        failures++;
        if (failures < 10) $display("read-ahead addr %0d: %h", a, rdata[2]);
      end
    end
    re = 0; we = 0;
    for (int a = 0; a < DEPTH - 5; a++) begin
      re = 1; raddr = $bits(raddr)'(a);
      @(negedge clk);
      checks++;
      if (rdata[2] != pat(2, a, 1) || rdata[1] != pat(1, a, 0)) begin
        failures++;
        if (failures < 10) $display("rewritten addr %0d: %h", a, rdata[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
