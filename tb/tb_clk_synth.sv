// tb_clk_synth: self-checking test of the rate generator. Over 3000 master
// clocks it counts the enables (the 25 / 50 / 75 MHz rates are 1/3, 2/3
// and 3/3 of the 75 MHz clock), checks that each 3-clock window has
// exactly one en25 and two en50, and that en25 never comes without en50.
module tb_clk_synth;

  logic clk = 0, rst_n = 0;
  logic en25, en50, en75;

  clk_synth dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n25 = 0, n50 = 0, n75 = 0, n = 0;
  logic [2:0] h25 = 0, h50 = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);   // first registered enables
    repeat (3000) begin
      @(negedge clk);
      n++;
      n25 += int'(en25); n50 += int'(en50); n75 += int'(en75);
      h25 = {h25[1:0], en25};
      h50 = {h50[1:0], en50};
      if (n >= 3) begin
        checks++;
        if ($countones(h25) != 1 || $countones(h50) != 2) failures++;
      end
      checks++;
      if (en25 && !en50) failures++;
    end
    checks++;
    if (n25 != 1000 || n50 != 2000 || n75 != 3000) begin
      failures++;
      $display("counts %0d %0d %0d", n25, n50, n75);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
