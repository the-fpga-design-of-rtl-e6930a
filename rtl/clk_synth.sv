// clk_synth: rate generator for the three pixel rates of the scan converter.
//
// The design needs 25 MHz (VGA input pixels), 50 MHz (horizontal scalar
// output, two pixels per input pixel) and 75 MHz (720p output pixels). This
// block runs on one 75 MHz master clock and gives the three rates as clock
// enables: en75 on every clock, en50 on two clocks of every three, en25 on
// one clock of every three, with en25 always inside en50. Every block then
// runs on the one master clock, so no clock-domain crossing is needed.
// A frequency synthesizer that tunes clock phases with delay cells is
// process-specific; this block provides its rates and phase relation only,
// as synchronous enables, which is this design's own choice.
//
// Timing: a modulo-3 counter cleared by reset; the enables are registered.
module clk_synth (
  input  logic clk,     // 75 MHz master clock
  input  logic rst_n,
  output logic en25,
  output logic en50,
  output logic en75
);

  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= 2'd0;
      en25 <= 1'b0;
      en50 <= 1'b0;
      en75 <= 1'b0;
    end else begin
      cnt  <= (cnt == 2'd2) ? 2'd0 : cnt + 2'd1;
      en25 <= (cnt == 2'd0);
      en50 <= (cnt != 2'd2);
      en75 <= 1'b1;
    end
  end

endmodule
