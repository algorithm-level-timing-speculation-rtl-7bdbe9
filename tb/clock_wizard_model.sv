// clock_wizard_model: behavioural model (not synthesizable) of the
// programmable clock generator that feeds the accelerator clock domain.
//
// Software sets the target frequency in steps of 0.1 MHz (freq_100khz =
// 1250 means 125.0 MHz) and strobes reprogram. The real generator then
// loses lock, and the output clock stops for LOCK_NS before it resumes at
// the new frequency with locked high. At time zero it starts at the frequency
// on freq_100khz after one lock time. Only what a testbench needs is
// modelled: no jitter, no phase relation to any other clock.
module clock_wizard_model #(
  parameter realtime LOCK_NS = 200.0
) (
  input  logic [15:0] freq_100khz,
  input  logic        reprogram,
  output logic        clk_out,
  output logic        locked
);
  realtime half_ns;
  bit      running;

  initial begin
    clk_out = 1'b0;
    locked  = 1'b0;
    running = 1'b0;
    #(LOCK_NS);
    half_ns = 5000.0 / real'(freq_100khz);
    running = 1'b1;
    locked  = 1'b1;
  end

  always @(posedge reprogram) begin
    running = 1'b0;
    locked  = 1'b0;
    #(LOCK_NS);
    half_ns = 5000.0 / real'(freq_100khz);
    running = 1'b1;
    locked  = 1'b1;
  end

  always begin
    if (running) begin
      #(half_ns) clk_out = ~clk_out;
    end else begin
      clk_out = 1'b0;
      #1;
    end
  end
endmodule
