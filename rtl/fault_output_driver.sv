// Fault line driver with a companion clock.
//
// The clock line toggles on every 1 ms tick and each fault line carries
// clk_line XOR fault, so while the unit is healthy every line toggles in step
// with the clock and a receiver recovers the fault as line XOR clock. A line
// stuck high or low, or a dead clock, is therefore visible to a watchdog.
// The 1 ms toggling and the XOR coding follow the requirements; the polarity
// (XOR = 1 means fault) is this design's choice.
// Timing: outputs are registered; a fault change appears on the next clock.
module fault_output_driver #(
  parameter int N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_ms,
  input  logic [N-1:0] fault,
  output logic         clk_line,
  output logic [N-1:0] line
);
  logic phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 1'b0;
      clk_line <= 1'b0;
      line     <= '0;
    end else begin
      if (tick_ms) begin
        phase    <= ~phase;
        clk_line <= ~phase;
        line     <= {N{~phase}} ^ fault;
      end else begin
        clk_line <= phase;
        line     <= {N{phase}} ^ fault;
      end
    end
  end
endmodule
