// Watchdog and decoder for toggled fault lines.
//
// The monitored lines come from a fault_output_driver: a clock that toggles
// every millisecond and N lines equal to clock XOR fault. This block decodes
// each fault as line XOR clock and times, in microseconds, how long each of
// the N+1 signals has gone without an edge. A signal silent for longer than
// timeout_us sets its stuck bit, which stays set until the signal toggles
// again. Any stuck bit is a watchdog fault. Using the toggling lines as
// watchdog inputs that can fault the system follows the requirements; the
// timeout value and the per-line structure are this design's choice.
// Inputs are synchronised through two flip-flops; decoded and stuck follow
// the inputs by three clocks.
module toggle_watchdog #(
  parameter int N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_us,
  input  logic [15:0]  timeout_us,
  input  logic         clk_line,
  input  logic [N-1:0] line,
  output logic [N-1:0] decoded,
  output logic [N:0]   stuck,     // [N] is the clock line
  output logic         wd_fault
);
  logic [N:0]  s1, s2, s3;
  logic [15:0] age [N+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      stuck <= '0;
      for (int i = 0; i <= N; i++) age[i] <= '0;
    end else begin
      s1 <= {clk_line, line};
      s2 <= s1;
      s3 <= s2;
      for (int i = 0; i <= N; i++) begin
        if (s2[i] != s3[i]) begin
          age[i]   <= '0;
          stuck[i] <= 1'b0;
        end else if (tick_us) begin
          if (age[i] != 16'hFFFF) age[i] <= age[i] + 1'b1;
          if (age[i] >= timeout_us) stuck[i] <= 1'b1;
        end
      end
    end
  end

  assign decoded  = s3[N-1:0] ^ {N{s3[N]}};
  assign wd_fault = |stuck;
endmodule
