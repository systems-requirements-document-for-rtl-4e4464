// Tick divider: emits a one-cycle tick on every DIV-th cycle in which en is
// high. Chained instances build the time base of an FPGA: the 128 kHz ADC
// convert strobe, the 1 us time-stamp tick and the 1 ms fault-line toggle
// tick. The rates follow the requirements; the divider itself and the clock
// frequency it divides are this design's choice.
// Interface: en counts, tick is registered and high for one clock.
module rate_gen #(
  parameter int unsigned DIV = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
