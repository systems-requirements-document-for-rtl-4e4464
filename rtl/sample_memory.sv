// Waveform memory, 2^AW words of DW bits (4M x 16 by default).
//
// One write port for the recorder and one registered read port for the
// host. The size follows the requirements (4,194,304 16-bit words per
// section, expandable to 16,777,216 with AW = 24); the memory type and the
// one-clock read latency are this design's choice.
module sample_memory #(
  parameter int AW = 22,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
