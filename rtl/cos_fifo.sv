// Change-of-state store: a FIFO of time-stamped status words.
//
// Every clock the STATUS_W-bit status is compared with its value in the
// previous clock; when any bit differs, {status, stamp} is written into a
// DEPTH-entry FIFO. stamp is the free-running 1 us time-stamp counter. The
// host reads the oldest entry at head and removes it with pop. When the FIFO
// is full a new change is dropped and the sticky overflow flag is set until
// clear_ovf. The first status after reset is the reference and is not
// logged. Depth 64, 40-bit status and 24-bit stamp follow the requirements;
// the full behaviour is this design's choice.
// Timing: an entry appears one clock after the change; count is registered.
module cos_fifo #(
  parameter int DEPTH    = 64,
  parameter int STATUS_W = 40,
  parameter int STAMP_W  = 24
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [STATUS_W-1:0]         status,
  input  logic [STAMP_W-1:0]          stamp,
  input  logic                        pop,
  input  logic                        clear_ovf,
  output logic [STATUS_W+STAMP_W-1:0] head,
  output logic [$clog2(DEPTH):0]      count,
  output logic                        overflow
);
  localparam int AW = $clog2(DEPTH);
  localparam int EW = STATUS_W + STAMP_W;

  logic [EW-1:0]       mem [DEPTH];
  logic [AW-1:0]       wp, rp;
  logic [STATUS_W-1:0] prev;
  logic                primed;
  logic                change, push, do_pop;

  assign change = primed && (status != prev);
  assign do_pop = pop && (count != 0);
  assign push   = change && (count != (AW+1)'(DEPTH) || do_pop);
  assign head   = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= {status, stamp};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
      prev <= '0; primed <= 1'b0; overflow <= 1'b0;
    end else begin
      prev   <= status;
      primed <= 1'b1;
      if (push)   wp <= wp + 1'b1;
      if (do_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
      if (clear_ovf)            overflow <= 1'b0;
      else if (change && !push) overflow <= 1'b1;
    end
  end

  // A pop is never requested on an empty FIFO by a well-behaved host.
  property p_count_bound;
    @(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH);
  endproperty
  assert property (p_count_bound);
endmodule
