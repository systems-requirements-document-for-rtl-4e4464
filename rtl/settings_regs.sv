// Protected settings store: per-channel gains and offsets, trip levels and
// the CRC that covers them.
//
// Address map (word addresses): gain[c] at c, offset[c] at NCH + c, trip[t]
// at 2*NCH + t and the expected CRC at 2*NCH + NTRIP. Writes are accepted
// only while unlock is high (key switch or password accepted). A trip level
// written outside its fixed bounds [TRIP_LO, TRIP_HI] is clamped to the
// bound. On every check_tick a pass walks all gain, offset and trip words in
// address order, one word per clock, through CRC-16-CCITT (initial value
// FFFF, MSB first) and compares the result with the stored CRC; crc_error
// holds the verdict of the last completed pass. A write during a pass
// restarts it. The protected, bounded, CRC-checked storage follows the
// requirements; the CRC polynomial, address map and reset values are this
// design's choice. Reset: gains 1.0 (256), offsets 0, trips at their upper
// bounds, CRC 0 - so crc_error is set after the first pass until the host
// loads a configuration with its CRC.
// Timing: a pass takes 2*NCH + NTRIP + 1 clocks; reads are combinational.
module settings_regs
  import fd_pkg::*;
#(
  parameter int NCH   = 32,
  parameter int NTRIP = fd_pkg::N_TRIP,
  parameter logic signed [15:0] TRIP_LO [NTRIP] = fd_pkg::TRIP_MIN,
  parameter logic signed [15:0] TRIP_HI [NTRIP] = fd_pkg::TRIP_MAX
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               unlock,
  input  logic               wr_en,
  input  logic [7:0]         wr_addr,
  input  logic [15:0]        wr_data,
  input  logic [7:0]         rd_addr,
  output logic [15:0]        rd_data,
  input  logic               check_tick,
  output logic signed [15:0] gain   [NCH],
  output logic signed [15:0] offset [NCH],
  output logic signed [15:0] trip   [NTRIP],
  output logic               crc_error,
  output logic               check_done    // pulse: a pass has completed
);
  localparam int NWORDS = 2*NCH + NTRIP;     // words under the CRC
  localparam int A_CRC  = NWORDS;

  logic [15:0] crc_stored;
  logic        busy;
  logic [7:0]  idx;
  logic [15:0] crc_run;
  logic        wr_ok;

  logic [7:0]  wr_trip;                    // trip index of a write
  assign wr_trip = wr_addr - 8'(2*NCH);
  assign wr_ok = wr_en && unlock && (int'(wr_addr) <= A_CRC);

  function automatic logic [15:0] word_at(int a);
    if (a < NCH)            return gain[a];
    else if (a < 2*NCH)     return offset[a-NCH];
    else if (a < NWORDS)    return trip[a-2*NCH];
    else if (a == A_CRC)    return crc_stored;
    else                    return 16'h0000;
  endfunction

  assign rd_data = word_at(int'(rd_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        gain[c]   <= 16'sd256;
        offset[c] <= '0;
      end
      for (int t = 0; t < NTRIP; t++) trip[t] <= TRIP_HI[t];
      crc_stored <= '0;
    end else if (wr_ok) begin
      if (int'(wr_addr) < NCH) gain[int'(wr_addr)] <= wr_data;
      else if (int'(wr_addr) < 2*NCH) offset[int'(wr_addr) - NCH] <= wr_data;
      else if (int'(wr_addr) < NWORDS) begin
        if ($signed(wr_data) < TRIP_LO[int'(wr_trip)])      trip[int'(wr_trip)] <= TRIP_LO[int'(wr_trip)];
        else if ($signed(wr_data) > TRIP_HI[int'(wr_trip)]) trip[int'(wr_trip)] <= TRIP_HI[int'(wr_trip)];
        else                                    trip[int'(wr_trip)] <= wr_data;
      end else crc_stored <= wr_data;
    end
  end

  // Periodic CRC check.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      idx        <= '0;
      crc_run    <= 16'hFFFF;
      crc_error  <= 1'b0;
      check_done <= 1'b0;
    end else begin
      check_done <= 1'b0;
      if (wr_ok) begin
        busy    <= 1'b0;              // contents changed: start over later
        idx     <= '0;
        crc_run <= 16'hFFFF;
      end else if (busy) begin
        if (int'(idx) == NWORDS) begin
          busy       <= 1'b0;
          crc_error  <= (crc_run != crc_stored);
          check_done <= 1'b1;
        end else begin
          crc_run <= crc16_word(crc_run, word_at(int'(idx)));
          idx     <= idx + 1'b1;
        end
      end else if (check_tick) begin
        busy    <= 1'b1;
        idx     <= '0;
        crc_run <= 16'hFFFF;
      end
    end
  end
endmodule
