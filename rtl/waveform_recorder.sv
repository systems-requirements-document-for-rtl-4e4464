// Triggered waveform recorder.
//
// The host arms the recorder; the next trigger (the start event from the
// facility clock) starts the recording. From then on every frame of NCH
// corrected samples is copied into a frame buffer and written to memory, one
// word per clock, channel 0 first, at consecutive addresses from 0. The
// recording ends when the memory cannot hold another whole frame: for the
// default 4M words and 34 channels that is 123,361 frames, 15.4 s at 8 kHz.
// The host can stop a recording early with stop. Recording from a
// facility-clock start point into a 4M x 16 memory follows the requirements;
// the one-shot mode, the memory layout and the arm/stop controls are this
// design's choice.
// Timing: a frame occupies NCH clocks of memory writes and must have been
// written before the next in_valid (at 8 kHz frames are thousands of clocks
// apart).
module waveform_recorder #(
  parameter int NCH = 34,
  parameter int AW  = 22,
  parameter int DW  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic          stop,
  input  logic          trigger,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data [NCH],
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  output logic          armed,
  output logic          recording,
  output logic          done,
  output logic [AW:0]   words       // words written so far
);
  localparam longint CAP    = (longint'(1) << AW);
  localparam longint FRAMES = CAP / longint'(NCH);
  localparam longint LAST   = FRAMES * longint'(NCH);   // words in a full record
  localparam int     CW     = (NCH > 1) ? $clog2(NCH) : 1;

  logic [DW-1:0] buf_q [NCH];
  logic [CW-1:0] ch;
  logic          busy;   // frame being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; recording <= 1'b0; done <= 1'b0;
      busy <= 1'b0; ch <= '0; words <= '0;
      mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      for (int c = 0; c < NCH; c++) buf_q[c] <= '0;
    end else begin
      mem_we <= 1'b0;
      if (arm && !recording) begin
        armed <= 1'b1;
        done  <= 1'b0;
        words <= '0;
      end else if (armed && trigger) begin
        armed     <= 1'b0;
        recording <= 1'b1;
      end
      if (stop) begin
        armed <= 1'b0;
        if (recording) begin
          recording <= 1'b0;
          done      <= 1'b1;
        end
      end

      if (recording && in_valid && !busy && !stop) begin
        for (int c = 0; c < NCH; c++) buf_q[c] <= in_data[c];
        busy <= 1'b1;
        ch   <= '0;
      end else if (busy) begin
        mem_we    <= 1'b1;
        mem_addr  <= AW'(words);
        mem_wdata <= buf_q[ch];
        words     <= words + 1'b1;
        if (int'(ch) == NCH - 1) begin
          busy <= 1'b0;
          if (longint'(words) + 1 == LAST) begin
            recording <= 1'b0;
            done      <= 1'b1;
          end
        end else begin
          ch <= ch + 1'b1;
        end
      end
    end
  end
endmodule
