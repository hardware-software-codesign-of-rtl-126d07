// tx_playback: transmit signal store that replays a loaded waveform forever.
//
// The processor sends the signal to be transmitted over a 32-bit AXI stream,
// one complex sample per beat ({Q, I}), the last sample marked by tlast. The
// samples are written in order into a buffer of DEPTH samples organised as
// DEPTH/LANES words of LANES samples, so that playback can read LANES samples
// per clock. Once a load ends, and while play_en is high, the buffer is read
// cyclically from word 0 to the last loaded word and the samples leave on
// out_valid/x_out, LANES per clock, towards the predistorter. A new load may
// start at any time; it stops playback until its tlast.
//
// In the system the waveform sits in external DRAM on the programmable-logic
// side and is sent to the DAC repeatedly; here an on-chip buffer stands in for
// that memory. The load length is rounded down to whole words (a load whose
// length is not a multiple of LANES drops its tail) and samples beyond DEPTH
// are dropped; both are choices of this design. Reading has one clock of
// latency: play_en high at edge k gives the first word at edge k+1.
//
// Ports: s_axis (slave, the load stream; always ready), play_en, out_valid,
// x_out[LANES], loaded_len (samples of the current waveform), wraps (counts
// completed passes over the waveform).
module tx_playback
  import dpd_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned DEPTH = 40960,     // samples
  localparam int unsigned WORDS = DEPTH / LANES,
  localparam int unsigned WA    = $clog2(WORDS),
  localparam int unsigned LA    = $clog2(DEPTH + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  axis_if.slave     s_axis,
  input  logic      play_en,
  output logic      out_valid,
  output iq_t       x_out [LANES],
  output logic [LA-1:0] loaded_len,
  output logic [31:0]   wraps
);
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;

  iq_t mem [WORDS][LANES];

  // ---------------- load side
  logic [LA-1:0] wr_cnt;      // samples received in the current load
  logic          loading;     // a load is in progress
  logic [LA-1:0] words_q;     // words of the current waveform
  wire           beat = s_axis.tvalid && s_axis.tready;
  wire [WA-1:0]  wr_word = WA'(wr_cnt / LA'(LANES));
  wire [LW-1:0]  wr_lane = LW'(wr_cnt % LA'(LANES));

  assign s_axis.tready = 1'b1;

  always_ff @(posedge clk) begin
    if (beat && wr_cnt < LA'(DEPTH)) mem[wr_word][wr_lane] <= iq_t'(s_axis.tdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt     <= '0;
      loading    <= 1'b0;
      words_q    <= '0;
      loaded_len <= '0;
    end else if (beat) begin
      if (s_axis.tlast) begin
        logic [LA-1:0] n;
        n = (wr_cnt < LA'(DEPTH)) ? wr_cnt + 1'b1 : wr_cnt;
        words_q    <= n / LA'(LANES);
        loaded_len <= (n / LA'(LANES)) * LA'(LANES);
        wr_cnt     <= '0;
        loading    <= 1'b0;
      end else begin
        if (wr_cnt < LA'(DEPTH)) wr_cnt <= wr_cnt + 1'b1;
        loading <= 1'b1;
      end
    end
  end

  // ---------------- playback side
  logic [WA-1:0] rd_word;
  wire           playing = play_en && !loading && !beat && words_q != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_word   <= '0;
      out_valid <= 1'b0;
      wraps     <= '0;
    end else begin
      out_valid <= playing;
      if (!play_en || loading || beat) begin
        rd_word <= '0;
      end else if (playing) begin
        if (LA'(rd_word) + 1'b1 >= words_q) begin
          rd_word <= '0;
          wraps   <= wraps + 1;
        end else begin
          rd_word <= rd_word + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (playing) x_out <= mem[rd_word];
  end

endmodule
