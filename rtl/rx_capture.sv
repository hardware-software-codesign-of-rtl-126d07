// rx_capture: captures a window of the received (PA feedback) signal.
//
// The RF-ADC path delivers LANES samples per clock. When the processor asks
// for training data (start pulse, window length len in samples), the block
// writes the next len valid samples, in order, into a buffer of DEPTH
// samples organised as DEPTH/LANES words of LANES samples, then raises done
// for one clock and returns to idle. The training-set selector reads the
// buffer afterwards through a one-sample-wide read port. Capturing only a
// window of the feedback under processor control follows the document; the
// buffer, the start/len handshake and the rules below are this design's.
//
// Rules: start is ignored while a capture runs; len is rounded down to whole
// words and clipped to DEPTH; a window of zero words finishes at once. The
// read port has one clock of latency (rd_addr at edge k, rd_data after edge
// k+1) and is meant to be used only while busy is low, since a capture
// overwrites the buffer.
module rx_capture
  import dpd_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned DEPTH = 40960,     // samples
  localparam int unsigned WORDS = DEPTH / LANES,
  localparam int unsigned WA    = $clog2(WORDS),
  localparam int unsigned LA    = $clog2(DEPTH + 1),
  localparam int unsigned SA    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adc_valid,
  input  iq_t           adc_in [LANES],
  input  logic          start,
  input  logic [LA-1:0] len,
  output logic          busy,
  output logic          done,
  output logic [LA-1:0] captured,      // samples in the last completed window
  input  logic [SA-1:0] rd_addr,       // sample index
  output iq_t           rd_data
);
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;

  iq_t mem [WORDS][LANES];

  logic [WA:0] wr_word, words_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      wr_word  <= '0;
      words_q  <= '0;
      captured <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          logic [LA-1:0] l;
          l = (len > LA'(DEPTH)) ? LA'(DEPTH) : len;
          words_q <= (WA+1)'(l / LA'(LANES));
          wr_word <= '0;
          busy    <= 1'b1;
        end
      end else if (wr_word >= words_q) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        captured <= LA'(words_q) * LA'(LANES);
      end else if (adc_valid) begin
        wr_word <= wr_word + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && wr_word < words_q && adc_valid) mem[WA'(wr_word)] <= adc_in;
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[WA'(rd_addr / SA'(LANES))][LW'(rd_addr % SA'(LANES))];
  end

endmodule
