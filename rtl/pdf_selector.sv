// pdf_selector: probability-density-based compression of a captured training
// window, streamed to the processor.
//
// Idea: rather than sending every captured feedback sample to the training
// software, keep a fixed fraction of them chosen so that the sample
// distribution over signal power is preserved, and keep with each chosen
// sample the M samples before it, which the memory terms of the model need.
// The method (fraction, histogram at a chosen resolution, random choice per
// bin in proportion to the bin size, previous samples up to the memory depth)
// follows the document; doing it in logic, the power binning, the rounding of
// the per-bin quota and the random-choice rule are this design's.
//
// It works in three phases on a window of n samples held in rx_capture:
//  1. HIST: read all n samples (one per clock) and count them into NBINS bins
//     of equal width in power |x|^2 = I^2+Q^2 (bin = |x|^2 >> (31-log2 NBINS)).
//  2. QUOTA: one clock; quota_b = round(count_b * ratio), ratio an unsigned
//     0.16 fraction. With compression off (compress_en = 0) quota_b = count_b,
//     which sends the whole window.
//  3. SELECT: read the samples again in order. A sample of bin b is chosen
//     with probability rq_b/rc_b (rc_b samples of the bin still to come, rq_b
//     of its quota still open; uniform draw from a 16-bit LFSR), which picks
//     exactly quota_b samples per bin, each subset equally likely (sequential
//     selection sampling). A sample is sent when it or one of the M samples
//     after it is chosen, so every chosen sample arrives with its M
//     predecessors; each sample is sent once even where windows overlap.
//
// Output: m_axis carries one sample per beat, tdata = {Q, I}, tuser =
// {chosen, index in the window}, tlast on the final beat (the last chosen
// sample). SELECT moves one sample per clock while m_axis is ready. rd_addr /
// rd_data is the read port of the capture buffer (one clock latency). start
// (while idle) begins a run over n samples; busy is high during the run, done
// pulses at its end; chosen_total and sent give the sizes of the last run.
module pdf_selector
  import dpd_pkg::*;
#(
  parameter int unsigned DEPTH = 40960,        // largest window, samples
  parameter int unsigned NBINS = 32,           // histogram resolution
  parameter int unsigned M     = 3,            // memory depth
  parameter logic [15:0] SEED  = 16'hACE1,     // LFSR seed, non-zero
  localparam int unsigned LA   = $clog2(DEPTH + 1),
  localparam int unsigned SA   = $clog2(DEPTH),
  localparam int unsigned BW   = $clog2(NBINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LA-1:0] n,
  input  logic          compress_en,
  input  logic [15:0]   ratio,          // fraction kept, unsigned 0.16
  output logic [SA-1:0] rd_addr,
  input  iq_t           rd_data,
  axis_if.master        m_axis,
  output logic          busy,
  output logic          done,
  output logic [LA-1:0] chosen_total,
  output logic [LA-1:0] sent
);
  typedef enum logic [2:0] {S_IDLE, S_HIST, S_QUOTA, S_SELECT, S_DONE} state_t;
  state_t state;

  typedef struct packed {
    logic          valid;
    logic          chosen;
    logic          last;
    logic [SA-1:0] idx;
    iq_t           x;
  } entry_t;

  logic [LA-1:0] cnt [NBINS];   // histogram, then samples still to come per bin
  logic [LA-1:0] rq  [NBINS];   // open quota per bin
  logic [LA-1:0] n_q;
  logic [LA+1:0] ra;            // index of the sample on rd_data (LA+2 bits covers n+M)
  logic          comp_q;
  logic [15:0]   ratio_q;
  logic [15:0]   lfsr;
  logic [LA-1:0] chosen_cnt;
  entry_t        win [M+1];     // win[0] newest

  // ---------------- bin of the sample on the read port
  function automatic logic [BW-1:0] bin_of(iq_t x);
    logic [31:0] p;
    logic [32-BW:0] b;
    p = 32'($signed(x.i) * $signed(x.i)) + 32'($signed(x.q) * $signed(x.q));
    b = (33-BW)'(p >> (31 - BW));
    return (b >= (33-BW)'(NBINS)) ? BW'(NBINS - 1) : BW'(b);
  endfunction

  wire [BW-1:0] cur_bin  = bin_of(rd_data);
  wire          in_range = ra < (LA+2)'(n_q);
  wire          adv      = !m_axis.tvalid || m_axis.tready;

  // ---------------- read address: next sample when advancing, else hold
  always_comb begin
    rd_addr = '0;
    if (state == S_HIST)
      rd_addr = SA'(ra + 1'b1);
    else if (state == S_SELECT)
      rd_addr = adv ? SA'(ra + 1'b1) : SA'(ra);
  end

  // ---------------- random choice for the current sample
  logic [31:0] draw;
  logic        take;
  always_comb begin
    draw = 32'(lfsr) * 32'(cnt[cur_bin]);
    take = in_range && (LA'(draw >> 16) < rq[cur_bin]);
  end

  // ---------------- window after shifting in the current sample
  entry_t win_n [M+1];
  logic   keep;
  always_comb begin
    win_n[0].valid  = in_range;
    win_n[0].chosen = take;
    win_n[0].last   = take && (chosen_cnt + 1'b1 == chosen_total);
    win_n[0].idx    = SA'(ra);
    win_n[0].x      = rd_data;
    for (int k = 1; k <= M; k++) win_n[k] = win[k-1];
    keep = 1'b0;
    for (int k = 0; k <= M; k++) keep |= win_n[k].valid && win_n[k].chosen;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      busy           <= 1'b0;
      done           <= 1'b0;
      ra             <= '0;
      n_q            <= '0;
      comp_q         <= 1'b0;
      ratio_q        <= '0;
      lfsr           <= SEED;
      chosen_cnt     <= '0;
      chosen_total   <= '0;
      sent           <= '0;
      m_axis.tvalid  <= 1'b0;
      m_axis.tdata   <= '0;
      m_axis.tuser   <= '0;
      m_axis.tlast   <= 1'b0;
      for (int b = 0; b < NBINS; b++) begin cnt[b] <= '0; rq[b] <= '0; end
      for (int k = 0; k <= M; k++) win[k] <= '0;
    end else begin
      done <= 1'b0;
      if (m_axis.tvalid && m_axis.tready) begin
        m_axis.tvalid <= 1'b0;
        sent          <= sent + 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          n_q     <= (n > LA'(DEPTH)) ? LA'(DEPTH) : n;
          comp_q  <= compress_en;
          ratio_q <= ratio;
          ra      <= '0;        // rd_addr was 0 in this clock
          busy    <= 1'b1;
          sent    <= '0;
          for (int b = 0; b < NBINS; b++) cnt[b] <= '0;
          state   <= S_HIST;
        end
        S_HIST: begin
          if (in_range) begin
            cnt[cur_bin] <= cnt[cur_bin] + 1'b1;
            ra <= ra + 1'b1;
          end else begin
            state <= S_QUOTA;
          end
        end
        S_QUOTA: begin
          logic [LA-1:0] tot;
          tot = '0;
          for (int b = 0; b < NBINS; b++) begin
            logic [LA+16:0] q;
            q = (LA+17)'(cnt[b]) * (LA+17)'(ratio_q) + (LA+17)'(17'h08000);
            rq[b] <= comp_q ? LA'(q >> 16) : cnt[b];
            tot   += comp_q ? LA'(q >> 16) : cnt[b];
          end
          chosen_total <= tot;
          chosen_cnt   <= '0;
          ra           <= '0;   // rd_addr was 0 in this clock
          for (int k = 0; k <= M; k++) win[k] <= '0;
          state        <= S_SELECT;
        end
        S_SELECT: if (adv) begin
          if (ra >= (LA+2)'(n_q) + (LA+2)'(M)) begin
            state <= S_DONE;
          end else begin
            if (in_range) begin
              cnt[cur_bin] <= cnt[cur_bin] - 1'b1;
              lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
              if (take) begin
                rq[cur_bin] <= rq[cur_bin] - 1'b1;
                chosen_cnt  <= chosen_cnt + 1'b1;
              end
            end
            win <= win_n;
            ra  <= ra + 1'b1;
            if (win_n[M].valid && keep) begin
              m_axis.tvalid <= 1'b1;
              m_axis.tdata  <= win_n[M].x;
              m_axis.tuser  <= {win_n[M].chosen, win_n[M].idx};
              m_axis.tlast  <= win_n[M].last;
            end
          end
        end
        S_DONE: if (!m_axis.tvalid) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
