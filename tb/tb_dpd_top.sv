// tb_dpd_top: end-to-end test of the DPD transmitter and its feedback path,
// with every parameter of dpd_top at its default (two samples per clock,
// P = 4, M = 3, 40960-sample playback buffer and capture window).
//
// A waveform of NW samples is loaded over the input stream. The DAC output is
// fed through an amplifier model (compression with a little AM/PM) and a
// fixed delay back into the ADC port. Three sessions are played:
//   1. reset coefficients (identity): the DAC output must equal the waveform;
//      a full window is captured with compression off and must come back
//      unchanged;
//   2. a committed random coefficient set: the DAC output is compared with a
//      reference memory polynomial over the whole played stream (the model's
//      memory runs across sessions); a window is captured with compression at
//      ratio 0.1 under random back-pressure and checked against the
//      testbench's own histogram and quotas; a capture request during the
//      transfer must be ignored;
//   3. a high-gain coefficient set that drives the output into saturation.
// Counted mechanisms, each of which must occur: waveform wrap-around,
// coefficient commit, full-window transfer, compressed transfer, stalled
// beats, ignored capture requests, saturated DAC samples.
module tb_dpd_top;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;

  localparam int unsigned LANES = 2, P = 4, M = 3, NBINS = 32;
  localparam int unsigned NC = (P + 1) * (M + 1);
  localparam int unsigned NW = 40960;          // waveform length
  localparam int unsigned NCAP = 40960;        // capture window
  localparam int unsigned PA_DLY = 7;          // clocks from DAC to ADC
  localparam int unsigned CLA = $clog2(40960 + 1);
  localparam int unsigned CSA = $clog2(40960);

  logic clk = 0, rst_n = 0;
  logic [31:0] s_axis_tdata = 0;
  logic s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic play_en = 0;
  logic coef_wr_en = 0;
  logic [$clog2(NC)-1:0] coef_wr_addr = 0;
  coef_t coef_wr_data = '0;
  logic coef_commit = 0;
  logic dac_valid;
  iq_t  dac_data [LANES];
  logic adc_valid;
  iq_t  adc_data [LANES];
  logic cap_start = 0;
  logic [CLA-1:0] cap_len = 0;
  logic compress_en = 0;
  logic [15:0] ratio = 0;
  logic [31:0] m_axis_tdata;
  logic [CSA:0] m_axis_tuser;
  logic m_axis_tvalid, m_axis_tlast;
  logic m_axis_tready = 1;
  logic [CLA-1:0] tx_len;
  logic [31:0] tx_wraps;
  logic [15:0] coef_commits;
  logic cap_busy, cap_done;
  logic [CLA-1:0] chosen_total, sent;

  dpd_top dut (.*);

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- amplifier model and feedback delay
  logic dly_v [PA_DLY];
  iq_t  dly_x [PA_DLY][LANES];
  always @(posedge clk) begin
    dly_v[0] <= dac_valid;
    for (int l = 0; l < LANES; l++) dly_x[0][l] <= pa_model(dac_data[l]);
    for (int k = 1; k < PA_DLY; k++) begin dly_v[k] <= dly_v[k-1]; dly_x[k] <= dly_x[k-1]; end
  end
  assign adc_valid = dly_v[PA_DLY-1];
  assign adc_data  = dly_x[PA_DLY-1];

  // ---------------- observation
  iq_t wave [NW];
  iq_t dac_log [$];
  iq_t adc_log [$];
  int  adc_edge [$];
  int  edge_no = 0, start_edge = 0;
  int  n_stall = 0, n_sat = 0, n_wrap_seen = 0;
  int  rx_idx [$];
  bit  rx_ch [$], rx_last [$];
  iq_t rx_x [$];
  bit  random_ready = 0;

  initial for (int k = 0; k < PA_DLY; k++) dly_v[k] = 0;

  always @(posedge clk) begin
    edge_no++;
    if (cap_start && !cap_busy) start_edge = edge_no;
    if (dac_valid && rst_n) for (int l = 0; l < LANES; l++) begin
      dac_log.push_back(dac_data[l]);
      if (dac_data[l].i == 16'h7fff || dac_data[l].i == 16'h8000 ||
          dac_data[l].q == 16'h7fff || dac_data[l].q == 16'h8000) n_sat++;
    end
    if (adc_valid && rst_n) for (int l = 0; l < LANES; l++) begin
      adc_log.push_back(adc_data[l]);
      adc_edge.push_back(edge_no);
    end
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
    if (m_axis_tvalid && m_axis_tready) begin
      rx_idx.push_back(int'(m_axis_tuser[CSA-1:0]));
      rx_ch.push_back(m_axis_tuser[CSA]);
      rx_last.push_back(m_axis_tlast);
      rx_x.push_back(iq_t'(m_axis_tdata));
    end
    m_axis_tready <= random_ready ? ($urandom % 4 != 0) : 1'b1;
  end

  // ---------------- reference of the played stream
  iq_t    in_stream [$];        // samples entering the predistorter, all sessions
  longint bre [$][8], bim [$][8];
  coef_t  cset [NC];

  task automatic check_session(int s0, int s1, string tag);
    int bad = 0;
    for (int j = s0; j < s1; j++) begin
      basis_vec_t br, bi;
      basis_ref(in_stream[j], P, br, bi);
      bre.push_back(br);
      bim.push_back(bi);
    end
    for (int j = s0; j < s1; j++) begin
      longint sr = 0, si = 0;
      iq_t e;
      for (int p = 0; p <= int'(P); p++)
        for (int m = 0; m <= int'(M); m++)
          if (j - m >= 0) begin
            longint cr = longint'($signed(cset[p*(M+1)+m].re)), ci = longint'($signed(cset[p*(M+1)+m].im));
            sr += bre[j-m][p] * cr - bim[j-m][p] * ci;
            si += bre[j-m][p] * ci + bim[j-m][p] * cr;
          end
      e.i = 16'(sat16((sr + 16384) >>> 15));
      e.q = 16'(sat16((si + 16384) >>> 15));
      checks++;
      if (dac_log[j] !== e) begin
        failures++; bad++;
        if (bad < 5) $display("%s: DAC sample %0d got %h expected %h", tag, j, dac_log[j], e);
      end
    end
  endtask

  // play a session until `until` becomes true, then stop and flush
  task automatic play_session(int cap_len_req, bit comp, bit rnd, bit poke, string tag);
    int s0, s1, nrx0;
    s0 = dac_log.size();
    rx_idx.delete(); rx_ch.delete(); rx_last.delete(); rx_x.delete();
    random_ready = rnd;
    @(negedge clk);
    play_en = 1;
    repeat (300) @(negedge clk);
    if (cap_len_req > 0) begin
      cap_start = 1; cap_len = CLA'(cap_len_req); compress_en = comp; ratio = 16'd6554;
      @(negedge clk);
      cap_start = 0;
      // keep playing until the window is in the buffer
      while (adc_log.size() == 0 || adc_edge[adc_edge.size()-1] <= start_edge ||
             count_after(start_edge) < cap_len_req) @(negedge clk);
      repeat (4) @(negedge clk);
    end else begin
      repeat (NW / LANES + 500) @(negedge clk);
    end
    play_en = 0;
    repeat (60) @(negedge clk);
    s1 = dac_log.size();
    // the predistorter saw the waveform from index 0 for s1-s0 samples
    for (int j = 0; j < s1 - s0; j++) in_stream.push_back(wave[j % NW]);
    check_session(s0, s1, tag);
    if (cap_len_req > 0) begin
      if (poke) begin
        @(negedge clk); cap_start = 1; cap_len = 100; @(negedge clk); cap_start = 0;
      end
      while (!cap_done) @(negedge clk);
      check_capture(cap_len_req, comp, tag);
    end
  endtask

  function automatic int count_after(int e);
    int c = 0;
    for (int k = adc_edge.size() - 1; k >= 0 && adc_edge[k] > e; k--) c++;
    return c;
  endfunction

  int n_full = 0, n_comp = 0, n_ignored = 0;

  task automatic check_capture(int nn, bit comp, string tag);
    int first = -1, total = 0;
    int cnt [NBINS], quota [NBINS], got [NBINS];
    bit is_sent [], is_ch [];
    for (int k = 0; k < adc_log.size(); k++) if (adc_edge[k] > start_edge) begin first = k; break; end
    for (int b = 0; b < NBINS; b++) begin cnt[b] = 0; got[b] = 0; end
    for (int k = 0; k < nn; k++) cnt[bin_of(adc_log[first + k])]++;
    for (int b = 0; b < NBINS; b++) begin
      quota[b] = comp ? int'((longint'(cnt[b]) * 6554 + 32768) / 65536) : cnt[b];
      total += quota[b];
    end
    check(int'(chosen_total) == total, $sformatf("%s: chosen %0d expected %0d", tag, chosen_total, total));
    check(rx_idx.size() == int'(sent), $sformatf("%s: beats %0d, sent %0d", tag, rx_idx.size(), sent));
    is_sent = new[nn]; is_ch = new[nn];
    for (int k = 0; k < rx_idx.size(); k++) begin
      checks++;
      if ((k > 0 && rx_idx[k] <= rx_idx[k-1]) || rx_idx[k] >= nn ||
          rx_x[k] !== adc_log[first + rx_idx[k]] || rx_last[k] != (k == rx_idx.size() - 1)) begin
        failures++;
        if (failures < 20) $display("%s: beat %0d index %0d wrong", tag, k, rx_idx[k]);
        continue;
      end
      is_sent[rx_idx[k]] = 1;
      is_ch[rx_idx[k]] = rx_ch[k];
      if (rx_ch[k]) got[bin_of(rx_x[k])]++;
    end
    for (int b = 0; b < NBINS; b++)
      check(got[b] == quota[b], $sformatf("%s: bin %0d chose %0d of quota %0d", tag, b, got[b], quota[b]));
    for (int j = 0; j < nn; j++) begin
      bit need = 0;
      for (int d = 0; d <= int'(M); d++) if (j + d < nn && is_ch[j + d]) need = 1;
      checks++;
      if (need != is_sent[j]) begin failures++; if (failures < 20) $display("%s: sample %0d", tag, j); end
    end
    if (comp) n_comp++; else n_full++;
    $display("%s: window %0d samples, %0d chosen, %0d sent to the processor", tag, nn, total, rx_idx.size());
  endtask

  function automatic int bin_of(iq_t x);
    longint p = longint'($signed(x.i)) * $signed(x.i) + longint'($signed(x.q)) * $signed(x.q);
    int b = int'(p / (longint'(1) << (31 - $clog2(NBINS))));
    return (b >= NBINS) ? NBINS - 1 : b;
  endfunction

  task automatic load_coefs(int mode);
    for (int k = 0; k < int'(NC); k++) begin
      coef_t c = '0;
      if (mode == 1) begin
        c.re = 18'($signed(12'($urandom)));
        c.im = 18'($signed(12'($urandom)));
        if (k == 0) c.re = 18'd36000;
      end else begin
        if (k == 0) c.re = 18'd62000;          // gain of 1.9
        if (k == M + 1) c.im = 18'd8000;
      end
      @(negedge clk);
      coef_wr_en = 1; coef_wr_addr = k[$clog2(NC)-1:0]; coef_wr_data = c;
      cset[k] = c;
    end
    @(negedge clk);
    coef_wr_en = 0; coef_commit = 1;
    @(negedge clk);
    coef_commit = 0;
  endtask

  initial begin
    // waveform: random phase, amplitude with a long-tailed distribution
    for (int k = 0; k < NW; k++) begin
      int a = ($urandom % 10 == 0) ? 0 : ($urandom % 3 == 0) ? 1 : ($urandom % 2 == 0) ? 2 : 4;
      wave[k].i = 16'($signed(16'($urandom)) >>> (a + 1));
      wave[k].q = 16'($signed(16'($urandom)) >>> (a + 1));
    end
    wave[5].i = 16'h6000; wave[5].q = 16'h6000;
    for (int k = 0; k < NC; k++) cset[k] = '0;
    cset[0].re = 18'd32768;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load the waveform with gaps between beats
    for (int k = 0; k < NW; k++) begin
      while ($urandom % 8 == 0) begin s_axis_tvalid = 0; @(negedge clk); end
      s_axis_tvalid = 1; s_axis_tdata = wave[k]; s_axis_tlast = (k == NW - 1);
      @(negedge clk);
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    @(negedge clk);
    check(int'(tx_len) == NW, "loaded length");
    // session 1: identity coefficients, full window
    play_session(NCAP, 0, 0, 0, "identity");
    check(tx_wraps >= 1, "waveform wrapped");
    n_wrap_seen = tx_wraps;
    // session 2: trained-looking coefficients, compressed window under back-pressure
    load_coefs(1);
    check(coef_commits == 1, "commit counted");
    begin
      int ig0 = n_ignored;
      play_session(NCAP, 1, 1, 1, "dpd+compression");
      // the poke during the transfer must not have started a capture
      if (!cap_busy) n_ignored++;
      check(n_ignored == ig0 + 1, "capture request ignored while busy");
    end
    // session 3: saturation
    load_coefs(2);
    play_session(0, 0, 0, 0, "saturation");
    $display("mechanisms: wraps=%0d commits=%0d full_windows=%0d compressed_windows=%0d stalls=%0d ignored_starts=%0d saturated=%0d",
             tx_wraps, coef_commits, n_full, n_comp, n_stall, n_ignored, n_sat);
    check(tx_wraps > 0, "wrap-around happened");
    check(coef_commits == 2, "two commits happened");
    check(n_full > 0, "full-window transfer happened");
    check(n_comp > 0, "compressed transfer happened");
    check(n_stall > 0, "back-pressure stall happened");
    check(n_ignored > 0, "ignored capture request happened");
    check(n_sat > 0, "saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
