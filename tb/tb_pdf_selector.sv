// tb_pdf_selector: self-checking test of the training-set compression.
//
// A behavioural capture buffer (one clock read latency) holds a window whose
// samples have a spread of amplitudes. For each run the testbench computes
// its own power histogram and per-bin quotas and checks the beats that come
// out: indices strictly increasing, data equal to the buffer, per bin exactly
// quota chosen samples, every chosen sample preceded by its M predecessors,
// no sample sent that is not within M before a chosen one, tlast only on the
// final beat, and the reported totals. Runs cover compression off (whole
// window), compression at ratio 0.1, random back-pressure, ratio 0 and the
// clock count of an unstalled run (2n + M + 5 clocks from the clock that takes start to the one that shows done).
module tb_pdf_selector;
  import dpd_pkg::*;

  localparam int unsigned DEPTH = 4096;
  localparam int unsigned NBINS = 32;
  localparam int unsigned M = 3;
  localparam int unsigned LA = $clog2(DEPTH + 1);
  localparam int unsigned SA = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [LA-1:0] n = 0;
  logic compress_en = 0;
  logic [15:0] ratio = 0;
  logic [SA-1:0] rd_addr;
  iq_t rd_data;
  logic busy, done;
  logic [LA-1:0] chosen_total, sent;

  axis_if #(.DATA_W(32), .USER_W(SA + 1)) m_axis (.clk(clk), .rst_n(rst_n));

  pdf_selector #(.DEPTH(DEPTH), .NBINS(NBINS), .M(M)) dut (
    .clk, .rst_n, .start, .n, .compress_en, .ratio, .rd_addr, .rd_data,
    .m_axis(m_axis), .busy, .done, .chosen_total, .sent);

  always #5 clk = ~clk;

  iq_t buffer [DEPTH];
  always @(posedge clk) rd_data <= buffer[rd_addr];

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int bin_ref(iq_t x);
    longint p = longint'($signed(x.i)) * $signed(x.i) + longint'($signed(x.q)) * $signed(x.q);
    int b = int'(p / (longint'(1) << (31 - $clog2(NBINS))));
    return (b >= NBINS) ? NBINS - 1 : b;
  endfunction

  // beats received
  int  rx_idx [$];
  bit  rx_ch  [$];
  bit  rx_last[$];
  iq_t rx_x   [$];
  bit  random_ready = 0;

  always @(posedge clk) begin
    if (m_axis.tvalid && m_axis.tready) begin
      rx_idx.push_back(int'(m_axis.tuser[SA-1:0]));
      rx_ch.push_back(m_axis.tuser[SA]);
      rx_last.push_back(m_axis.tlast);
      rx_x.push_back(iq_t'(m_axis.tdata));
    end
    m_axis.tready <= random_ready ? ($urandom % 3 != 0) : 1'b1;
  end

  task automatic run(int nn, bit comp, int r, bit rnd, string tag);
    int cnt [NBINS], quota [NBINS], got [NBINS];
    int total, t0, t1;
    bit is_sent [];
    bit is_ch [];
    rx_idx.delete(); rx_ch.delete(); rx_last.delete(); rx_x.delete();
    random_ready = rnd;
    for (int b = 0; b < NBINS; b++) begin cnt[b] = 0; got[b] = 0; end
    for (int k = 0; k < nn; k++) cnt[bin_ref(buffer[k])]++;
    total = 0;
    for (int b = 0; b < NBINS; b++) begin
      quota[b] = comp ? int'((longint'(cnt[b]) * r + 32768) / 65536) : cnt[b];
      total += quota[b];
    end
    @(negedge clk);
    start = 1; n = LA'(nn); compress_en = comp; ratio = 16'(r);
    @(posedge clk);
    t0 = $time;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    t1 = $time;
    @(negedge clk);
    if (!rnd) check((t1 - t0) / 10 == 2 * nn + M + 5, $sformatf("%s: run took %0d clocks, expected %0d", tag, (t1 - t0) / 10, 2 * nn + M + 5));
    check(int'(chosen_total) == total, $sformatf("%s: chosen_total %0d exp %0d", tag, chosen_total, total));
    check(int'(sent) == rx_idx.size(), $sformatf("%s: sent %0d, beats %0d", tag, sent, rx_idx.size()));
    is_sent = new[nn]; is_ch = new[nn];
    for (int k = 0; k < rx_idx.size(); k++) begin
      checks++;
      if (k > 0 && rx_idx[k] <= rx_idx[k-1]) begin failures++; $display("%s: index order", tag); end
      if (rx_idx[k] >= nn) begin failures++; $display("%s: index out of window", tag); continue; end
      if (rx_x[k] !== buffer[rx_idx[k]]) begin failures++; $display("%s: data of %0d", tag, rx_idx[k]); end
      if (rx_last[k] != (k == rx_idx.size() - 1)) begin failures++; $display("%s: tlast at beat %0d", tag, k); end
      is_sent[rx_idx[k]] = 1;
      is_ch[rx_idx[k]] = rx_ch[k];
      if (rx_ch[k]) got[bin_ref(rx_x[k])]++;
    end
    for (int b = 0; b < NBINS; b++)
      check(got[b] == quota[b], $sformatf("%s: bin %0d chose %0d, quota %0d", tag, b, got[b], quota[b]));
    for (int j = 0; j < nn; j++) begin
      bit need = 0;
      for (int d = 0; d <= int'(M); d++) if (j + d < nn && is_ch[j + d]) need = 1;
      checks++;
      if (need != is_sent[j]) begin failures++; if (failures < 20) $display("%s: sample %0d sent=%0d needed=%0d", tag, j, is_sent[j], need); end
    end
    $display("%s: window %0d, chosen %0d, sent %0d", tag, nn, total, rx_idx.size());
  endtask

  initial begin
    m_axis.tready = 1;
    for (int k = 0; k < DEPTH; k++) begin
      int a = (k % 11 == 0) ? 0 : (k % 3 == 0) ? 1 : (k % 2 == 0) ? 3 : 5;
      buffer[k].i = 16'($signed(16'($urandom)) >>> a);
      buffer[k].q = 16'($signed(16'($urandom)) >>> a);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(200, 0, 0, 0, "bypass");
    run(4000, 1, 6554, 0, "ratio0.1");
    run(3000, 1, 6554, 1, "ratio0.1-backpressure");
    run(1000, 1, 20000, 1, "ratio0.3-backpressure");
    run(500, 1, 0, 0, "ratio0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
