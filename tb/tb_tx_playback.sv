// tb_tx_playback: self-checking test of the transmit playback buffer.
//
// Loads waveforms over the AXI stream (with gaps between beats), plays them
// and checks that the output repeats the loaded samples in order, LANES per
// clock without a break, that wraps counts the passes, that a new load
// replaces the waveform, that an odd length drops its last sample and that a
// load longer than the buffer keeps only the first DEPTH samples.
module tb_tx_playback;
  import dpd_pkg::*;

  localparam int unsigned LANES = 2;
  localparam int unsigned DEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic play_en = 0;
  logic out_valid;
  iq_t  x_out [LANES];
  logic [$clog2(DEPTH+1)-1:0] loaded_len;
  logic [31:0] wraps;

  axis_if #(.DATA_W(32), .USER_W(17)) s_axis (.clk(clk), .rst_n(rst_n));

  tx_playback #(.LANES(LANES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .s_axis(s_axis), .play_en, .out_valid, .x_out, .loaded_len, .wraps);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] wave [200];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(int n);
    for (int k = 0; k < n; k++) begin
      while ($urandom % 3 == 0) begin s_axis.tvalid <= 0; @(posedge clk); end
      s_axis.tvalid <= 1;
      s_axis.tdata  <= wave[k];
      s_axis.tlast  <= (k == n - 1);
      @(posedge clk);
    end
    s_axis.tvalid <= 0;
    s_axis.tlast  <= 0;
    @(posedge clk);
  endtask

  // play and compare: expect `len` samples repeating, observe `clocks` clocks
  task automatic play_check(int len, int clocks, string tag);
    int idx = 0, breaks = 0, started = 0;
    int w0;
    w0 = wraps;
    play_en <= 1;
    for (int c = 0; c < clocks; c++) begin
      @(posedge clk);
      if (out_valid) begin
        started = 1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (x_out[l] !== iq_t'(wave[idx])) begin
            failures++;
            if (failures < 10) $display("%s: sample %0d got %h exp %h", tag, idx, x_out[l], wave[idx]);
          end
          idx = (idx + 1) % len;
        end
      end else if (started) breaks++;
    end
    play_en <= 0;
    @(posedge clk);
    @(posedge clk);
    check(breaks == 0, {tag, ": output continuous"});
    check(int'(wraps) - w0 == ((clocks - 2) * LANES) / len || int'(wraps) - w0 == ((clocks - 2) * LANES) / len + 1,
          {tag, ": wrap count"});
  endtask

  initial begin
    s_axis.tvalid = 0; s_axis.tdata = 0; s_axis.tlast = 0; s_axis.tuser = 0;
    for (int k = 0; k < 200; k++) wave[k] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // nothing loaded: no output
    play_en <= 1;
    repeat (5) @(posedge clk);
    check(!out_valid, "no output before a load");
    play_en <= 0;
    // waveform of 20 samples
    load(20);
    check(loaded_len == 20, "loaded length 20");
    play_check(20, 55, "len20");
    // new, odd-length waveform: last sample dropped
    for (int k = 0; k < 200; k++) wave[k] = $urandom;
    load(13);
    check(loaded_len == 12, "odd length rounded down");
    play_check(12, 40, "len12");
    // longer than the buffer
    for (int k = 0; k < 200; k++) wave[k] = $urandom;
    load(100);
    check(loaded_len == DEPTH, "overlong load clipped to DEPTH");
    play_check(DEPTH, 100, "full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
