// tb_rx_capture: self-checking test of the receive capture window.
//
// Feeds a random sample stream, LANES per clock with random gaps, and keeps a
// log of every valid sample with the clock edge it was presented at. Captures
// are started at random moments; the expected window is the first len valid
// samples presented after the edge that took start. After done, the whole
// buffer is read back through the read port and compared, and done, busy,
// captured and the handling of start during a capture and of an oversized
// len are checked. The time from start to done is checked against the number
// of clocks the window needed.
module tb_rx_capture;
  import dpd_pkg::*;

  localparam int unsigned LANES = 2;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned LA = $clog2(DEPTH + 1);
  localparam int unsigned SA = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  iq_t  adc_in [LANES];
  logic start = 0;
  logic [LA-1:0] len = 0;
  logic busy, done;
  logic [LA-1:0] captured;
  logic [SA-1:0] rd_addr = 0;
  iq_t  rd_data;

  rx_capture #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stimulus log
  iq_t log_s [$];
  int  log_edge [$];
  int  edge_no = 0;
  bit  feeding = 0;
  int  last_start_edge = 0;

  always @(posedge clk) begin
    edge_no++;
    if (start) last_start_edge = edge_no;
    if (adc_valid) for (int l = 0; l < LANES; l++) begin
      log_s.push_back(adc_in[l]);
      log_edge.push_back(edge_no);
    end
    if (feeding) begin
      adc_valid <= ($urandom % 5 != 0);
      for (int l = 0; l < LANES; l++) adc_in[l] <= $urandom;
    end else adc_valid <= 0;
  end

  task automatic capture(int req_len, bit poke_start);
    int start_edge, eff, first, done_edge, last_edge;
    @(negedge clk);
    start = 1; len = LA'(req_len);
    @(negedge clk);
    start_edge = last_start_edge;
    start = 0;
    eff = (req_len > DEPTH ? DEPTH : req_len) / LANES * LANES;
    while (!done) begin
      if (poke_start) begin start = 1; len = 4; end   // must be ignored
      @(negedge clk);
      start = 0;
    end
    done_edge = edge_no;
    check(captured == LA'(eff), $sformatf("captured %0d exp %0d", captured, eff));
    // locate the expected window in the log
    first = -1;
    for (int k = 0; k < log_s.size(); k++) if (log_edge[k] > start_edge) begin first = k; break; end
    if (eff > 0) begin
      last_edge = log_edge[first + eff - 1];
      check(done_edge == last_edge + 1, $sformatf("done at edge %0d, expected %0d", done_edge, last_edge + 1));
    end
    // read back
    for (int a = 0; a < eff; a++) begin
      @(negedge clk);
      rd_addr = SA'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== log_s[first + a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rd_data, log_s[first + a]);
      end
    end
    check(!busy, "idle after done");
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) adc_in[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    feeding = 1;
    repeat (7) @(posedge clk);
    capture(40, 0);
    repeat ($urandom % 13) @(posedge clk);
    capture(DEPTH, 1);
    repeat ($urandom % 13) @(posedge clk);
    capture(33, 0);            // odd: rounded down
    capture(DEPTH + 1, 0);     // clipped
    capture(0, 0);             // empty window
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
