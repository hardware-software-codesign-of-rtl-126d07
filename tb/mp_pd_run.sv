// mp_pd_run: test sequence for one mp_predistorter configuration, used by
// tb_mp_predistorter.
//
// Drives random complex samples, LANES per clock, with random gaps in
// in_valid, under three coefficient sets (identity, random, large enough to
// saturate). A reference model in this file evaluates
// y(n) = sum_p sum_m d_pm x(n-m)|x(n-m)|^p with the documented number
// formats (floor square root, truncated powers and basis values, half-up
// rounding with saturation) and every output sample is compared with it.
// Also checked: the latency from the first input to the first output
// (26 clocks for P = 4) and that an unbroken input gives an unbroken output.
module mp_pd_run #(
  parameter int unsigned LANES = 2
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import dpd_pkg::*;

  localparam int unsigned P = 4;
  localparam int unsigned M = 3;
  localparam int unsigned NS = 600;        // samples per run, a multiple of LANES
  localparam int unsigned EXP_LAT = 26;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  iq_t  x_in [LANES];
  coef_t coef [P+1][M+1];
  logic out_valid;
  iq_t  y_out [LANES];


  mp_predistorter #(.LANES(LANES), .P(P), .M(M)) dut (.*);

  always #5 clk = ~clk;


  // ---------------- reference model
  function automatic longint isqrt_ref(longint v);
    longint lo = 0, hi = 65536;
    while (hi - lo > 1) begin
      longint mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  iq_t xs [NS];
  iq_t ys [NS];

  function automatic longint trunc_s(longint v, int w);   // keep w LSBs, signed
    longint m = (longint'(1) << w);
    v = v & (m - 1);
    if (v >= m / 2) v -= m;
    return v;
  endfunction

  task automatic reference();
    longint br [NS][P+1], bi [NS][P+1];
    for (int n = 0; n < NS; n++) begin
      longint i = longint'($signed(xs[n].i)), q = longint'($signed(xs[n].q));
      longint mag = isqrt_ref(i * i + q * q);
      longint pw = 32768;
      for (int p = 0; p <= P; p++) begin
        if (p == 1) pw = mag;
        else if (p > 1) pw = ((pw * mag) >> 15) & ((1 << POW_W) - 1);
        br[n][p] = trunc_s((i * pw) >>> 15, BASIS_W);
        bi[n][p] = trunc_s((q * pw) >>> 15, BASIS_W);
      end
    end
    for (int n = 0; n < NS; n++) begin
      longint sr = 0, si = 0, r;
      for (int p = 0; p <= P; p++)
        for (int m = 0; m <= M; m++)
          if (n - m >= 0) begin
            longint cr = longint'($signed(coef[p][m].re)), ci = longint'($signed(coef[p][m].im));
            sr += br[n-m][p] * cr - bi[n-m][p] * ci;
            si += br[n-m][p] * ci + bi[n-m][p] * cr;
          end
      r = (sr + 16384) >>> 15;
      ys[n].i = (r > 32767) ? 16'sh7fff : (r < -32768) ? 16'sh8000 : 16'(r);
      r = (si + 16384) >>> 15;
      ys[n].q = (r > 32767) ? 16'sh7fff : (r < -32768) ? 16'sh8000 : 16'(r);
    end
  endtask

  // ---------------- output collection
  int ocount;
  int cyc, first_in_cyc, first_out_cyc;
  bit seen_in;
  int out_breaks;           // out_valid dropping between first and last output
  bit last_ov;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !seen_in) begin first_in_cyc = cyc; seen_in = 1; end
    if (out_valid && rst_n) begin
      if (ocount == 0) first_out_cyc = cyc;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (y_out[l] !== ys[ocount + l]) begin
          failures++;
          if (failures < 10)
            $display("mismatch n=%0d got %h exp %h", ocount + l, y_out[l], ys[ocount+l]);
        end
      end
      ocount += LANES;
    end else if (last_ov && ocount > 0 && ocount < NS) out_breaks++;
    last_ov <= out_valid && rst_n;
  end

  task automatic run(int mode, bit with_gaps);
    // coefficient set
    for (int p = 0; p <= P; p++)
      for (int m = 0; m <= M; m++) begin
        coef[p][m] = '0;
        if (mode == 1) begin
          coef[p][m].re = COEF_W'($signed(16'($urandom)) >>> 2);
          coef[p][m].im = COEF_W'($signed(16'($urandom)) >>> 2);
        end else if (mode == 2) begin
          coef[p][m].re = COEF_W'($signed(18'($urandom)));
          coef[p][m].im = COEF_W'($signed(18'($urandom)));
        end
      end
    if (mode == 0) coef[0][0].re = 18'sd32768;
    for (int n = 0; n < NS; n++) begin
      int a = (n % 7 == 0) ? 0 : (n % 5 == 0 ? 2 : 4);   // include full-scale samples
      xs[n].i = 16'($signed(16'($urandom)) >>> a);
      xs[n].q = 16'($signed(16'($urandom)) >>> a);
    end
    if (mode == 0) begin xs[3].i = 16'sh8000; xs[3].q = 16'sh8000; end
    reference();
    // reset clears the model memory
    rst_n = 0; ocount = 0; out_breaks = 0; seen_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n + LANES <= NS; n += LANES) begin
      if (with_gaps) while ($urandom % 4 == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      for (int l = 0; l < LANES; l++) x_in[l] <= xs[n + l];
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (EXP_LAT + 10) @(posedge clk);
    checks++;
    if (ocount != NS) begin failures++; $display("run %0d: %0d outputs, expected %0d", mode, ocount, NS); end
    checks++;
    if (first_out_cyc - first_in_cyc != EXP_LAT) begin
      failures++; $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, EXP_LAT);
    end
    if (!with_gaps) begin
      checks++;
      if (out_breaks != 0) begin failures++; $display("output not continuous: %0d breaks", out_breaks); end
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    cyc = 0; ocount = 0; last_ov = 0;
    for (int l = 0; l < LANES; l++) x_in[l] = '0;
    run(0, 0);
    run(1, 0);
    run(1, 1);
    run(2, 1);
    finished = 1;
  end
endmodule
