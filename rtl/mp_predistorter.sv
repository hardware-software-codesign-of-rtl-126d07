// mp_predistorter: memory-polynomial digital predistorter, LANES samples/clock.
//
// Computes  y(n) = sum_{p=0..P} sum_{m=0..M} d_pm * x(n-m) * |x(n-m)|^p
// for a complex baseband stream that arrives LANES samples per clock (lane 0
// holds the oldest sample of a clock). The model, the two samples per clock
// and the option of more lanes follow the document; the pipeline and the
// number formats below are this design's.
//
// How it works, per lane: |x|^2 = I^2+Q^2 is registered, an isqrt_pipe stage
// chain turns it into |x| (Q1.15), a chain of P-1 registered multipliers forms
// |x|^2..|x|^P (Q5.15, truncated), and one registered stage forms the basis
// values B_p(n) = x(n)|x(n)|^p (Q7.15, truncated). Basis values are kept in a
// history so that every lane can reach B_p(n-m) of earlier lanes and earlier
// clocks. Each lane then multiplies all (P+1)(M+1) basis values with their
// complex coefficients (registered), sums the products in two registered
// levels (over the M+1 taps of each power, then over the powers) and rounds
// the sum half-up to Q1.15 with saturation (registered). Every stage holds at
// most one multiplier or a short adder chain, aiming at the 256 MHz fabric
// clock the document names (not verified on a device).
//
// Interface: in_valid/x_in take LANES samples in a clock; out_valid/y_out
// give the predistorted samples LATENCY clocks later, at the same rate. The
// basis history only advances on valid data, so gaps in the input do not
// break the memory of the model; it is cleared by reset, so samples before
// the first one count as zero. coef is the active coefficient set from
// coef_bank and may change between any two clocks.
module mp_predistorter
  import dpd_pkg::*;
#(
  parameter int unsigned LANES = 2,   // samples per clock
  parameter int unsigned P     = 4,   // nonlinearity order
  parameter int unsigned M     = 3,   // memory depth
  // clocks from x_in to y_out: input reg, |x|^2, isqrt, powers, basis,
  // products, two adder levels, output
  localparam int unsigned LATENCY = 1 + 1 + 16 + (P > 1 ? P - 1 : 0) + 1 + 1 + 2 + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  iq_t   x_in  [LANES],
  input  coef_t coef  [P+1][M+1],
  output logic  out_valid,
  output iq_t   y_out [LANES]
);
  localparam int unsigned NPS  = (P > 1) ? P - 1 : 0;        // power stages
  localparam int unsigned XDLY = 16 + NPS;                   // x delay from |x|^2 reg to basis
  localparam int unsigned HD   = (M + LANES - 1) / LANES;    // history depth in clocks
  localparam int unsigned NT   = (P + 1) * (M + 1);          // terms per output

  // ---------------------------------------------------------------- valid
  localparam int unsigned VBASIS = 1 + 1 + 16 + NPS + 1;     // valid at the basis register
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];
  wire basis_valid = vpipe[VBASIS-1];

  // basis of the current clock, per lane
  basis_t bas [LANES][P+1];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // ---------------- input register and |x|^2
    iq_t         x_r, x_m;
    logic [31:0] mag2_r;
    always_ff @(posedge clk) begin
      x_r    <= x_in[l];
      x_m    <= x_r;
      mag2_r <= 32'(($signed(x_r.i) * $signed(x_r.i))) + 32'(($signed(x_r.q) * $signed(x_r.q)));
    end

    // ---------------- magnitude
    logic [MAG_W-1:0] mag;
    isqrt_pipe #(.IN_W(32)) u_sqrt (.clk(clk), .v(mag2_r), .root(mag));

    // x delayed to line up with the magnitude and the power chain
    iq_t xd [XDLY];
    always_ff @(posedge clk) begin
      xd[0] <= x_m;
      for (int k = 1; k < XDLY; k++) xd[k] <= xd[k-1];
    end
    // xd[15] lines up with mag, xd[XDLY-1] with the last power stage

    // ---------------- powers |x|^p, p = 0..P
    logic [POW_W-1:0] pw0 [P+1];
    always_comb begin
      pw0 = '{default: '0};
      pw0[0] = POW_W'(1) << FRAC;
      if (P >= 1) pw0[1] = POW_W'(mag);
    end

    logic [POW_W-1:0] pws [NPS+1][P+1];
    logic [MAG_W-1:0] mags [NPS+1];
    assign pws[0]  = pw0;
    assign mags[0] = mag;
    for (genvar j = 1; j <= NPS; j++) begin : g_pow
      logic [POW_W+MAG_W-1:0] prod;
      assign prod = pws[j-1][j] * mags[j-1];
      always_ff @(posedge clk) begin
        for (int p = 0; p <= P; p++)
          pws[j][p] <= (p == j + 1) ? POW_W'(prod >> FRAC) : pws[j-1][p];
        mags[j] <= mags[j-1];
      end
    end

    // ---------------- basis B_p = x |x|^p
    iq_t xb;
    assign xb = (NPS == 0) ? xd[15] : xd[XDLY-1];
    always_ff @(posedge clk) begin
      for (int p = 0; p <= P; p++) begin
        logic signed [SAMPLE_W+POW_W:0] bi, bq;
        bi = $signed(xb.i) * $signed({1'b0, pws[NPS][p]});
        bq = $signed(xb.q) * $signed({1'b0, pws[NPS][p]});
        bas[l][p].i <= BASIS_W'(bi >>> FRAC);
        bas[l][p].q <= BASIS_W'(bq >>> FRAC);
      end
    end
  end

  // ---------------------------------------------------------------- history
  // hist[d][l][p] = basis of lane l, d valid clocks before the current one
  basis_t hist [HD+1][LANES][P+1];
  assign hist[0] = bas;
  if (HD > 0) begin : g_hist
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int d = 1; d <= HD; d++)
          for (int l = 0; l < LANES; l++)
            for (int p = 0; p <= P; p++) hist[d][l][p] <= '0;
      end else if (basis_valid) begin
        for (int d = 1; d <= HD; d++) hist[d] <= hist[d-1];
      end
    end
  end

  // ---------------------------------------------------------------- MAC
  for (genvar l = 0; l < LANES; l++) begin : g_mac
    logic signed [ACC_W-1:0] pr_re [NT];
    logic signed [ACC_W-1:0] pr_im [NT];
    logic signed [ACC_W-1:0] acc_re, acc_im;

    for (genvar p = 0; p <= P; p++) begin : g_p
      for (genvar m = 0; m <= M; m++) begin : g_m
        // sample n-m sits in lane (l-m) mod LANES, (m-l+LANES-1)/LANES clocks back
        localparam int signed T  = int'(l) - int'(m);
        localparam int unsigned D  = (T >= 0) ? 0 : (m - l + LANES - 1) / LANES;
        localparam int unsigned SL = (T >= 0) ? T : T + D * LANES;
        basis_t b;
        coef_t  c;
        assign b = hist[D][SL][p];
        assign c = coef[p][m];
        always_ff @(posedge clk) begin
          pr_re[p*(M+1)+m] <= ACC_W'($signed(b.i) * $signed(c.re)) - ACC_W'($signed(b.q) * $signed(c.im));
          pr_im[p*(M+1)+m] <= ACC_W'($signed(b.i) * $signed(c.im)) + ACC_W'($signed(b.q) * $signed(c.re));
        end
      end
    end

    // two-level adder: per power p over the M+1 taps, then over the powers
    logic signed [ACC_W-1:0] ps_re [P+1];
    logic signed [ACC_W-1:0] ps_im [P+1];
    always_ff @(posedge clk) begin
      for (int p = 0; p <= P; p++) begin
        logic signed [ACC_W-1:0] sr, si;
        sr = '0;
        si = '0;
        for (int m = 0; m <= M; m++) begin
          sr += pr_re[p*(M+1)+m];
          si += pr_im[p*(M+1)+m];
        end
        ps_re[p] <= sr;
        ps_im[p] <= si;
      end
    end

    always_ff @(posedge clk) begin
      logic signed [ACC_W-1:0] sr, si;
      sr = '0;
      si = '0;
      for (int p = 0; p <= P; p++) begin
        sr += ps_re[p];
        si += ps_im[p];
      end
      acc_re <= sr;
      acc_im <= si;
      y_out[l].i <= round_sat(acc_re);
      y_out[l].q <= round_sat(acc_im);
    end
  end

endmodule
