// coef_bank: DPD coefficient store with atomic update.
//
// The software training loop writes a new set of memory-polynomial
// coefficients d_pm one word at a time into a shadow bank; a commit pulse
// then copies the whole shadow bank into the active bank in a single clock,
// so the predistorter never runs with a half-updated set. Word address
// a = p*(M+1) + m selects d_pm. After reset both banks hold the identity
// predistorter (d_00 = 1.0, all others 0), which passes the signal through.
// Applying revised coefficients from the processor follows the document; the
// shadow/commit scheme, the addressing and the reset value are choices of
// this design.
//
// Timing: a write is stored at the clock edge where wr_en is high; a commit
// makes the shadow bank (including a write in the same cycle) visible on
// coef one clock later. commits counts the commits made (wraps).
module coef_bank
  import dpd_pkg::*;
#(
  parameter int unsigned P = 4,                // nonlinearity order
  parameter int unsigned M = 3,                // memory depth
  localparam int unsigned NCOEF = (P + 1) * (M + 1),
  localparam int unsigned AW    = $clog2(NCOEF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  coef_t         wr_data,
  input  logic          commit,
  output coef_t         coef [P+1][M+1],
  output logic [15:0]   commits
);
  localparam coef_t ONE  = '{re: COEF_W'(1) <<< COEF_FRAC, im: '0};
  localparam coef_t ZERO = '{re: '0, im: '0};

  coef_t shadow [NCOEF];
  coef_t active [NCOEF];
  coef_t shadow_n [NCOEF];

  always_comb begin
    shadow_n = shadow;
    if (wr_en && wr_addr < AW'(NCOEF)) shadow_n[wr_addr] = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCOEF; k++) begin
        shadow[k] <= (k == 0) ? ONE : ZERO;
        active[k] <= (k == 0) ? ONE : ZERO;
      end
      commits <= '0;
    end else begin
      shadow <= shadow_n;
      if (commit) begin
        active  <= shadow_n;
        commits <= commits + 16'd1;
      end
    end
  end

  for (genvar p = 0; p <= P; p++) begin : g_p
    for (genvar m = 0; m <= M; m++) begin : g_m
      assign coef[p][m] = active[p * (M + 1) + m];
    end
  end

endmodule
