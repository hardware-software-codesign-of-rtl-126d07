// tb_coef_bank: self-checking test of the coefficient store.
//
// Checks the identity set after reset, that writes stay invisible until a
// commit, that a commit shows the whole new set one clock later (including a
// write made in the commit clock), that out-of-range addresses are ignored,
// and the commit counter.
module tb_coef_bank;
  import dpd_pkg::*;

  localparam int unsigned P = 4;
  localparam int unsigned M = 3;
  localparam int unsigned NC = (P + 1) * (M + 1);
  localparam int unsigned AW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = 0;
  coef_t wr_data = '0;
  logic commit = 0;
  coef_t coef [P+1][M+1];
  logic [15:0] commits;

  coef_bank #(.P(P), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t model [NC];     // expected active set
  coef_t pend  [NC];     // expected shadow set

  task automatic compare(string tag);
    for (int p = 0; p <= P; p++)
      for (int m = 0; m <= M; m++) begin
        checks++;
        if (coef[p][m] !== model[p * (M + 1) + m]) begin
          failures++;
          if (failures < 10) $display("%s: d[%0d][%0d] = %h, expected %h", tag, p, m, coef[p][m], model[p*(M+1)+m]);
        end
      end
  endtask

  task automatic write(int a, coef_t d, bit with_commit);
    @(negedge clk);
    wr_en = 1; wr_addr = AW'(a); wr_data = d; commit = with_commit;
    if (a < NC) pend[a] = d;
    @(posedge clk);
    #1;
    wr_en = 0; commit = 0;
    if (with_commit) model = pend;
  endtask

  initial begin
    for (int k = 0; k < NC; k++) model[k] = '0;
    model[0].re = 18'h08000;
    pend = model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    compare("reset");
    checks++; if (commits != 0) failures++;
    // new set, not yet committed
    for (int k = 0; k < NC; k++) write(k, coef_t'(36'($urandom) ^ (36'($urandom) << 18)), 0);
    compare("before commit");
    write(NC + 3 < (1 << AW) ? NC + 3 : NC, coef_t'(36'h123456789), 0);   // ignored
    compare("bad address");
    @(negedge clk); commit = 1; @(posedge clk); #1; commit = 0; model = pend;
    compare("after commit");
    // write together with commit
    write(5, coef_t'(36'hABCDE1234), 1);
    compare("write+commit");
    checks++; if (commits != 2) begin failures++; $display("commits %0d", commits); end
    // partial update, then commit
    write(0, coef_t'(36'h00001FFFF), 0);
    write(NC - 1, coef_t'(36'h3FFFF0001), 0);
    compare("partial pending");
    write(7, coef_t'(36'h111112222), 1);
    compare("partial commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
