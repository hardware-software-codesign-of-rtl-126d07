// isqrt_pipe: pipelined integer square root, floor(sqrt(v)).
//
// Used by the predistorter to turn the squared magnitude I^2+Q^2 of a sample
// into its magnitude |x|, which the odd powers |x|^p of the memory polynomial
// need. It is the classic digit-by-digit (bit-pair) method: each of the
// IN_W/2 stages decides one result bit with one subtraction and one compare,
// and each stage is registered, so a new operand is accepted every clock and
// the result appears IN_W/2 clocks later. The document only says that the
// basis functions use |x|; this implementation of the magnitude is a choice of
// this design.
//
// Ports: v (IN_W-bit unsigned operand, taken every clock), root
// (IN_W/2-bit result of the operand presented LATENCY = IN_W/2 clocks
// earlier). No reset: the pipeline holds data only.
module isqrt_pipe #(
  parameter int unsigned IN_W = 32
) (
  input  logic                clk,
  input  logic [IN_W-1:0]     v,
  output logic [IN_W/2-1:0]   root
);
  localparam int unsigned N = IN_W / 2;

  logic [IN_W-1:0] op_q  [N];   // remaining operand after each stage
  logic [IN_W-1:0] res_q [N];   // partial result (scaled) after each stage

  for (genvar s = 0; s < N; s++) begin : g_stage
    // bit pair weight handled by this stage
    localparam logic [IN_W-1:0] ONE = IN_W'(1) << (IN_W - 2 - 2 * s);
    logic [IN_W-1:0] op_i, res_i, op_n, res_n;
    if (s == 0) begin : g_first
      assign op_i  = v;
      assign res_i = '0;
    end else begin : g_next
      assign op_i  = op_q[s-1];
      assign res_i = res_q[s-1];
    end
    always_comb begin
      if (op_i >= res_i + ONE) begin
        op_n  = op_i - (res_i + ONE);
        res_n = (res_i >> 1) + ONE;
      end else begin
        op_n  = op_i;
        res_n = res_i >> 1;
      end
    end
    always_ff @(posedge clk) begin
      op_q[s]  <= op_n;
      res_q[s] <= res_n;
    end
  end

  assign root = res_q[N-1][N-1:0];

endmodule
