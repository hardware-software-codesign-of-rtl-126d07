// axis_if: 32-bit AXI4-Stream bundle between the programmable logic and the
// processor side.
//
// The PS/PL boundary of the design is one 32-bit AXI stream in each
// direction (that width follows the document). One beat carries one complex
// sample packed as {Q, I}. tuser carries side information defined by the
// producer (the training-set selector puts the sample's index and a
// "selected" flag there); tlast marks the final beat of a transfer. A beat
// moves at a rising clock edge where tvalid and tready are both high.
//
// The interface also checks the AXI-Stream rule that a producer holding
// tvalid may not drop it or change its payload until the beat is taken.
// The assertion samples rst_n on the clock to switch itself off during
// reset; that is the only synchronous use of the otherwise asynchronous
// reset, and lint tools may point it out.
interface axis_if #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned USER_W = 17
) (
  input logic clk,
  input logic rst_n
);
  logic              tvalid;
  logic              tready;
  logic [DATA_W-1:0] tdata;
  logic [USER_W-1:0] tuser;
  logic              tlast;

  modport master (output tvalid, tdata, tuser, tlast, input tready);
  modport slave  (input tvalid, tdata, tuser, tlast, output tready);

  // payload stable and tvalid held while a beat waits
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (tvalid && !tready) |=> (tvalid && $stable(tdata) && $stable(tuser) && $stable(tlast));
  endproperty
  a_hold: assert property (p_hold) else $error("axis_if: beat changed or dropped while stalled");

endinterface
