// dpd_top: programmable-logic side of an adaptive memory-polynomial digital
// predistortion (DPD) transmitter.
//
// Transmit path: the processor loads a waveform over a 32-bit AXI stream
// (s_axis_*) into tx_playback, which replays it endlessly, LANES samples per
// clock, through mp_predistorter to the RF-DAC port (dac_*). The
// predistorter uses the coefficient set held by coef_bank, which the
// processor rewrites (coef_wr_*) and activates atomically (coef_commit).
//
// Feedback path: the attenuated PA output arrives on the RF-ADC port
// (adc_*). On cap_start the next cap_len samples are stored by rx_capture;
// when the window is complete pdf_selector compresses it (compress_en,
// ratio) and streams the training samples to the processor over a 32-bit
// AXI stream (m_axis_*), each tagged in tuser with {chosen, index}. The
// processor aligns them with the transmitted signal, solves for new
// coefficients by least squares and writes them back; that software, the DMA
// engines, the data converters and the amplifier are outside this module.
//
// The split (predistorter, capture and sample transfer in logic; alignment
// and training in software), two samples per clock, the 32-bit streams and
// the compression method follow the document. The on-chip playback buffer in
// place of external DRAM, the control ports and the handshakes are this
// design's. cap_start is ignored while a capture or its transfer is in
// progress (cap_busy); cap_done pulses when the transfer has ended.
module dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned LANES     = 2,       // samples per clock
  parameter int unsigned P         = 4,       // nonlinearity order
  parameter int unsigned M         = 3,       // memory depth
  parameter int unsigned TX_DEPTH  = 40960,   // playback buffer, samples
  parameter int unsigned CAP_DEPTH = 40960,   // capture window, samples
  parameter int unsigned NBINS     = 32,      // histogram resolution
  localparam int unsigned NCOEF = (P + 1) * (M + 1),
  localparam int unsigned CAW   = $clog2(NCOEF),
  localparam int unsigned TLA   = $clog2(TX_DEPTH + 1),
  localparam int unsigned CLA   = $clog2(CAP_DEPTH + 1),
  localparam int unsigned CSA   = $clog2(CAP_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // waveform load from the processor
  input  logic [31:0]      s_axis_tdata,
  input  logic             s_axis_tvalid,
  input  logic             s_axis_tlast,
  output logic             s_axis_tready,
  input  logic             play_en,
  // coefficient update from the processor
  input  logic             coef_wr_en,
  input  logic [CAW-1:0]   coef_wr_addr,
  input  coef_t            coef_wr_data,
  input  logic             coef_commit,
  // RF-DAC
  output logic             dac_valid,
  output iq_t              dac_data [LANES],
  // RF-ADC
  input  logic             adc_valid,
  input  iq_t              adc_data [LANES],
  // capture control
  input  logic             cap_start,
  input  logic [CLA-1:0]   cap_len,
  input  logic             compress_en,
  input  logic [15:0]      ratio,
  // training samples to the processor
  output logic [31:0]      m_axis_tdata,
  output logic [CSA:0]     m_axis_tuser,
  output logic             m_axis_tvalid,
  output logic             m_axis_tlast,
  input  logic             m_axis_tready,
  // status
  output logic [TLA-1:0]   tx_len,
  output logic [31:0]      tx_wraps,
  output logic [15:0]      coef_commits,
  output logic             cap_busy,
  output logic             cap_done,
  output logic [CLA-1:0]   chosen_total,
  output logic [CLA-1:0]   sent
);
  // ---------------- transmit path
  axis_if #(.DATA_W(32), .USER_W(CSA + 1)) load_s (.clk(clk), .rst_n(rst_n));
  assign load_s.tdata   = s_axis_tdata;
  assign load_s.tvalid  = s_axis_tvalid;
  assign load_s.tlast   = s_axis_tlast;
  assign load_s.tuser   = '0;
  assign s_axis_tready  = load_s.tready;

  logic  pb_valid;
  iq_t   pb_x [LANES];
  coef_t coef [P+1][M+1];

  tx_playback #(.LANES(LANES), .DEPTH(TX_DEPTH)) u_playback (
    .clk, .rst_n, .s_axis(load_s), .play_en,
    .out_valid(pb_valid), .x_out(pb_x), .loaded_len(tx_len), .wraps(tx_wraps));

  coef_bank #(.P(P), .M(M)) u_coef (
    .clk, .rst_n, .wr_en(coef_wr_en), .wr_addr(coef_wr_addr), .wr_data(coef_wr_data),
    .commit(coef_commit), .coef, .commits(coef_commits));

  mp_predistorter #(.LANES(LANES), .P(P), .M(M)) u_dpd (
    .clk, .rst_n, .in_valid(pb_valid), .x_in(pb_x), .coef,
    .out_valid(dac_valid), .y_out(dac_data));

  // ---------------- feedback path
  logic          c_busy, c_done, sel_busy, sel_done;
  logic [CLA-1:0] c_captured;
  logic [CSA-1:0] rd_addr;
  iq_t            rd_data;

  rx_capture #(.LANES(LANES), .DEPTH(CAP_DEPTH)) u_capture (
    .clk, .rst_n, .adc_valid, .adc_in(adc_data),
    .start(cap_start && !sel_busy && !c_done), .len(cap_len),
    .busy(c_busy), .done(c_done), .captured(c_captured),
    .rd_addr, .rd_data);

  axis_if #(.DATA_W(32), .USER_W(CSA + 1)) train_m (.clk(clk), .rst_n(rst_n));

  pdf_selector #(.DEPTH(CAP_DEPTH), .NBINS(NBINS), .M(M)) u_select (
    .clk, .rst_n, .start(c_done), .n(c_captured), .compress_en, .ratio,
    .rd_addr, .rd_data, .m_axis(train_m),
    .busy(sel_busy), .done(sel_done), .chosen_total, .sent);

  assign m_axis_tdata   = train_m.tdata;
  assign m_axis_tuser   = train_m.tuser;
  assign m_axis_tvalid  = train_m.tvalid;
  assign m_axis_tlast   = train_m.tlast;
  assign train_m.tready = m_axis_tready;

  assign cap_busy = c_busy || c_done || sel_busy;
  assign cap_done = sel_done;

endmodule
