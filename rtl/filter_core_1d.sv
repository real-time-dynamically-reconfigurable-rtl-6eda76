// filter_core_1d: the 1D filter core. It holds the control unit and the
// reconfigurable filter slot, and the configuration path that rewrites the
// slot with a partial-bitstream image.
//
// Samples and commands come in on one FSL link (reading side) and filtered
// samples leave on another (writing side); see filter_ctrl for the word
// format and the stall rule. Bitstream images arrive one 32-bit word per
// clock on cfg_valid/cfg_word; see prr_loader for the format. Between two
// passes the same slot is loaded with a row filter, then a column filter,
// then the next row filter, which is how one 1-D filter serves a whole bank
// of separable 2-D filters. An image must only be sent while `idle` is high.
// Latency: a sample taken from the input link is written to the output link
// $clog2(IN_W)+3 advances later (7 clocks for 16-bit samples).
module filter_core_1d #(
  parameter int unsigned NTAPS  = fb_pkg::NTAPS,
  parameter int unsigned COEF_W = fb_pkg::COEF_W,
  parameter int unsigned IN_W   = fb_pkg::IN_W,
  parameter int unsigned OUT_W  = fb_pkg::OUT_W,
  parameter int unsigned LUT_IN = fb_pkg::LUT_IN,
  parameter int unsigned DATA_W = fb_pkg::FSL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // input link, reading side
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_ctrl,
  input  logic              s_exists,
  output logic              s_read,
  // output link, writing side
  output logic [DATA_W-1:0] m_data,
  output logic              m_ctrl,
  output logic              m_write,
  input  logic              m_full,
  // configuration words
  input  logic              cfg_valid,
  input  logic [31:0]       cfg_word,
  // status
  output logic              slot_ready,
  output logic              slot_busy,
  output logic              cfg_done,
  output logic [15:0]       filter_id,
  output logic              idle,
  output logic              stalled
);
  localparam int unsigned LUT_WORDS = fb_pkg::lut_words(NTAPS, LUT_IN);
  localparam int unsigned LUT_W     = COEF_W + $clog2(LUT_IN);
  localparam int unsigned AW        = $clog2(LUT_WORDS);

  logic                    lut_we, shift_we;
  logic [AW-1:0]           lut_addr;
  logic signed [LUT_W-1:0] lut_data;
  logic [4:0]              shift;

  logic                    f_adv, f_in_valid, f_clear, f_out_valid, f_out_sat;
  logic signed [IN_W-1:0]  f_in_data;
  logic signed [OUT_W-1:0] f_out_data;

  prr_loader #(.LUT_WORDS(LUT_WORDS), .LUT_W(LUT_W)) u_loader (
    .clk, .rst_n,
    .cfg_valid, .cfg_word,
    .lut_we, .lut_addr, .lut_data, .shift_we, .shift,
    .slot_busy, .slot_ready, .done(cfg_done), .filter_id
  );

  da_fir #(.NTAPS(NTAPS), .COEF_W(COEF_W), .IN_W(IN_W), .OUT_W(OUT_W), .LUT_IN(LUT_IN)) u_prr (
    .clk, .rst_n,
    .cfg_we(lut_we), .cfg_addr(lut_addr), .cfg_data(lut_data),
    .cfg_shift_we(shift_we), .cfg_shift(shift),
    .adv(f_adv), .in_valid(f_in_valid), .in_data(f_in_data), .clear(f_clear),
    .out_valid(f_out_valid), .out_data(f_out_data), .out_sat(f_out_sat)
  );

  filter_ctrl #(.IN_W(IN_W), .OUT_W(OUT_W), .DATA_W(DATA_W)) u_ctrl (
    .clk, .rst_n,
    .s_data, .s_ctrl, .s_exists, .s_read,
    .m_data, .m_ctrl, .m_write, .m_full,
    .slot_ready, .slot_busy,
    .f_adv, .f_in_valid, .f_in_data, .f_clear,
    .f_out_valid, .f_out_data, .f_out_sat,
    .idle, .stalled
  );

endmodule
