// filter_ctrl: control unit of the 1D filter core. It sits between the two
// FSL links and the filter slot and moves samples through the filter.
//
// Each word read from the input link is either a sample (control bit low:
// the low IN_W bits are a signed sample, row pixels arrive zero-extended) or
// a command (control bit high, fb_pkg::fsl_cmd_e in the low bits): CMD_CLEAR
// zeroes the filter's delay line so that every row or column starts from
// rest. Each filtered sample is written to the output link, sign-extended to
// 32 bits, with the control bit set when it was saturated.
//
// The filter pipeline is advanced as a whole (adv). It stops only when a
// finished result cannot be written because the output link is full; it
// also stops while the slot is not ready (being reconfigured or not yet
// configured). One word is taken from the input link per advance, so the
// core takes and gives one sample per clock when nothing blocks it.
// `idle` is high when no accepted sample is still inside the pipeline; the
// slot must only be rewritten while idle (checked by an assertion).
// The control unit's place between the links and the slot follows the
// design; its command word, stall rule and status outputs are this
// design's choices.
module filter_ctrl #(
  parameter int unsigned IN_W    = fb_pkg::IN_W,
  parameter int unsigned OUT_W   = fb_pkg::OUT_W,
  parameter int unsigned DATA_W  = fb_pkg::FSL_W,
  parameter int unsigned MAX_LAT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input link, reading side
  input  logic [DATA_W-1:0]       s_data,
  input  logic                    s_ctrl,
  input  logic                    s_exists,
  output logic                    s_read,
  // output link, writing side
  output logic [DATA_W-1:0]       m_data,
  output logic                    m_ctrl,
  output logic                    m_write,
  input  logic                    m_full,
  // filter slot
  input  logic                    slot_ready,
  input  logic                    slot_busy,
  output logic                    f_adv,
  output logic                    f_in_valid,
  output logic signed [IN_W-1:0]  f_in_data,
  output logic                    f_clear,
  input  logic                    f_out_valid,
  input  logic signed [OUT_W-1:0] f_out_data,
  input  logic                    f_out_sat,
  // status
  output logic                    idle,
  output logic                    stalled
);
  import fb_pkg::*;

  localparam int unsigned CW = $clog2(MAX_LAT + 1);
  logic [CW-1:0] inflight;

  logic blocked, take;
  assign blocked = f_out_valid && m_full;
  assign f_adv   = slot_ready && !blocked;
  assign take    = f_adv && s_exists;
  assign s_read  = take;

  assign f_in_valid = take && !s_ctrl;
  assign f_clear    = take && s_ctrl && (fsl_cmd_e'(s_data[1:0]) == CMD_CLEAR);
  assign f_in_data  = s_data[IN_W-1:0];

  assign m_write = slot_ready && f_out_valid && !m_full;
  assign m_data  = DATA_W'(f_out_data);
  assign m_ctrl  = f_out_sat;

  assign idle    = (inflight == '0);
  assign stalled = slot_ready && blocked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + CW'(f_in_valid) - CW'(m_write);
  end

  a_reconfig_idle: assert property (@(posedge clk) disable iff (!rst_n) slot_busy |-> idle);

endmodule
