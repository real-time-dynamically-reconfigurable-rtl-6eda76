// filterbank_top: dynamically reconfigurable 2-D filterbank.
//
// A bank of separable 2-D FIR filters is applied to a frame with hardware
// for only one 1-D filter. The sequencer streams the frame row by row
// through the 1D filter core, stores the result, has the core's filter slot
// rewritten with the column filter, streams the stored frame column by
// column, and then rewrites the slot with the row filter of the next 2-D
// filter. Frames, intermediate results and the bitstream images all live in
// an external memory reached through the single memory port.
//
//   memory <-> fb_sequencer --FSL--> filter_core_1d --FSL--> fb_sequencer
//                     \--- configuration words ---> (slot rewrite)
//
// Job interface: set rows, cols, nfilt and the four base addresses, pulse
// start; frame_done pulses when all nfilt output frames are in memory and
// the slot again holds the first row filter. frame_cycles and cfg_cycles
// then give the clocks the frame took and the part spent reconfiguring. See fb_sequencer for the
// memory layout and the memory handshake. The processor, bus, memory
// controller and configuration-port primitive of an FPGA system are outside
// this module: the memory port is where they would connect.
module filterbank_top #(
  parameter int unsigned ADDR_W    = 25,
  parameter int unsigned DIM_W     = 11,
  parameter int unsigned NF_W      = 4,
  parameter int unsigned FSL_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // job
  input  logic              start,
  input  logic [DIM_W-1:0]  rows,
  input  logic [DIM_W-1:0]  cols,
  input  logic [NF_W-1:0]   nfilt,
  input  logic [ADDR_W-1:0] in_base,
  input  logic [ADDR_W-1:0] tmp_base,
  input  logic [ADDR_W-1:0] out_base,
  input  logic [ADDR_W-1:0] bs_base,
  output logic              busy,
  output logic              frame_done,
  // memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // status
  output logic [NF_W-1:0]   cur_filter,
  output logic              cur_is_col,
  output logic              loading,
  output logic [31:0]       frame_cycles,
  output logic [31:0]       cfg_cycles,
  output logic              cfg_done,
  output logic [15:0]       filter_id,
  output logic              slot_ready,
  output logic              core_stalled,
  output logic              line_clear,
  output logic              sat_out
);
  localparam int unsigned W = fb_pkg::FSL_W;

  // sequencer -> core link
  logic [W-1:0] a_m_data, a_s_data;
  logic         a_m_ctrl, a_m_write, a_m_full, a_m_afull;
  logic         a_s_ctrl, a_s_exists, a_s_read;
  // core -> sequencer link
  logic [W-1:0] b_m_data, b_s_data;
  logic         b_m_ctrl, b_m_write, b_m_full, b_m_afull;
  logic         b_s_ctrl, b_s_exists, b_s_read;

  logic         cfg_valid;
  logic [31:0]  cfg_word;
  logic         slot_busy, core_idle;

  fb_sequencer #(.ADDR_W(ADDR_W), .DIM_W(DIM_W), .NF_W(NF_W)) u_seq (
    .clk, .rst_n,
    .start, .rows, .cols, .nfilt, .in_base, .tmp_base, .out_base, .bs_base,
    .busy, .frame_done, .cur_filter, .cur_is_col, .loading, .frame_cycles, .cfg_cycles,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .m_data(a_m_data), .m_ctrl(a_m_ctrl), .m_write(a_m_write), .m_almost_full(a_m_afull),
    .s_data(b_s_data), .s_exists(b_s_exists), .s_read(b_s_read),
    .cfg_valid, .cfg_word
  );

  fsl_fifo #(.DATA_W(W), .DEPTH(FSL_DEPTH)) u_fsl_in (
    .clk, .rst_n,
    .m_data(a_m_data), .m_ctrl(a_m_ctrl), .m_write(a_m_write),
    .m_full(a_m_full), .m_almost_full(a_m_afull),
    .s_data(a_s_data), .s_ctrl(a_s_ctrl), .s_exists(a_s_exists), .s_read(a_s_read)
  );

  filter_core_1d u_core (
    .clk, .rst_n,
    .s_data(a_s_data), .s_ctrl(a_s_ctrl), .s_exists(a_s_exists), .s_read(a_s_read),
    .m_data(b_m_data), .m_ctrl(b_m_ctrl), .m_write(b_m_write), .m_full(b_m_full),
    .cfg_valid, .cfg_word,
    .slot_ready, .slot_busy, .cfg_done, .filter_id, .idle(core_idle), .stalled(core_stalled)
  );

  fsl_fifo #(.DATA_W(W), .DEPTH(FSL_DEPTH)) u_fsl_out (
    .clk, .rst_n,
    .m_data(b_m_data), .m_ctrl(b_m_ctrl), .m_write(b_m_write),
    .m_full(b_m_full), .m_almost_full(b_m_afull),
    .s_data(b_s_data), .s_ctrl(b_s_ctrl), .s_exists(b_s_exists), .s_read(b_s_read)
  );

  // a saturated result leaves the core with its control bit set
  assign sat_out = b_s_read && b_s_ctrl;
  // a row or column starts: the core takes a clear command
  assign line_clear = a_s_read && a_s_ctrl && (fb_pkg::fsl_cmd_e'(a_s_data[1:0]) == fb_pkg::CMD_CLEAR);

  // the slot is only rewritten while the core holds no samples
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_valid |-> core_idle);
  // the sequencer never writes a full link
  a_link_in_room: assert property (@(posedge clk) disable iff (!rst_n) a_m_write |-> !a_m_full);
  a_slot_state:   assert property (@(posedge clk) disable iff (!rst_n) !(slot_busy && slot_ready));

endmodule
