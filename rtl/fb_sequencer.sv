// fb_sequencer: runs a bank of separable 2-D filters over one frame with a
// single reconfigurable 1-D filter.
//
// For each 2-D filter k = 0..nfilt-1 of the bank it
//   1. streams every row of the input frame through the 1D filter core and
//      writes the results back to memory (intermediate frame),
//   2. loads the slot with the column filter of filter k,
//   3. streams every column of the intermediate frame through the core and
//      writes the final frame of filter k to memory,
//   4. loads the slot with the row filter of filter k+1.
// After the last filter it loads the row filter of filter 0 again, raises
// frame_done for one cycle and waits for the next start; a frame that
// starts with that filter already in the slot skips the first load.
//
// Memory (one pixel or one bitstream word per 32-bit word, word addresses):
//   in_base  : input frame, rows*cols 8-bit pixels, row-major
//   tmp_base : intermediate frame, 16-bit signed results, row-major
//   out_base : nfilt output frames of rows*cols 16-bit signed results
//   bs_base  : 2*nfilt bitstream images of BS_WORDS words each, in the
//              order row 0, column 0, row 1, column 1, ...
// Each row and each column is preceded by a CMD_CLEAR word, so the filter
// starts every line from rest. The memory port is single-ported with a
// request/grant handshake: a request is taken in a cycle where mem_gnt is
// high, and read data returns in order with mem_rvalid one or more cycles
// later. At most one read is outstanding. Writing a filtered result back
// has priority over reading the next input, so a pixel costs two memory
// cycles. Configuration words go to the core one per memory read.
// Two timers report, at each frame_done, the clocks the frame took from
// start to frame_done (frame_cycles) and how many of them went into loading
// images (cfg_cycles), which separates filtering time from reconfiguration
// overhead. The order of passes and loads follows the design; the memory layout,
// the handshake and running the procedure in hardware rather than in
// processor software are this design's choices.
module fb_sequencer #(
  parameter int unsigned ADDR_W   = 25,   // 128 MB of 32-bit words
  parameter int unsigned DIM_W    = 11,   // rows, columns up to 2047
  parameter int unsigned NF_W     = 4,    // up to 15 filters in the bank
  parameter int unsigned BS_WORDS = 2 + fb_pkg::lut_words(fb_pkg::NTAPS, fb_pkg::LUT_IN),
  parameter int unsigned DATA_W   = fb_pkg::FSL_W
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
  output logic [NF_W-1:0]   cur_filter,
  output logic              cur_is_col,
  output logic              loading,
  output logic [31:0]       frame_cycles,   // clocks busy in the last frame
  output logic [31:0]       cfg_cycles,     // of which spent loading images
  // memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // link to the core (writing side)
  output logic [DATA_W-1:0] m_data,
  output logic              m_ctrl,
  output logic              m_write,
  input  logic              m_almost_full,
  // link from the core (reading side)
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_exists,
  output logic              s_read,
  // configuration words to the core
  output logic              cfg_valid,
  output logic [31:0]       cfg_word
);
  import fb_pkg::*;

  localparam int unsigned FW = 2 * DIM_W;   // pixel counts

  typedef enum logic [1:0] {S_IDLE, S_CFG, S_PASS} sstate_e;
  sstate_e st;

  // job state
  logic [FW-1:0]     frame_words;
  logic [ADDR_W-1:0] bs_ptr, out_ptr;
  logic              row0_loaded, wrap, cfg_is_row0;
  logic [15:0]       cfg_req_cnt, cfg_rx_cnt;
  logic              outst;               // one read in flight

  // read side of a pass
  logic [DIM_W-1:0]  rd_line, rd_pos;
  logic [FW-1:0]     rd_line_off, rd_off;
  logic              rd_done, need_clear;
  // write side of a pass
  logic [DIM_W-1:0]  wr_line, wr_pos;
  logic [FW-1:0]     wr_line_off, wr_off, wr_cnt;

  // pass geometry
  logic [DIM_W-1:0]  line_len, n_lines;
  logic [FW-1:0]     pos_step, line_step;
  logic [ADDR_W-1:0] src_base, dst_base;
  assign line_len  = cur_is_col ? rows : cols;
  assign n_lines   = cur_is_col ? cols : rows;
  assign pos_step  = cur_is_col ? FW'(cols) : FW'(1);
  assign line_step = cur_is_col ? FW'(1) : FW'(cols);
  assign src_base  = cur_is_col ? tmp_base : in_base;
  assign dst_base  = cur_is_col ? out_ptr : tmp_base;

  // memory port arbitration: write-back first, then one read
  logic do_wr, can_rd, want_cfg_rd, want_pix_rd, do_rd, do_clear;
  assign do_wr       = (st == S_PASS) && s_exists;
  assign can_rd      = !do_wr && (!outst || mem_rvalid);
  assign want_cfg_rd = (st == S_CFG) && (cfg_req_cnt != 16'(BS_WORDS));
  assign want_pix_rd = (st == S_PASS) && !rd_done && !need_clear && !m_almost_full;
  assign do_rd       = can_rd && (want_cfg_rd || want_pix_rd);
  assign do_clear    = (st == S_PASS) && !rd_done && need_clear && !outst && !m_almost_full;

  always_comb begin
    mem_req   = do_wr || do_rd;
    mem_we    = do_wr;
    mem_wdata = s_data;
    if (do_wr)            mem_addr = dst_base + ADDR_W'(wr_off);
    else if (st == S_CFG) mem_addr = bs_ptr;
    else                  mem_addr = src_base + ADDR_W'(rd_off);
  end
  assign s_read = do_wr && mem_gnt;

  // words into the core
  assign cfg_valid = (st == S_CFG) && mem_rvalid;
  assign cfg_word  = mem_rdata;
  always_comb begin
    m_write = 1'b0;
    m_ctrl  = 1'b0;
    m_data  = '0;
    if (st == S_PASS && mem_rvalid) begin
      m_write = 1'b1;
      m_data  = cur_is_col ? DATA_W'(mem_rdata) : DATA_W'(mem_rdata[PIX_W-1:0]);
    end else if (do_clear) begin
      m_write = 1'b1;
      m_ctrl  = 1'b1;
      m_data  = DATA_W'(CMD_CLEAR);
    end
  end

  assign busy    = (st != S_IDLE);
  assign loading = (st == S_CFG);

  logic rd_taken, wr_taken, pass_end, cfg_end;
  assign rd_taken = do_rd && mem_gnt;
  assign wr_taken = do_wr && mem_gnt;
  assign pass_end = (st == S_PASS) && (wr_cnt == frame_words);
  assign cfg_end  = (st == S_CFG) && (cfg_rx_cnt == 16'(BS_WORDS));

  // frame and reconfiguration timers
  logic [31:0] t_frame, t_cfg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_frame      <= '0;
      t_cfg        <= '0;
      frame_cycles <= '0;
      cfg_cycles   <= '0;
    end else if (st == S_IDLE) begin
      t_frame <= '0;
      t_cfg   <= '0;
    end else begin
      t_frame <= t_frame + 1'b1;
      if (st == S_CFG) t_cfg <= t_cfg + 1'b1;
      if (cfg_end && wrap) begin
        frame_cycles <= t_frame + 1'b1;
        cfg_cycles   <= t_cfg + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      frame_words <= '0;
      bs_ptr <= '0; out_ptr <= '0;
      row0_loaded <= 1'b0; wrap <= 1'b0; cfg_is_row0 <= 1'b0;
      cfg_req_cnt <= '0; cfg_rx_cnt <= '0;
      outst <= 1'b0;
      cur_filter <= '0; cur_is_col <= 1'b0;
      frame_done <= 1'b0;
      rd_line <= '0; rd_pos <= '0; rd_line_off <= '0; rd_off <= '0;
      rd_done <= 1'b0; need_clear <= 1'b0;
      wr_line <= '0; wr_pos <= '0; wr_line_off <= '0; wr_off <= '0; wr_cnt <= '0;
    end else begin
      frame_done <= 1'b0;

      // one read in flight at most
      if (rd_taken)        outst <= 1'b1;
      else if (mem_rvalid) outst <= 1'b0;

      unique case (st)
        S_IDLE: if (start) begin
          frame_words <= FW'(rows) * FW'(cols);
          cur_filter  <= '0;
          cur_is_col  <= 1'b0;
          out_ptr     <= out_base;
          wrap        <= 1'b0;
          if (row0_loaded) begin
            st <= S_PASS;
          end else begin
            st     <= S_CFG;
            bs_ptr <= bs_base;
            cfg_is_row0 <= 1'b1;
          end
          cfg_req_cnt <= '0; cfg_rx_cnt <= '0;
          rd_line <= '0; rd_pos <= '0; rd_line_off <= '0; rd_off <= '0;
          rd_done <= (rows == '0) || (cols == '0);
          need_clear <= 1'b1;
          wr_line <= '0; wr_pos <= '0; wr_line_off <= '0; wr_off <= '0; wr_cnt <= '0;
        end

        S_CFG: begin
          row0_loaded <= 1'b0;
          if (rd_taken) begin
            bs_ptr      <= bs_ptr + 1'b1;
            cfg_req_cnt <= cfg_req_cnt + 1'b1;
          end
          if (mem_rvalid) cfg_rx_cnt <= cfg_rx_cnt + 1'b1;
          if (cfg_end) begin
            row0_loaded <= cfg_is_row0;
            if (wrap) begin
              st         <= S_IDLE;
              frame_done <= 1'b1;
            end else begin
              st <= S_PASS;
            end
          end
        end

        S_PASS: begin
          // read side: clear word at each line start, then the line
          if (do_clear) need_clear <= 1'b0;
          if (rd_taken) begin
            if (rd_pos == line_len - 1'b1) begin
              rd_pos      <= '0;
              rd_line     <= rd_line + 1'b1;
              rd_line_off <= rd_line_off + line_step;
              rd_off      <= rd_line_off + line_step;
              need_clear  <= 1'b1;
              if (rd_line == n_lines - 1'b1) rd_done <= 1'b1;
            end else begin
              rd_pos <= rd_pos + 1'b1;
              rd_off <= rd_off + pos_step;
            end
          end
          // write side mirrors the read order
          if (wr_taken) begin
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_pos == line_len - 1'b1) begin
              wr_pos      <= '0;
              wr_line     <= wr_line + 1'b1;
              wr_line_off <= wr_line_off + line_step;
              wr_off      <= wr_line_off + line_step;
            end else begin
              wr_pos <= wr_pos + 1'b1;
              wr_off <= wr_off + pos_step;
            end
          end
          if (pass_end) begin
            // set up the next load, then the next pass
            st <= S_CFG;
            cfg_req_cnt <= '0; cfg_rx_cnt <= '0;
            cfg_is_row0 <= 1'b0;
            rd_line <= '0; rd_pos <= '0; rd_line_off <= '0; rd_off <= '0;
            rd_done <= 1'b0; need_clear <= 1'b1;
            wr_line <= '0; wr_pos <= '0; wr_line_off <= '0; wr_off <= '0; wr_cnt <= '0;
            if (!cur_is_col) begin
              cur_is_col <= 1'b1;                 // column filter of this 2-D filter
            end else begin
              cur_is_col <= 1'b0;
              out_ptr    <= out_ptr + ADDR_W'(frame_words);
              if (cur_filter == nfilt - 1'b1) begin
                cur_filter  <= '0;                // back to row filter of filter 0
                bs_ptr      <= bs_base;
                wrap        <= 1'b1;
                cfg_is_row0 <= 1'b1;
              end else begin
                cur_filter <= cur_filter + 1'b1;  // row filter of the next filter
              end
            end
          end
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  a_one_read: assert property (@(posedge clk) disable iff (!rst_n) !(rd_taken && outst && !mem_rvalid));
  a_link_room: assert property (@(posedge clk) disable iff (!rst_n) !(m_write && m_almost_full && !mem_rvalid));

endmodule
