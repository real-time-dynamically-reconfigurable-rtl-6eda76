// fsl_fifo: one Fast Simplex Link channel, a synchronous first-in first-out
// link of DATA_W-bit words, each with a control bit.
//
// The writing side sees FSL_M_* style signals: it presents m_data/m_ctrl
// with m_write and must not write while m_full is high. The reading side
// sees FSL_S_* style signals: s_data/s_ctrl show the oldest word while
// s_exists is high, and s_read pops it. A write and a read may happen in
// the same cycle. Both sides share one clock. A word written in cycle t is
// visible on the reading side from cycle t+1.
// The link itself (a point-to-point word FIFO with a control bit) is how
// the filter core is attached to the processor; the depth of 16 words and
// the single-clock form are this design's choices, as is m_almost_full
// (at most one free word left), which lets a writer with one word in
// flight from memory keep the link from overflowing.
module fsl_fifo #(
  parameter int unsigned DATA_W = fb_pkg::FSL_W,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // writing side
  input  logic [DATA_W-1:0] m_data,
  input  logic              m_ctrl,
  input  logic              m_write,
  output logic              m_full,
  output logic              m_almost_full,
  // reading side
  output logic [DATA_W-1:0] s_data,
  output logic              s_ctrl,
  output logic              s_exists,
  input  logic              s_read
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W:0] mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;

  logic do_wr, do_rd;
  assign do_wr = m_write && !m_full;
  assign do_rd = s_read && s_exists;

  assign m_full        = (count == (AW+1)'(DEPTH));
  assign m_almost_full = (count >= (AW+1)'(DEPTH - 1));
  assign s_exists = (count != '0);
  assign {s_ctrl, s_data} = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= {m_ctrl, m_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The writer must respect m_full, the reader s_exists.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(m_write && m_full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(s_read && !s_exists));

endmodule
