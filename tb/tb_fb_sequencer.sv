// tb_fb_sequencer: self-checking test of the filterbank sequencer.
//
// The sequencer runs against the memory model and a stand-in for the
// filter core that needs no filter arithmetic: it answers every sample
// with sample + 1 + 1000*(position in the line) + 100000*(tag of the last
// loaded image), so the stored frames show whether each pass read and
// wrote the right pixels in the right order, and which image was loaded.
// Checked: the configuration word stream (row 0, column 0, row 1, ...,
// then row 0 again; the second frame skips the first load), the number of
// CMD_CLEAR words (one per row and per column of every pass), every word
// of every output frame after two frames, that row passes see only the
// 8 pixel bits, that no image is sent while samples are in flight, and
// that the frame and loading timers match the busy and loading clocks.
module tb_fb_sequencer;
  import tb_fb_util_pkg::*;
  import fb_pkg::CMD_CLEAR;

  localparam int ROWS = 5, COLS = 7, NF = 3;
  localparam int IN_B = 'h100, TMP_B = 'h200, OUT_B = 'h300, BS_B = 'h1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, frame_done, cur_is_col, loading;
  logic [3:0]  cur_filter;
  logic [31:0] frame_cycles, cfg_cycles;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [24:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] m_data, s_data, cfg_word;
  logic        m_ctrl, m_write, m_almost_full, s_exists, s_read, cfg_valid;

  fb_sequencer dut (
    .clk, .rst_n, .start, .rows(11'(ROWS)), .cols(11'(COLS)), .nfilt(4'(NF)),
    .in_base(25'(IN_B)), .tmp_base(25'(TMP_B)), .out_base(25'(OUT_B)), .bs_base(25'(BS_B)),
    .busy, .frame_done, .cur_filter, .cur_is_col, .loading, .frame_cycles, .cfg_cycles,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .m_data, .m_ctrl, .m_write, .m_almost_full, .s_data, .s_exists, .s_read,
    .cfg_valid, .cfg_word
  );

  tb_mem_model #(.MEM_AW(13), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;

  // core stand-in
  logic [32:0] link_a[$];
  logic [31:0] link_b[$];
  int          pos = 0, tag = 0, cfg_idx = 0, n_clear = 0, n_frames = 0;
  logic [31:0] cfg_seen[$];
  bit          gap;
  int          n_busy = 0, n_loading = 0;
  assign m_almost_full = (link_a.size() >= 15);
  assign s_exists      = (link_b.size() != 0);
  assign s_data        = (link_b.size() != 0) ? link_b[0] : '0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) gap <= ($urandom_range(0, 2) == 0);

  // sample the handshakes at the clock edge, update the link queues just
  // after it, so the design never sees a queue change at its own edge
  always @(posedge clk) if (rst_n) begin
    logic        fd, rd, wr, ctl, cv;
    logic [31:0] wd, cw;
    fd = frame_done; rd = s_read; wr = m_write; ctl = m_ctrl; wd = m_data;
    cv = cfg_valid; cw = cfg_word;
    if (busy) n_busy++;
    if (loading) n_loading++;
    #1;
    if (fd) n_frames++;
    if (rd) void'(link_b.pop_front());
    if (wr) begin
      if (link_a.size() >= 16) begin
        failures++;
        $display("link overrun");
      end
      link_a.push_back({ctl, wd});
    end
    if (cv) begin
      cfg_seen.push_back(cw);
      if (link_a.size() != 0 || link_b.size() != 0) begin
        failures++;
        $display("image sent while samples in flight");
      end
      if (cfg_idx == 1) tag = int'(cw[31:16]);
      cfg_idx = (cfg_idx == BSW - 1) ? 0 : cfg_idx + 1;
    end
    if (!gap && link_a.size() != 0) begin
      logic [32:0] w;
      w = link_a.pop_front();
      if (w[32]) begin
        if (w[1:0] == CMD_CLEAR) begin
          n_clear++;
          pos = 0;
        end
      end else begin
        link_b.push_back(w[31:0] + 1 + 1000 * pos + 100000 * tag);
        pos++;
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int row_tag(int k); return 16 + 2 * k; endfunction
  function automatic int col_tag(int k); return 17 + 2 * k; endfunction

  initial begin
    int pix [ROWS][COLS];
    int exp_cfg;
    start = 1'b0;
    // frame, images with random coefficients
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pix[r][c] = $urandom_range(0, 255);
        u_mem.mem[IN_B + r * COLS + c] = {$urandom_range(0, 'hffffff), 8'(pix[r][c])};
      end
    for (int k = 0; k < NF; k++)
      for (int w = 0; w < BSW; w++) begin
        u_mem.mem[BS_B + (2 * k) * BSW + w]     = image_word(rand_coefs(16, 16), 15, row_tag(k), w);
        u_mem.mem[BS_B + (2 * k + 1) * BSW + w] = image_word(rand_coefs(16, 16), 15, col_tag(k), w);
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      n_busy = 0; n_loading = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      wait (n_frames == f + 1);
      @(negedge clk);
      check(!busy, "idle after frame");
      check(frame_cycles == 32'(n_busy) && cfg_cycles == 32'(n_loading),
            $sformatf("timers %0d/%0d, want %0d/%0d", frame_cycles, cfg_cycles, n_busy, n_loading));
      // output frames
      for (int k = 0; k < NF; k++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            int e;
            e = pix[r][c] + 2 + 1000 * (c + r) + 100000 * (row_tag(k) + col_tag(k));
            checks++;
            if (u_mem.mem[OUT_B + k * ROWS * COLS + r * COLS + c] !== 32'(e)) begin
              failures++;
              $display("frame %0d filter %0d (%0d,%0d): got %0d want %0d", f, k, r, c,
                       u_mem.mem[OUT_B + k * ROWS * COLS + r * COLS + c], e);
            end
          end
    end
    // configuration stream: (2NF+1) images, then 2NF images from column 0 on
    exp_cfg = (2 * NF + 1) * BSW + 2 * NF * BSW;
    check(cfg_seen.size() == exp_cfg, $sformatf("%0d configuration words, want %0d", cfg_seen.size(), exp_cfg));
    for (int i = 0; i < cfg_seen.size() && i < exp_cfg; i++) begin
      int img, w, j;
      j   = (i < (2 * NF + 1) * BSW) ? i : i - (2 * NF + 1) * BSW + BSW;
      img = (j / BSW) % (2 * NF);
      w   = j % BSW;
      checks++;
      if (cfg_seen[i] !== u_mem.mem[BS_B + img * BSW + w]) begin
        failures++;
        $display("configuration word %0d differs", i);
      end
    end
    check(n_clear == 2 * 2 * NF * (ROWS + COLS) / 2, $sformatf("%0d clear words", n_clear));
    check(u_mem.n_stall > 0, "memory stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
