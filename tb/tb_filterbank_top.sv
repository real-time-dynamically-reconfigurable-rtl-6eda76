// tb_filterbank_top: end-to-end test of the 2-D filterbank.
//
// A bank of NF separable 2-D filters (random 16-bit coefficients, 16 or
// fewer taps, one with a small shift so that results saturate) is stored
// as bitstream images in the memory model next to a random 8-bit frame.
// The design filters the frame with every filter of the bank, twice (the
// second time with a new frame), and every output frame is compared with a
// reference 2-D separable filter computed here: rows first, results
// saturated to 16 bits, then columns. The FSL links are made two words deep so
// that the core's output link fills and the core has to stall.
// The frame and reconfiguration timers must match the busy and loading
// clocks counted here. Every mechanism is counted and must happen at least once: slot
// reconfigurations, row-to-column and column-to-row switches, line clears,
// memory stalls, core back-pressure stalls, saturated results, the reload
// of the first row filter at the end of the bank, and the skipped first
// load of the second frame.
module tb_filterbank_top;
  import tb_fb_util_pkg::*;

  parameter int ROWS = 6, COLS = 9, NF = 3, FRAMES = 2, FSL_DEPTH = 2;
  parameter int MEM_AW = 14;
  parameter int IN_B = 'h100, TMP_B = 'h600, OUT_B = 'h1000, BS_B = 'h3000;
  parameter int STALL_PCT = 15;
  parameter longint WATCHDOG = 64'd50_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, frame_done, cur_is_col, loading, cfg_done, core_stalled, sat_out;
  logic        slot_ready, line_clear;
  logic [3:0]  cur_filter;
  logic [15:0] filter_id;
  logic [31:0] frame_cycles, cfg_cycles;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [24:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  filterbank_top #(.FSL_DEPTH(FSL_DEPTH)) dut (
    .clk, .rst_n, .start, .rows(11'(ROWS)), .cols(11'(COLS)), .nfilt(4'(NF)),
    .in_base(25'(IN_B)), .tmp_base(25'(TMP_B)), .out_base(25'(OUT_B)), .bs_base(25'(BS_B)),
    .busy, .frame_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .cur_filter, .cur_is_col, .loading, .frame_cycles, .cfg_cycles, .cfg_done, .filter_id, .slot_ready, .core_stalled,
    .line_clear, .sat_out
  );

  tb_mem_model #(.MEM_AW(MEM_AW), .STALL_PCT(STALL_PCT)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  int n_cfg = 0, n_r2c = 0, n_c2r = 0, n_clear = 0, n_cstall = 0, n_sat = 0, n_frames = 0;
  longint cyc = 0;
  logic prev_col = 1'b0;

  initial begin
    #(WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_busy = 0, n_loading = 0;   // per frame, for the timers

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy) n_busy++;
    if (loading) n_loading++;
    if (cfg_done) n_cfg++;
    if (core_stalled) n_cstall++;
    if (sat_out) n_sat++;
    if (frame_done) n_frames++;
    if (line_clear) n_clear++;
    if (busy && cur_is_col && !prev_col) n_r2c++;
    if (busy && !cur_is_col && prev_col) n_c2r++;
    prev_col <= cur_is_col;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  coef_t hr[NF], hc[NF];
  int    sr[NF], sc[NF];

  initial begin
    int pix[][];
    int tmp[][];
    int cfg_before;
    longint t0;
    start = 1'b0;
    for (int k = 0; k < NF; k++) begin
      hr[k] = rand_coefs(16, (k == 1) ? 9 : 16);
      hc[k] = rand_coefs(16, (k == 2) ? 5 : 16);
      sr[k] = (k == 0) ? 6 : 11;           // filter 0 saturates in its row pass
      sc[k] = 18;
      for (int w = 0; w < BSW; w++) begin
        u_mem.mem[BS_B + (2 * k) * BSW + w]     = image_word(hr[k], sr[k], 'h100 + k, w);
        u_mem.mem[BS_B + (2 * k + 1) * BSW + w] = image_word(hc[k], sc[k], 'h200 + k, w);
      end
    end
    pix = new[ROWS];
    tmp = new[ROWS];
    foreach (pix[r]) begin
      pix[r] = new[COLS];
      tmp[r] = new[COLS];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      foreach (pix[r, c]) begin
        pix[r][c] = $urandom_range(0, 255);
        u_mem.mem[IN_B + r * COLS + c] = 32'(pix[r][c]);
      end
      cfg_before = n_cfg;
      n_busy = 0; n_loading = 0;
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      wait (n_frames == f + 1);
      @(negedge clk);
      $display("frame %0d: %0d clocks, timers %0d / %0d loading", f, cyc - t0, frame_cycles, cfg_cycles);
      check(frame_cycles == 32'(n_busy) && cfg_cycles == 32'(n_loading),
            $sformatf("timers %0d/%0d, want %0d/%0d", frame_cycles, cfg_cycles, n_busy, n_loading));
      check(!busy && slot_ready && filter_id == 16'h100,
            "first row filter loaded again at the end of the bank");
      check(n_cfg - cfg_before == ((f == 0) ? 2 * NF + 1 : 2 * NF),
            $sformatf("frame %0d: %0d loads", f, n_cfg - cfg_before));
      // reference: rows, then columns
      for (int k = 0; k < NF; k++) begin
        for (int r = 0; r < ROWS; r++) begin
          int x[];
          x = new[COLS];
          for (int c = 0; c < COLS; c++) x[c] = pix[r][c];
          for (int c = 0; c < COLS; c++) tmp[r][c] = sat16(fir_acc(hr[k], x, c), sr[k]);
        end
        for (int c = 0; c < COLS; c++) begin
          int x[];
          x = new[ROWS];
          for (int r = 0; r < ROWS; r++) x[r] = tmp[r][c];
          for (int r = 0; r < ROWS; r++) begin
            int e;
            logic [31:0] got;
            e   = sat16(fir_acc(hc[k], x, r), sc[k]);
            got = u_mem.mem[OUT_B + k * ROWS * COLS + r * COLS + c];
            checks++;
            if (got !== 32'(e)) begin
              failures++;
              if (failures < 20)
                $display("frame %0d filter %0d (%0d,%0d): got %0d want %0d", f, k, r, c,
                         $signed(got), e);
            end
          end
        end
      end
    end
    $display("loads %0d, row->col %0d, col->row %0d, clears %0d, memory stalls %0d, core stalls %0d, saturated %0d, frames %0d",
             n_cfg, n_r2c, n_c2r, n_clear, u_mem.n_stall, n_cstall, n_sat, n_frames);
    check(n_cfg > 0,   "reconfiguration happened");
    check(n_r2c > 0,   "row-to-column switch happened");
    check(n_c2r > 0,   "column-to-row switch happened");
    check(n_clear == FRAMES * NF * (ROWS + COLS), $sformatf("%0d line clears", n_clear));
    check(u_mem.n_stall > 0, "memory stall happened");
    check(n_cstall > 0, "core back-pressure happened");
    check(n_sat > 0,   "saturation happened");
    check(n_frames == FRAMES, "every frame finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
