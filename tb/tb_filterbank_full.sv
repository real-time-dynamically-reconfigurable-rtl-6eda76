// tb_filterbank_full: one complete operation of the filterbank at its
// default sizes, on the reported workload: a 320x240 frame of 8-bit pixels
// filtered by a bank of four separable 2-D filters of 16 taps with 16-bit
// coefficients (row filter 8-bit in, 16-bit out; column filter 16-bit in,
// 16-bit out). The frame and the eight bitstream images are placed in the
// memory model, the design runs the whole bank, and all four output frames
// are compared with a reference computed here (rows first, saturated to 16
// bits, then columns). The clock count of the frame is printed.
module tb_filterbank_full;
  import tb_fb_util_pkg::*;

  localparam int ROWS = 240, COLS = 320, NF = 4;
  localparam int MEM_AW = 20;
  localparam int IN_B = 'h00000, TMP_B = 'h20000, OUT_B = 'h40000, BS_B = 'hF0000;

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

  filterbank_top dut (
    .clk, .rst_n, .start, .rows(11'(ROWS)), .cols(11'(COLS)), .nfilt(4'(NF)),
    .in_base(25'(IN_B)), .tmp_base(25'(TMP_B)), .out_base(25'(OUT_B)), .bs_base(25'(BS_B)),
    .busy, .frame_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .cur_filter, .cur_is_col, .loading, .frame_cycles, .cfg_cycles, .cfg_done, .filter_id, .slot_ready, .core_stalled,
    .line_clear, .sat_out
  );

  tb_mem_model #(.MEM_AW(MEM_AW), .STALL_PCT(5)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0, n_cfg = 0;
  longint cyc = 0;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cfg_done) n_cfg++;
  end

  coef_t hr[NF], hc[NF];
  int    pix[ROWS][COLS];
  int    tmp[ROWS][COLS];

  initial begin
    start = 1'b0;
    for (int k = 0; k < NF; k++) begin
      hr[k] = rand_coefs(16, 16);
      hc[k] = rand_coefs(16, 16);
      for (int w = 0; w < BSW; w++) begin
        u_mem.mem[BS_B + (2 * k) * BSW + w]     = image_word(hr[k], 12, 'h100 + k, w);
        u_mem.mem[BS_B + (2 * k + 1) * BSW + w] = image_word(hc[k], 18, 'h200 + k, w);
      end
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pix[r][c] = $urandom_range(0, 255);
        u_mem.mem[IN_B + r * COLS + c] = 32'(pix[r][c]);
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (frame_done);
    @(negedge clk);
    $display("%0dx%0d frame, %0d filters: %0d clocks (%0d loading images), %0d loads, %0d memory stalls",
             COLS, ROWS, NF, frame_cycles, cfg_cycles, n_cfg, u_mem.n_stall);
    checks++;
    if (n_cfg != 2 * NF + 1) begin
      failures++;
      $display("%0d loads, want %0d", n_cfg, 2 * NF + 1);
    end
    for (int k = 0; k < NF; k++) begin
      for (int r = 0; r < ROWS; r++) begin
        int x[];
        x = new[COLS];
        for (int c = 0; c < COLS; c++) x[c] = pix[r][c];
        for (int c = 0; c < COLS; c++) tmp[r][c] = sat16(fir_acc(hr[k], x, c), 12);
      end
      for (int c = 0; c < COLS; c++) begin
        int x[];
        x = new[ROWS];
        for (int r = 0; r < ROWS; r++) x[r] = tmp[r][c];
        for (int r = 0; r < ROWS; r++) begin
          logic [31:0] got;
          got = u_mem.mem[OUT_B + k * ROWS * COLS + r * COLS + c];
          checks++;
          if (got !== 32'(sat16(fir_acc(hc[k], x, r), 18))) begin
            failures++;
            if (failures < 20) $display("filter %0d (%0d,%0d) differs", k, r, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
