// tb_fb_workloads: the frame sizes on which the filterbank's frame rate is
// reported: 320x240, 425x355, 640x480, 1024x768 and 1600x1200, each
// filtered by a bank of four separable 2-D filters (16 taps, 16-bit
// coefficients) at the design's default sizes. For every size the output
// frames of all four filters are compared with a reference computed here
// (rows first, saturated to 16 bits, then columns), and the clock count of
// the frame is printed together with the frame rate it gives at 100 MHz
// with the memory model used here (2 to 4 clocks read latency, 5% random
// stalls plus refresh-like bursts).
module tb_fb_workloads;
  import tb_fb_util_pkg::*;

  localparam int NF = 4, NSIZES = 5;
  localparam int MEM_AW = 24;
  localparam int IN_B = 'h000000, TMP_B = 'h200000, OUT_B = 'h400000, BS_B = 'hF00000;
  localparam int SZ_C[NSIZES] = '{320, 425, 640, 1024, 1600};
  localparam int SZ_R[NSIZES] = '{240, 355, 480, 768, 1200};

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
  logic [10:0] rows, cols;

  filterbank_top dut (
    .clk, .rst_n, .start, .rows, .cols, .nfilt(4'(NF)),
    .in_base(25'(IN_B)), .tmp_base(25'(TMP_B)), .out_base(25'(OUT_B)), .bs_base(25'(BS_B)),
    .busy, .frame_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .cur_filter, .cur_is_col, .loading, .frame_cycles, .cfg_cycles, .cfg_done, .filter_id, .slot_ready, .core_stalled,
    .line_clear, .sat_out
  );

  tb_mem_model #(.MEM_AW(MEM_AW), .STALL_PCT(5)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  longint cyc = 0;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  coef_t hr[NF], hc[NF];

  initial begin
    int pix[], tmp[];
    start = 1'b0; rows = '0; cols = '0;
    for (int k = 0; k < NF; k++) begin
      hr[k] = rand_coefs(16, 16);
      hc[k] = rand_coefs(16, 16);
      for (int w = 0; w < BSW; w++) begin
        u_mem.mem[BS_B + (2 * k) * BSW + w]     = image_word(hr[k], 12, 'h100 + k, w);
        u_mem.mem[BS_B + (2 * k + 1) * BSW + w] = image_word(hc[k], 18, 'h200 + k, w);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSIZES; s++) begin
      int R, C, bad;
      longint t0;
      R = SZ_R[s]; C = SZ_C[s];
      pix = new[R * C];
      tmp = new[R * C];
      for (int i = 0; i < R * C; i++) begin
        pix[i] = $urandom_range(0, 255);
        u_mem.mem[IN_B + i] = 32'(pix[i]);
      end
      rows = 11'(R); cols = 11'(C);
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      @(posedge frame_done);
      @(negedge clk);
      $display("%0dx%0d, %0d filters: %0d clocks (%0d loading images), %0.1f banks/s at 100 MHz",
               C, R, NF, frame_cycles, cfg_cycles, 100.0e6 / real'(frame_cycles));
      bad = 0;
      for (int k = 0; k < NF; k++) begin
        for (int r = 0; r < R; r++) begin
          int x[];
          x = new[C];
          for (int c = 0; c < C; c++) x[c] = pix[r * C + c];
          for (int c = 0; c < C; c++) tmp[r * C + c] = sat16(fir_acc(hr[k], x, c), 12);
        end
        for (int c = 0; c < C; c++) begin
          int x[];
          x = new[R];
          for (int r = 0; r < R; r++) x[r] = tmp[r * C + c];
          for (int r = 0; r < R; r++)
            if (u_mem.mem[OUT_B + k * R * C + r * C + c] !== 32'(sat16(fir_acc(hc[k], x, r), 18))) bad++;
        end
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("%0dx%0d: %0d output pixels differ", C, R, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
