// tb_filter_core_1d: self-checking test of the 1D filter core.
//
// Loads the core's slot through its configuration port with bitstream
// images (as a row filter with 8-bit unsigned pixels, then as a column
// filter with 16-bit signed samples, then a row filter again), streams
// lines through it with random input gaps and output back-pressure, and
// compares every result with the reference convolution. It checks
// filter_id and cfg_done for each load, that the slot reports not ready
// while it is being written, and that with nothing blocking a result is
// written 7 clocks after its sample was read.
module tb_filter_core_1d;
  import tb_fb_util_pkg::*;
  import fb_pkg::CMD_CLEAR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] s_data, m_data, cfg_word;
  logic        s_ctrl, s_exists, s_read, m_ctrl, m_write, m_full, cfg_valid;
  logic        slot_ready, slot_busy, cfg_done, idle, stalled;
  logic [15:0] filter_id;

  filter_core_1d dut (.*);

  int checks = 0, failures = 0, n_done = 0, n_stalled = 0;

  logic [32:0] src[$];
  logic [32:0] expq[$];
  bit          gap, pressure;
  longint      cyc = 0, t_read[$];
  int          lat_checked = 0;
  assign s_exists = (src.size() != 0) && !gap;
  assign s_data   = (src.size() != 0) ? src[0][31:0] : '0;
  assign s_ctrl   = (src.size() != 0) ? src[0][32] : 1'b0;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic        rd, sc, st, wr, ctl, cd;
    logic [31:0] wd;
    // sample at the edge, update the queues just after it
    rd = s_read; sc = s_ctrl; st = stalled; wr = m_write; ctl = m_ctrl; wd = m_data; cd = cfg_done;
    #1;
    cyc++;
    if (cd) n_done++;
    if (st) n_stalled++;
    if (rd && !sc) t_read.push_back(cyc);
    if (rd) void'(src.pop_front());
    if (wr) begin
      longint tr;
      checks++;
      tr = t_read.pop_front();
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output %h", wd);
      end else begin
        logic [32:0] e;
        e = expq.pop_front();
        if ({ctl, wd} !== e) begin
          failures++;
          $display("mismatch: got %h want %h", {ctl, wd}, e);
        end
      end
      if (!pressure) begin
        checks++;
        lat_checked++;
        if (cyc - tr != 7) begin
          failures++;
          $display("latency %0d clocks, want 7", cyc - tr);
        end
      end
    end
  end

  always @(negedge clk) begin
    gap    <= pressure && ($urandom_range(0, 4) == 0);
    m_full <= pressure && ($urandom_range(0, 2) == 0);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(coef_t h, int shift, int id);
    int n_prev;
    n_prev = n_done;
    for (int w = 0; w < BSW; w++) begin
      @(negedge clk);
      cfg_valid = 1'b1; cfg_word = image_word(h, shift, id, w);
      if (w == 2) check(slot_busy && !slot_ready, "slot not ready while written");
    end
    @(negedge clk);
    cfg_valid = 1'b0;
    @(negedge clk);
    check(slot_ready && filter_id == 16'(id) && n_done == n_prev + 1, "load complete");
  endtask

  task automatic lines(coef_t h, int shift, int nlines, int len, bit pixels);
    for (int l = 0; l < nlines; l++) begin
      int x[];
      x = new[len];
      src.push_back({1'b1, 32'(CMD_CLEAR)});
      for (int n = 0; n < len; n++) begin
        longint acc;
        x[n] = pixels ? int'($urandom_range(0, 255)) : int'($signed(16'($urandom)));
        src.push_back({1'b0, 32'(x[n])});
        acc = fir_acc(h, x, n);
        expq.push_back({is_sat(acc, shift), 32'(sat16(acc, shift))});
      end
    end
    while (src.size() != 0 || expq.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    coef_t h;
    pressure = 1'b0;
    cfg_valid = 1'b0; cfg_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // row filter: 8-bit pixels, no back-pressure (latency is checked)
    h = rand_coefs(12, 16);
    load(h, 10, 16'h0101);
    lines(h, 10, 4, 30, 1'b1);
    // column filter: 16-bit samples under back-pressure
    pressure = 1'b1;
    h = rand_coefs(16, 16);
    load(h, 17, 16'h0102);
    lines(h, 17, 6, 25, 1'b0);
    // next row filter with 5 taps
    pressure = 1'b0;
    h = rand_coefs(16, 5);
    load(h, 8, 16'h0201);
    lines(h, 8, 3, 20, 1'b1);
    check(idle, "idle at end");
    check(n_stalled > 0 && lat_checked > 0, $sformatf("stalls %0d latency checks %0d", n_stalled, lat_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
