// tb_filter_ctrl: self-checking test of the filter core's control unit.
//
// The control unit drives a real da_fir whose tables the testbench writes
// directly. A queue plays the input link (with random gaps), and the
// output link is full at random. Lines of samples, each opened by a
// CMD_CLEAR word and sprinkled with CMD_NOP words, must come out as the
// reference convolution restarted at every line, with the control bit set
// exactly on saturated results. Also checked: nothing is taken or written
// while the slot is not ready, no word is lost or repeated under
// back-pressure, `stalled` appears, `idle` is high once all results are out.
module tb_filter_ctrl;
  import tb_fb_util_pkg::*;
  import fb_pkg::CMD_CLEAR;
  import fb_pkg::CMD_NOP;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]        s_data, m_data;
  logic               s_ctrl, s_exists, s_read, m_ctrl, m_write, m_full;
  logic               slot_ready, slot_busy, idle, stalled;
  logic               f_adv, f_in_valid, f_clear, f_out_valid, f_out_sat;
  logic signed [15:0] f_in_data, f_out_data;
  logic               cfg_we, cfg_shift_we;
  logic [5:0]         cfg_addr;
  logic signed [17:0] cfg_data;
  logic [4:0]         cfg_shift;

  filter_ctrl dut (.*);
  da_fir u_fir (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .cfg_shift_we, .cfg_shift,
                .adv(f_adv), .in_valid(f_in_valid), .in_data(f_in_data), .clear(f_clear),
                .out_valid(f_out_valid), .out_data(f_out_data), .out_sat(f_out_sat));

  int checks = 0, failures = 0, n_stalled = 0, n_sat = 0;

  // input link model
  logic [32:0] src[$];
  bit          gap;
  assign s_exists = (src.size() != 0) && !gap;
  assign s_data   = (src.size() != 0) ? src[0][31:0] : '0;
  assign s_ctrl   = (src.size() != 0) ? src[0][32] : 1'b0;

  // expected output words
  logic [32:0] expq[$];

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic        rd, st, wr, full, ctl;
    logic [31:0] wd;
    // sample at the edge, update the queues just after it
    rd = s_read; st = stalled; wr = m_write; full = m_full; ctl = m_ctrl; wd = m_data;
    #1;
    if (rd) void'(src.pop_front());
    if (st) n_stalled++;
    if (wr) begin
      checks++;
      if (full) begin
        failures++;
        $display("write while full");
      end
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
        if (e[32]) n_sat++;
      end
    end
  end

  always @(negedge clk) begin
    gap    <= ($urandom_range(0, 4) == 0);
    m_full <= ($urandom_range(0, 2) == 0);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_filter(coef_t h, int shift);
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      cfg_we = 1'b1; cfg_addr = 6'(w); cfg_data = 18'(lut_entry(h, w / 16, w % 16));
      @(negedge clk);
    end
    cfg_we = 1'b0;
    cfg_shift_we = 1'b1; cfg_shift = 5'(shift);
    @(negedge clk);
    cfg_shift_we = 1'b0;
  endtask

  // queue nlines lines of len samples and their expected results
  task automatic queue_lines(coef_t h, int shift, int nlines, int len);
    for (int l = 0; l < nlines; l++) begin
      int x[];
      x = new[len];
      src.push_back({1'b1, 32'(CMD_CLEAR)});
      for (int n = 0; n < len; n++) begin
        longint acc;
        if ($urandom_range(0, 9) == 0) src.push_back({1'b1, 32'(CMD_NOP)});
        x[n] = int'($signed(16'($urandom)));
        src.push_back({1'b0, 16'hdead, 16'(x[n])});   // upper half is ignored
        acc = fir_acc(h, x, n);
        expq.push_back({is_sat(acc, shift), 32'(sat16(acc, shift))});
      end
    end
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((src.size() != 0 || expq.size() != 0) && t < 100000) begin
      @(negedge clk);
      t++;
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    coef_t h;
    slot_ready = 1'b0; slot_busy = 1'b0;
    cfg_we = 1'b0; cfg_shift_we = 1'b0; cfg_addr = '0; cfg_data = '0; cfg_shift = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    h = rand_coefs(16, 16);
    slot_busy = 1'b1;
    set_filter(h, 16);
    slot_busy = 1'b0;
    // slot not ready: words wait in the link
    queue_lines(h, 16, 1, 5);
    repeat (20) begin
      @(negedge clk);
      check(!s_read && !m_write, "nothing moves while slot not ready");
    end
    slot_ready = 1'b1;
    queue_lines(h, 16, 5, 40);
    drain();
    check(idle && expq.size() == 0, "idle after the last result");

    // another filter, fewer taps, lower shift (saturation)
    slot_ready = 1'b0; slot_busy = 1'b1;
    h = rand_coefs(16, 7);
    set_filter(h, 12);
    slot_busy = 1'b0; slot_ready = 1'b1;
    queue_lines(h, 12, 6, 33);
    drain();
    check(idle && expq.size() == 0 && src.size() == 0, "all results out");
    check(n_stalled > 0 && n_sat > 0, $sformatf("stalls %0d saturations %0d", n_stalled, n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
