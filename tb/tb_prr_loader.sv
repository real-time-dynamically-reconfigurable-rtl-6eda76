// tb_prr_loader: self-checking test of the slot configuration path.
//
// Sends noise words, then complete bitstream images (sync word, header,
// 64 table entries) with random gaps between words, and checks that every
// table write lands at the next address with the word's low 18 bits, that
// the header sets the shift, that slot_busy/slot_ready/done/filter_id
// follow the image, and that words outside an image write nothing.
module tb_prr_loader;
  import tb_fb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cfg_valid, lut_we, shift_we, slot_busy, slot_ready, done;
  logic [31:0]        cfg_word;
  logic [5:0]         lut_addr;
  logic signed [17:0] lut_data;
  logic [4:0]         shift;
  logic [15:0]        filter_id;

  prr_loader dut (.*);

  int checks = 0, failures = 0;
  int exp_addr = 0, n_done = 0, n_lut = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [31:0] w);
    while ($urandom_range(0, 2) == 0) begin
      cfg_valid = 1'b0;
      @(negedge clk);
    end
    cfg_valid = 1'b1; cfg_word = w;
    @(negedge clk);
    cfg_valid = 1'b0;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(int id, int sh);
    coef_t h;
    h = rand_coefs(16, 16);
    send(image_word(h, sh, id, 0));
    check(slot_busy && !slot_ready, "busy after sync word");
    for (int w = 1; w < BSW; w++) begin
      logic [31:0] word;
      word = image_word(h, sh, id, w);
      while ($urandom_range(0, 2) == 0) begin
        cfg_valid = 1'b0;
        #1;
        check(!lut_we && !shift_we, "no write without a word");
        @(negedge clk);
      end
      cfg_valid = 1'b1; cfg_word = word;
      #1;
      if (w == 1) begin
        check(shift_we && shift == 5'(sh) && !lut_we, "header sets shift");
      end else begin
        check(lut_we && !shift_we && lut_addr == 6'(w - 2) && lut_data == word[17:0],
              $sformatf("table write %0d", w - 2));
        n_lut++;
      end
      @(negedge clk);
      cfg_valid = 1'b0;
    end
    check(!slot_busy && slot_ready && filter_id == 16'(id), "ready after last entry");
  endtask

  always @(posedge clk) if (done) n_done++;

  initial begin
    cfg_valid = 1'b0; cfg_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!slot_ready && !slot_busy, "not ready after reset");
    // noise before a sync word is ignored
    for (int i = 0; i < 20; i++) begin
      cfg_valid = 1'b1; cfg_word = $urandom & 32'h7fff_ffff;
      #1;
      check(!lut_we && !shift_we, "noise writes nothing");
      @(negedge clk);
    end
    cfg_valid = 1'b0;
    check(!slot_busy && !slot_ready, "noise leaves slot unconfigured");
    load(16'h0A01, 15);
    load(16'h0A02, 17);
    for (int i = 0; i < 5; i++) send(32'h1234_0000 + i);
    check(slot_ready && !slot_busy && filter_id == 16'h0A02, "trailing words ignored");
    load(16'h0B01, 9);
    check(n_done == 3, $sformatf("done pulses %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
