// tb_da_fir: self-checking test of the distributed-arithmetic FIR filter.
//
// Loads the tables for random 16-tap, 16-bit coefficient sets, streams
// random signed 16-bit samples with random pipeline stalls (adv low) and
// random delay-line clears, and compares every result with the reference
// convolution from tb_fb_util_pkg. It also checks that each result comes
// out exactly LATENCY advances after its sample was taken, and that the
// saturation flag matches the reference.
module tb_da_fir;
  import tb_fb_util_pkg::*;

  localparam int LATENCY = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cfg_we, cfg_shift_we, adv, in_valid, clear;
  logic [5:0]         cfg_addr;
  logic signed [17:0] cfg_data;
  logic [4:0]         cfg_shift;
  logic signed [15:0] in_data;
  logic               out_valid, out_sat;
  logic signed [15:0] out_data;

  da_fir dut (.*);

  int checks = 0, failures = 0;
  int n_sat = 0, n_stall = 0, n_clear = 0;

  // expected results in order, with the advance count at acceptance
  int     exp_val[$];
  bit     exp_sat[$];
  longint exp_adv[$];
  longint adv_count = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consume results at every advance
  always @(posedge clk) begin
    if (rst_n && adv) begin
      if (out_valid) begin
        checks++;
        if (exp_val.size() == 0) begin
          failures++;
          $display("unexpected result %0d", out_data);
        end else begin
          int ev; bit es; longint ea;
          ev = exp_val.pop_front(); es = exp_sat.pop_front(); ea = exp_adv.pop_front();
          if (out_data !== 16'(ev) || out_sat !== es || adv_count - ea != LATENCY) begin
            failures++;
            $display("mismatch: got %0d sat %0d after %0d advances, want %0d sat %0d after %0d",
                     out_data, out_sat, adv_count - ea, ev, es, LATENCY);
          end
          if (es) n_sat++;
        end
      end
      adv_count++;
    end
  end

  task automatic run_set(int shift, int nsamp);
    coef_t h;
    int    x[];
    int    line_len;
    h = rand_coefs(16, 16);
    // load tables
    @(negedge clk);
    adv = 1'b0; in_valid = 1'b0; clear = 1'b0;
    for (int w = 0; w < NW; w++) begin
      cfg_we = 1'b1; cfg_addr = 6'(w);
      cfg_data = 18'(lut_entry(h, w / 16, w % 16));
      @(negedge clk);
    end
    cfg_we = 1'b0;
    cfg_shift_we = 1'b1; cfg_shift = 5'(shift);
    @(negedge clk);
    cfg_shift_we = 1'b0;
    // clear, then stream
    adv = 1'b1; clear = 1'b1; in_valid = 1'b0;
    @(negedge clk);
    clear = 1'b0;
    x = new[0];
    for (int i = 0; i < nsamp; ) begin
      adv = ($urandom_range(0, 3) != 0);
      if (!adv) n_stall++;
      clear = 1'b0; in_valid = 1'b0;
      if (adv) begin
        if ($urandom_range(0, 40) == 0) begin
          clear = 1'b1; n_clear++;
          x = new[0];
        end else if ($urandom_range(0, 4) != 0) begin
          longint acc;
          in_valid = 1'b1;
          in_data  = 16'($urandom);
          x = new[x.size() + 1](x);
          x[x.size() - 1] = int'(in_data);
          acc = fir_acc(h, x, x.size() - 1);
          exp_val.push_back(sat16(acc, shift));
          exp_sat.push_back(is_sat(acc, shift));
          exp_adv.push_back(adv_count);
          i++;
        end
      end
      @(negedge clk);
    end
    // drain
    in_valid = 1'b0; clear = 1'b0; adv = 1'b1;
    repeat (LATENCY + 2) @(negedge clk);
  endtask

  initial begin
    cfg_we = 1'b0; cfg_shift_we = 1'b0; cfg_addr = '0; cfg_data = '0; cfg_shift = '0;
    adv = 1'b0; in_valid = 1'b0; clear = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_set(15, 300);
    run_set(18, 300);
    run_set(12, 300);   // many saturated results
    run_set(0, 200);    // almost all saturated
    checks++;
    if (exp_val.size() != 0) begin
      failures++;
      $display("%0d results never came out", exp_val.size());
    end
    checks++;
    if (n_sat == 0 || n_stall == 0 || n_clear == 0) begin
      failures++;
      $display("not exercised: sat %0d stall %0d clear %0d", n_sat, n_stall, n_clear);
    end
    $display("saturated %0d, stalls %0d, clears %0d", n_sat, n_stall, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
