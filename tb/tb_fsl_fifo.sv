// tb_fsl_fifo: self-checking test of the FSL link FIFO.
//
// Random writes (never while full) and random reads (never while empty)
// against a queue model: every word read must be the oldest one written,
// with its control bit; full, almost-full and exists must match the
// model's fill level every cycle. The fill pattern is biased first towards
// writes, then towards reads, so the link runs full and empty.
module tb_fsl_fifo;
  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] m_data, s_data;
  logic        m_ctrl, m_write, m_full, m_almost_full, s_ctrl, s_exists, s_read;

  fsl_fifo dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [32:0] model[$];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_data = '0; m_ctrl = 1'b0; m_write = 1'b0; s_read = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int wp;
      @(negedge clk);
      // status against the model
      checks++;
      if (m_full !== (model.size() == DEPTH) || s_exists !== (model.size() != 0) ||
          m_almost_full !== (model.size() >= DEPTH - 1)) begin
        failures++;
        $display("status mismatch at fill %0d: full %0d afull %0d exists %0d",
                 model.size(), m_full, m_almost_full, s_exists);
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0)     n_empty++;
      if (s_exists && model.size() != 0) begin
        checks++;
        if ({s_ctrl, s_data} !== model[0]) begin
          failures++;
          $display("head mismatch: got %h want %h", {s_ctrl, s_data}, model[0]);
        end
      end
      wp = ((cyc / 500) % 2 == 0) ? 3 : 1;   // alternate fill and drain phases
      m_write = !m_full && ($urandom_range(0, 3) < wp);
      s_read  = s_exists && ($urandom_range(0, 3) < 4 - wp);
      m_data  = $urandom;
      m_ctrl  = $urandom_range(0, 1) == 1;
      @(posedge clk);
      if (s_read)  void'(model.pop_front());
      if (m_write) model.push_back({m_ctrl, m_data});
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("not exercised: full %0d empty %0d", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
