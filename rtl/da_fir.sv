// da_fir: 1-D FIR filter in distributed arithmetic, the contents of the
// reconfigurable filter slot (PRR).
//
// y[n] = sum_k h[k] * x[n-k], k = 0..NTAPS-1, with two's-complement x of
// IN_W bits. The taps are split into groups of LUT_IN. For every bit
// position b of the input and every group g, the LUT_IN bits
// x[n-g*LUT_IN-j][b] (j = 0..LUT_IN-1) address a table that holds the sum of
// the coefficients whose bit is set; the IN_W partial sums are weighted by
// 2**b (the sign bit by -2**(IN_W-1)) and added in a pipelined binary tree.
// All bit positions are handled in parallel, so the filter takes one sample
// per clock. Only the tables depend on the coefficients: rewriting them
// (cfg_we) is how this design models partial reconfiguration of the slot,
// and it also changes the number of taps (unused coefficients are zero).
// The full-precision sum is shifted right arithmetically by cfg_shift and
// saturated to OUT_W bits, which models the output-width choice made by
// each filter's bitstream.
//
// Interface and timing: everything moves when `adv` is high (an elastic,
// stall-all pipeline). With adv high, in_valid loads in_data into the delay
// line and clear zeroes the delay line; the result of a sample appears on
// out_data with out_valid LATENCY = $clog2(IN_W)+3 advances later.
// Distributed arithmetic, 16 taps, 16-bit coefficients and 16-bit samples
// follow the reported configuration; the table size, the bit-parallel form,
// the shift-and-saturate output and the pipeline depth are this design's
// own choices.
module da_fir #(
  parameter int unsigned NTAPS  = fb_pkg::NTAPS,
  parameter int unsigned COEF_W = fb_pkg::COEF_W,
  parameter int unsigned IN_W   = fb_pkg::IN_W,
  parameter int unsigned OUT_W  = fb_pkg::OUT_W,
  parameter int unsigned LUT_IN = fb_pkg::LUT_IN,
  localparam int unsigned NG     = (NTAPS + LUT_IN - 1) / LUT_IN,
  localparam int unsigned NE     = 1 << LUT_IN,
  localparam int unsigned LUT_W  = COEF_W + $clog2(LUT_IN),
  localparam int unsigned CFG_AW = $clog2(NG * NE)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table writes (reconfiguration)
  input  logic                     cfg_we,
  input  logic [CFG_AW-1:0]        cfg_addr,
  input  logic signed [LUT_W-1:0]  cfg_data,
  input  logic                     cfg_shift_we,
  input  logic [4:0]               cfg_shift,
  // sample stream
  input  logic                     adv,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_data,
  input  logic                     clear,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic                     out_sat
);
  localparam int unsigned LEVELS = $clog2(IN_W);
  localparam int unsigned NB     = 1 << LEVELS;
  localparam int unsigned ACC_W  = IN_W + COEF_W + $clog2(NTAPS) + 1;
  localparam int unsigned NT_PAD = NG * LUT_IN;

  logic signed [LUT_W-1:0] lut [NG*NE];
  logic [4:0]              shift_q;

  // table storage
  always_ff @(posedge clk) begin
    if (cfg_we) lut[cfg_addr] <= cfg_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            shift_q <= '0;
    else if (cfg_shift_we) shift_q <= cfg_shift;
  end

  // delay line, newest sample at index 0, padded to whole groups
  logic signed [IN_W-1:0] taps [NT_PAD];
  logic                   v_taps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT_PAD; k++) taps[k] <= '0;
      v_taps <= 1'b0;
    end else if (adv) begin
      if (clear) begin
        for (int k = 0; k < NT_PAD; k++) taps[k] <= '0;
        v_taps <= 1'b0;
      end else if (in_valid) begin
        taps[0] <= in_data;
        for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
        v_taps <= 1'b1;
      end else begin
        v_taps <= 1'b0;
      end
    end
  end

  // table look-ups: one weighted partial sum per input bit
  logic signed [ACC_W-1:0] bitsum [NB];
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bitsum[b] = '0;
      if (b < IN_W) begin
        for (int g = 0; g < NG; g++) begin
          logic [LUT_IN-1:0] a;
          for (int j = 0; j < LUT_IN; j++) a[j] = taps[g*LUT_IN + j][b];
          bitsum[b] = bitsum[b] + ACC_W'(lut[g*NE + int'(a)]);
        end
        bitsum[b] = bitsum[b] <<< b;
        if (b == IN_W - 1) bitsum[b] = -bitsum[b];
      end
    end
  end

  // pipelined adder tree: level 0 holds the weighted partial sums
  logic signed [ACC_W-1:0] tree [LEVELS+1][NB];
  logic [LEVELS:0]         v_tree;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LEVELS; l++)
        for (int i = 0; i < NB; i++) tree[l][i] <= '0;
      v_tree <= '0;
    end else if (adv) begin
      for (int i = 0; i < NB; i++) tree[0][i] <= bitsum[i];
      for (int l = 1; l <= LEVELS; l++)
        for (int i = 0; i < (NB >> l); i++)
          tree[l][i] <= tree[l-1][2*i] + tree[l-1][2*i+1];
      v_tree <= {v_tree[LEVELS-1:0], v_taps};
    end
  end

  // output scaling and saturation
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(1 << (OUT_W - 1));
  logic signed [ACC_W-1:0] scaled;
  assign scaled = tree[LEVELS][0] >>> shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else if (adv) begin
      out_valid <= v_tree[LEVELS];
      if (scaled > OMAX) begin
        out_data <= OMAX[OUT_W-1:0];
        out_sat  <= v_tree[LEVELS];
      end else if (scaled < OMIN) begin
        out_data <= OMIN[OUT_W-1:0];
        out_sat  <= v_tree[LEVELS];
      end else begin
        out_data <= scaled[OUT_W-1:0];
        out_sat  <= 1'b0;
      end
    end
  end

endmodule
