// fb_pkg: constants and types shared by the 2-D filterbank blocks.
//
// The filterbank time-multiplexes one reconfigurable 1-D FIR filter: every
// 2-D separable filter is applied as a row pass followed by a column pass,
// and the filter slot is rewritten between passes. This package fixes the
// filter sizes used by the design (16 coefficients of 16 bits, 16-bit
// samples in the filter, 16-bit results) and the layout of the small
// partial-bitstream images that rewrite the filter slot.
//
// Partial-bitstream image (this design's own format, one 32-bit word per
// configuration write):
//   word 0        : SYNC_WORD
//   word 1        : header, see cfg_hdr_t
//   words 2..N+1  : distributed-arithmetic table entries, group-major
//                   (entry e of group g at word 2 + g*2**LUT_IN + e),
//                   each a signed value in the low LUT_W bits
package fb_pkg;

  // Sizes used for the results reported for the design: both 1-D filters
  // have 16 coefficients of 16 bits, the column filter (the larger one,
  // which sizes the slot) takes and gives 16-bit samples.
  localparam int unsigned NTAPS   = 16;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned IN_W    = 16;
  localparam int unsigned OUT_W   = 16;
  localparam int unsigned PIX_W   = 8;   // row-filter input pixels
  localparam int unsigned LUT_IN  = 4;   // address bits of one DA table

  // FSL links carry 32-bit words plus one control bit.
  localparam int unsigned FSL_W   = 32;

  // Synchronisation word that opens every bitstream image.
  localparam logic [31:0] SYNC_WORD = 32'hAA99_5566;

  // Header word of a bitstream image.
  typedef struct packed {
    logic [15:0] filter_id;   // free tag, reported back after loading
    logic [10:0] reserved;
    logic [4:0]  out_shift;   // result = full-precision sum >>> out_shift
  } cfg_hdr_t;

  // Number of table entries held by a filter of NTAPS taps.
  function automatic int unsigned lut_words(int unsigned ntaps, int unsigned lut_in);
    return ((ntaps + lut_in - 1) / lut_in) * (1 << lut_in);
  endfunction

  // Control words sent to the 1D filter core on its input FSL
  // (FSL control bit set): data field selects the command.
  typedef enum logic [1:0] {
    CMD_CLEAR = 2'd0,   // zero the tap delay line (start of a row or column)
    CMD_NOP   = 2'd1
  } fsl_cmd_e;

endpackage
