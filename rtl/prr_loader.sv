// prr_loader: configuration path into the reconfigurable filter slot.
//
// It plays the part of the configuration port: it takes a partial-bitstream
// image one 32-bit word per clock (cfg_valid/cfg_word) and writes it into
// the distributed-arithmetic tables and output shift of the da_fir in the
// slot. Words before the synchronisation word are ignored. After SYNC_WORD
// comes one header word (fb_pkg::cfg_hdr_t) and then LUT_WORDS table entries,
// written to table addresses 0, 1, 2, ... in order.
//
// While an image is being written, slot_busy is high and slot_ready low:
// the slot holds a half-written filter and must not be used. When the last
// entry has been written, done pulses for one cycle, slot_ready rises and
// filter_id shows the header's tag. slot_ready is low after reset, until the
// first image has been loaded. At one word per 100 MHz clock the path runs
// at 400 MB/s, the ideal configuration rate of the target device family.
// Reconfiguring the filter slot through a configuration port follows the
// design; the image format is this design's own (see fb_pkg).
module prr_loader #(
  parameter int unsigned LUT_WORDS = fb_pkg::lut_words(fb_pkg::NTAPS, fb_pkg::LUT_IN),
  parameter int unsigned LUT_W     = fb_pkg::COEF_W + $clog2(fb_pkg::LUT_IN),
  localparam int unsigned AW       = $clog2(LUT_WORDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration word stream
  input  logic                    cfg_valid,
  input  logic [31:0]             cfg_word,
  // writes into the slot
  output logic                    lut_we,
  output logic [AW-1:0]           lut_addr,
  output logic signed [LUT_W-1:0] lut_data,
  output logic                    shift_we,
  output logic [4:0]              shift,
  // status
  output logic                    slot_busy,
  output logic                    slot_ready,
  output logic                    done,
  output logic [15:0]             filter_id
);
  import fb_pkg::*;

  typedef enum logic [1:0] {L_SYNC, L_HDR, L_LUT} lstate_e;
  lstate_e       st;
  logic [AW-1:0] idx;
  cfg_hdr_t      hdr;

  assign hdr       = cfg_hdr_t'(cfg_word);
  assign slot_busy = (st != L_SYNC);

  // the word stream drives the slot's write port directly
  assign lut_we   = cfg_valid && (st == L_LUT);
  assign lut_addr = idx;
  assign lut_data = cfg_word[LUT_W-1:0];
  assign shift_we = cfg_valid && (st == L_HDR);
  assign shift    = hdr.out_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= L_SYNC;
      idx        <= '0;
      slot_ready <= 1'b0;
      done       <= 1'b0;
      filter_id  <= '0;
    end else begin
      done <= 1'b0;
      if (cfg_valid) begin
        unique case (st)
          L_SYNC: if (cfg_word == SYNC_WORD) begin
            st         <= L_HDR;
            slot_ready <= 1'b0;
          end
          L_HDR: begin
            st        <= L_LUT;
            idx       <= '0;
            filter_id <= hdr.filter_id;
          end
          L_LUT: begin
            if (idx == AW'(LUT_WORDS - 1)) begin
              st         <= L_SYNC;
              slot_ready <= 1'b1;
              done       <= 1'b1;
            end
            idx <= idx + 1'b1;
          end
          default: st <= L_SYNC;
        endcase
      end
    end
  end

endmodule
