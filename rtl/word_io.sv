// word_io: the 84-bit input-word and output-word registers, the only path
// into and out of the 32-bit local storage.
//
// As in the original architecture, everything written to the storage comes
// from the input-word register and everything read from it lands in the
// output-word register; both are as wide as the datapath word (84 bits). The
// CPU side works a byte at a time, the datapath side a whole word at a time:
//   * input word: in_shift shifts it left by one byte and puts din in the low
//     byte, so the software sends the most significant byte first (11 bytes;
//     the top nibble of the first byte falls off). in_ld loads a whole
//     datapath result (in_data) instead. in_word is presented whole; the
//     controller writes it to the storage as three 32-bit slices.
//   * output word: out_ld loads 32-bit word out_idx (0..2) from the storage
//     read data. out_word is presented whole to the datapath operand
//     registers. dout is always the low byte, and out_shift shifts the
//     register right by one byte, so the software reads the least
//     significant byte first.
// Byte order and the whole-word load paths are this design's choices.
// Every operation takes effect at the clock edge; in_ld has priority over
// in_shift and out_ld over out_shift (the controller never asks for both).
module word_io
  import hecc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_shift,
  input  logic [7:0]        din,
  input  logic              in_ld,
  input  logic [WORD_W-1:0] in_data,
  output logic [WORD_W-1:0] in_word,
  input  logic              out_ld,
  input  logic [1:0]        out_idx,
  input  logic [RAM_W-1:0]  out_data,
  input  logic              out_shift,
  output logic [WORD_W-1:0] out_word,
  output logic [7:0]        dout
);

  localparam int unsigned PADW = WORDS_USED * RAM_W;   // 96

  logic [PADW-1:0] out_q;   // only the low WORD_W bits are ever non-zero

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_word <= '0;
      out_q   <= '0;
    end else begin
      if (in_ld)         in_word <= in_data;
      else if (in_shift) in_word <= {in_word[WORD_W-9:0], din};
      if (out_ld) begin
        out_q[out_idx*RAM_W +: RAM_W] <= out_data;
        // keep bits above the word length clear
        if (out_idx == 2'd2) out_q[PADW-1:WORD_W] <= '0;
      end else if (out_shift) begin
        out_q <= out_q >> 8;
      end
    end
  end

  assign out_word = out_q[WORD_W-1:0];
  assign dout     = out_q[7:0];

endmodule
