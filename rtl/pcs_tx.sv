// pcs_tx: transmit half of the 64b/66b physical coding sublayer.
//
// Each 64-bit word from the framer is scrambled (scrambler, 1 + x^39 + x^58)
// and prefixed with a 2-bit sync header, 01 for a data word and 10 for a
// control word, to form a 66-bit block for the transceiver. The sync header
// is not scrambled, so the receiver can find the block boundary from it.
// Interface: in_valid/in_ctrl/in_word; out_valid/out_block one clock later,
// out_block[1:0] the sync header (bit 0 sent first), [65:2] the scrambled
// payload. 64b/66b coding and the scrambler follow the 25G Ethernet PHY the
// link reuses; sync values and bit order are this design's choices.
module pcs_tx
  import link_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  logic   in_ctrl,
  input  word_t  in_word,
  output logic   out_valid,
  output block_t out_block
);

  logic       scr_valid;
  word_t      scr_word;
  logic [1:0] sync_q;

  scrambler u_scr (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .in_data  (in_word),
    .out_valid(scr_valid),
    .out_data (scr_word)
  );

  always_ff @(posedge clk) begin
    if (rst)           sync_q <= SYNC_CTRL;
    else if (in_valid) sync_q <= in_ctrl ? SYNC_CTRL : SYNC_DATA;
  end

  assign out_valid = scr_valid;
  assign out_block = {scr_word, sync_q};

endmodule
