// scrambler: multiplicative (self-synchronising) scrambler, 1 + x^39 + x^58,
// 64 bits per clock.
//
// Each output bit is the input bit XOR the output bits sent 39 and 58 bits
// earlier. The 58-bit history S0..S57 (S0 the newest) holds past *outputs*,
// so the receiver needs no synchronisation word: it recovers the data from
// the received bits alone (see descrambler). Bit 0 of in_data is the first
// bit in time. The scrambler gives the line a statistical DC balance.
//
// Interface: in_valid/in_data enter, out_valid/out_data leave one clock
// later (registered). The history advances only on in_valid. Reset sets the
// history to all ones: the receiver follows any start value within 58 bits,
// but a zero history would turn a run of all-zero words (for example an
// all-zero idle pattern) into a line signal with no transitions apart from
// the sync headers, on which the block aligner could lock one bit off.
// The polynomial and the taps are those of the 25G Ethernet PHY the link
// reuses; the 64-bit parallel form and the register stage are this design's.
module scrambler
  import link_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);

  logic [SCR_LEN-1:0] state_q, state_d;
  word_t              scr;

  always_comb begin
    logic [SCR_LEN-1:0] s;
    s = state_q;
    for (int i = 0; i < WORD_W; i++) begin
      scr[i] = in_data[i] ^ s[SCR_TAP-1] ^ s[SCR_LEN-1];
      s      = {s[SCR_LEN-2:0], scr[i]};
    end
    state_d = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= '1;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state_q  <= state_d;
        out_data <= scr;
      end
    end
  end

endmodule
