// descrambler: inverse of the multiplicative scrambler 1 + x^39 + x^58,
// 64 bits per clock.
//
// The received bits shift into a 58-bit history S0..S57 (S0 the newest);
// each output bit is the received bit XOR S38 XOR S57. Because the history
// holds received bits, it equals the transmitter's history after 58 bits,
// whatever either side started with: no synchronisation word is needed.
// The price is error multiplication: one wrong line bit corrupts the output
// bit at its own position and again 39 and 58 bits later (three errors).
// Bit 0 of in_data is the first bit in time.
//
// Interface: in_valid/in_data enter, out_valid/out_data leave one clock
// later (registered); the history advances only on in_valid. The tap
// structure is the one drawn for the link's descrambler; the parallel form,
// register stage and reset-to-zero are this design's.
module descrambler
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
  word_t              dsc;

  always_comb begin
    logic [SCR_LEN-1:0] s;
    s = state_q;
    for (int i = 0; i < WORD_W; i++) begin
      dsc[i] = in_data[i] ^ s[SCR_TAP-1] ^ s[SCR_LEN-1];
      s      = {s[SCR_LEN-2:0], in_data[i]};
    end
    state_d = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state_q  <= state_d;
        out_data <= dsc;
      end
    end
  end

endmodule
