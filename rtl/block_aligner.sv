// block_aligner: finds the 66-bit block boundary in the receive bit stream
// using the 2-bit sync headers (block lock).
//
// The transceiver delivers 66 received bits per clock with an arbitrary
// rotation against the block boundary. The aligner keeps the previous word
// and picks the 66 bits starting at bit OFFSET of {current, previous}
// (bit 0 first in time). A valid sync header is 01 or 10; 00 and 11 never
// occur at the true boundary, so:
//   - while unlocked, an invalid header moves OFFSET on by one bit (slip) and
//     restarts the count; LOCK_COUNT valid headers in a row give lock;
//   - while locked, headers are counted in windows of WINDOW blocks; if
//     BAD_LIMIT of them in one window are invalid, lock is lost and the
//     aligner slips and hunts again.
// Interface: in_valid/in_word from the transceiver; out_valid/out_block one
// clock later, with lock. out_block[1:0] is the sync header.
// Using the sync header to find alignment follows the link's PHY; the hunt
// by slipping, the counts and their defaults (those of 10G/25G Ethernet
// block lock) are this design's choices.
module block_aligner
  import link_pkg::*;
#(
  parameter int unsigned LOCK_COUNT = 64,
  parameter int unsigned WINDOW     = 64,
  parameter int unsigned BAD_LIMIT  = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t in_word,
  output logic   out_valid,
  output block_t out_block,
  output logic   lock,
  output logic   slip_pulse   // one clock each time the offset moves
);

  localparam int unsigned OFF_W = $clog2(BLOCK_W);
  localparam int unsigned CNT_W = $clog2(LOCK_COUNT + WINDOW + 1);

  block_t             prev_q;
  logic [OFF_W-1:0]   offset_q;
  logic [CNT_W-1:0]   good_q, seen_q, bad_q;
  block_t             cand;
  logic               sh_ok;

  always_comb begin
    logic [2*BLOCK_W-1:0] two;
    two   = {in_word, prev_q};
    cand  = two[{1'b0, offset_q} +: BLOCK_W];
    sh_ok = cand[0] ^ cand[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_q     <= '0;
      offset_q   <= '0;
      good_q     <= '0;
      seen_q     <= '0;
      bad_q      <= '0;
      lock       <= 1'b0;
      out_valid  <= 1'b0;
      out_block  <= '0;
      slip_pulse <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      slip_pulse <= 1'b0;
      if (in_valid) begin
        prev_q    <= in_word;
        out_block <= cand;
        if (!lock) begin
          if (!sh_ok) begin
            good_q     <= '0;
            slip_pulse <= 1'b1;
            offset_q   <= (offset_q == OFF_W'(BLOCK_W - 1)) ? '0 : offset_q + 1'b1;
          end else if (good_q == CNT_W'(LOCK_COUNT - 1)) begin
            lock   <= 1'b1;
            good_q <= '0;
            seen_q <= '0;
            bad_q  <= '0;
          end else begin
            good_q <= good_q + 1'b1;
          end
        end else begin
          if (!sh_ok && bad_q == CNT_W'(BAD_LIMIT - 1)) begin
            lock       <= 1'b0;
            slip_pulse <= 1'b1;
            offset_q   <= (offset_q == OFF_W'(BLOCK_W - 1)) ? '0 : offset_q + 1'b1;
            good_q     <= '0;
          end else if (seen_q == CNT_W'(WINDOW - 1)) begin
            seen_q <= '0;
            bad_q  <= '0;
          end else begin
            seen_q <= seen_q + 1'b1;
            bad_q  <= bad_q + CNT_W'(!sh_ok);
          end
        end
      end
    end
  end

endmodule
