// channel - error injection and LLR (lambda) generation between encoder and decoder.
//
// On init (init1) the channel captures the encoder's codeword, inverts the bit
// selected by flip_number if flip is high (a user-controlled single bit error),
// and turns every received bit into a signed log-likelihood value with a 4-bit
// magnitude: bit 0 becomes +MAG, bit 1 becomes -MAG. This frame is lambda.
// While read (read2) is high, lambda is sent to the decoder one 27-value
// sub-block per cycle (24 beats, block index on lam_blk, strobe lam_valid);
// stop (stop1) rises with the last beat and stays high until the next init.
//
// The single-bit error, the 5-bit flip_number, the 4-bit magnitude and the
// init/read/stop handshake follow the design description. The magnitude value,
// the sub-block-per-beat transfer and the sampling of flip at init are this
// design's choices. With a 5-bit flip_number only bits 1..32 of the codeword
// can be hit.
//
// Timing: lambda is registered on the init edge; the first beat appears on the
// edge after read is first seen high; stop rises on the edge of beat 24.
module channel
  import qc_ldpc_pkg::*;
#(
  parameter int          FLIP_W = 5,
  parameter logic [3:0]  MAG    = 4'd8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N-1:0]      codeword,
  input  logic              flip,
  input  logic [FLIP_W-1:0] flip_number,
  input  logic              init,
  input  logic              read,
  output logic              lam_valid,
  output logic [4:0]        lam_blk,
  output llr_t              lam_data [Z],
  output logic              stop
);

  localparam llr_t LLR_ZERO = llr_t'({1'b0, MAG});   // received 0
  localparam llr_t LLR_ONE  = -LLR_ZERO;              // received 1

  logic [N-1:0] rx;        // received hard bits after the optional flip
  logic [4:0]   beat;

  logic [N-1:0] flip_mask;
  always_comb begin
    flip_mask = '0;
    if (flip) flip_mask[int'(flip_number)] = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rx        <= '0;
      beat      <= '0;
      lam_valid <= 1'b0;
      lam_blk   <= '0;
      stop      <= 1'b0;
      for (int k = 0; k < Z; k++) lam_data[k] <= '0;
    end else begin
      lam_valid <= 1'b0;
      if (init) begin
        rx   <= codeword ^ flip_mask;
        beat <= '0;
        stop <= 1'b0;
      end else if (read && !stop) begin
        lam_valid <= 1'b1;
        lam_blk   <= beat;
        for (int k = 0; k < Z; k++)
          lam_data[k] <= rx[int'(beat)*Z + k] ? LLR_ONE : LLR_ZERO;
        if (int'(beat) == NB - 1) stop <= 1'b1;
        else                      beat <= beat + 5'd1;
      end
    end
  end

endmodule
