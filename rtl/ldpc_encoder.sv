// ldpc_encoder - systematic encoder for the IEEE 802.11n (648, 324) QC-LDPC code.
//
// The codeword is the 324-bit message followed by 324 parity bits p_0..p_11
// (twelve 27-bit sub-blocks). Because the parity part of H is dual-diagonal, the
// parity follows from three steps instead of a dense generator matrix:
//   stage 1  lambda_r = sum over message sub-blocks c of  P^BASE[r][c] * m_c
//            (twelve 27-bit XORs of cyclically shifted message sub-blocks)
//   stage 2  p_0 = lambda_0 + ... + lambda_11   (the shifts 1, 0, 1 of parity
//            column 0 add up to the identity, and the staircase cancels)
//   stage 3  p_1 = lambda_0 + P^1 p_0,
//            p_r+1 = lambda_r + p_r + P^BASE[r][12] p_0   for r = 1..10
// Each stage is one register stage, so the encoder accepts a message every cycle
// and the codeword appears three cycles after start. P^s x means the sub-block
// x rotated so that bit k takes bit (k + s) mod 27.
//
// The code, its sizes and the pipelined operation come from the design
// description; the split into these three stages is this design's choice.
//
// Interface: start samples msg. codeword is bit i = codeword bit i+1 (message in
// bits 0..323, parity in 324..647). enc_done rises with the codeword of the most
// recent start and stays high until the next start. Reset is asynchronous.
module ldpc_encoder
  import qc_ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [K-1:0] msg,
  output logic [N-1:0] codeword,
  output logic         enc_done
);

  typedef logic [Z-1:0] blk_t;

  function automatic blk_t rot(blk_t x, int s);
    blk_t y;
    for (int k = 0; k < Z; k++) y[k] = x[circ_col(k, s)];
    return y;
  endfunction

  // ---- stage 1: lambda_r -------------------------------------------------
  blk_t lam_c [MB];
  always_comb begin
    for (int r = 0; r < MB; r++) begin
      lam_c[r] = '0;
      for (int c = 0; c < KB; c++)
        if (BASE[r][c] >= 0) lam_c[r] ^= rot(msg[c*Z +: Z], BASE[r][c]);
    end
  end

  blk_t         lam1 [MB];
  logic [K-1:0] msg1;
  logic         v1;

  // ---- stage 2: p_0 ------------------------------------------------------
  blk_t p0_c;
  always_comb begin
    p0_c = '0;
    for (int r = 0; r < MB; r++) p0_c ^= lam1[r];
  end

  blk_t         lam2 [MB];
  blk_t         p0_2;
  logic [K-1:0] msg2;
  logic         v2;

  // ---- stage 3: p_1 .. p_11 ----------------------------------------------
  blk_t par_c [MB];
  always_comb begin
    par_c[0] = p0_2;
    par_c[1] = lam2[0] ^ rot(p0_2, BASE[0][KB]);
    for (int r = 1; r < MB - 1; r++) begin
      par_c[r+1] = lam2[r] ^ par_c[r];
      if (BASE[r][KB] >= 0) par_c[r+1] ^= rot(p0_2, BASE[r][KB]);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0;
      msg1 <= '0; msg2 <= '0; p0_2 <= '0;
      for (int r = 0; r < MB; r++) begin
        lam1[r] <= '0;
        lam2[r] <= '0;
      end
      codeword <= '0;
      enc_done <= 1'b0;
    end else begin
      v1 <= start;
      v2 <= v1;
      if (start) begin
        lam1 <= lam_c;
        msg1 <= msg;
      end
      if (v1) begin
        lam2 <= lam1;
        p0_2 <= p0_c;
        msg2 <= msg1;
      end
      if (v2) begin
        codeword[K-1:0] <= msg2;
        for (int r = 0; r < MB; r++) codeword[K + r*Z +: Z] <= par_c[r];
      end
      // done follows the newest start: a start clears it, and only the codeword
      // of a start with no later start in flight sets it again
      if (start)                     enc_done <= 1'b0;
      else if (v2 && !v1)            enc_done <= 1'b1;
    end
  end

endmodule
