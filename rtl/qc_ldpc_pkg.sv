// qc_ldpc_pkg - constants and types shared by the QC-LDPC encoder-channel-decoder.
//
// The code is the IEEE 802.11n rate-1/2 LDPC code with 648-bit codewords. Its
// parity-check matrix H (324 x 648) is built from a 12 x 24 prototype matrix of
// 27 x 27 sub-blocks: an entry s >= 0 stands for the identity matrix cyclically
// shifted by s (row k of the sub-block has its one in column (k + s) mod 27), and
// -1 stands for the all-zero sub-block. Columns 0..11 of the prototype carry the
// message, columns 12..23 the parity, which has the dual-diagonal form of the
// standard: column 12 holds shifts 1, 0, 1 in rows 0, 6, 11, and the staircase
// in columns 13..23 lets the parity be computed by a running sum.
//
// Bit numbering used throughout: vector bit i is codeword (or message) bit i+1 of
// the transmitted order, so bit 0 is sent first. Sub-block c covers bits
// 27c .. 27c+26.
//
// The prototype matrix is the one of the IEEE 802.11n standard; the codeword that
// the board demonstration reads out (see tb_ldpc_encoder) satisfies all of its
// 324 checks, which confirms the matrix, the shift convention and the bit order.
package qc_ldpc_pkg;

  localparam int Z  = 27;          // sub-block (circulant) size
  localparam int MB = 12;          // prototype rows    (check sub-blocks)
  localparam int NB = 24;          // prototype columns (codeword sub-blocks)
  localparam int KB = NB - MB;     // message sub-blocks
  localparam int N  = NB * Z;      // 648 codeword bits
  localparam int K  = KB * Z;      // 324 message bits
  localparam int M  = MB * Z;      // 324 parity checks

  localparam int LLR_W = 5;        // sign + 4-bit magnitude
  localparam int SUM_W = 9;        // variable-node sum: LLR + up to 11 messages
  localparam int LLR_MAX = (1 << (LLR_W - 1)) - 1;  // +15, symmetric saturation

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [SUM_W-1:0] vsum_t;

  // Prototype matrix, row by row; -1 marks a zero sub-block.
  localparam int BASE [MB][NB] = '{
    '{ 0, -1, -1, -1,  0,  0, -1, -1,  0, -1, -1,  0,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{22,  0, -1, -1, 17, -1,  0,  0, 12, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 6, -1,  0, -1, 10, -1, -1, -1, 24, -1,  0, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 2, -1, -1,  0, 20, -1, -1, -1, 25,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{23, -1, -1, -1,  3, -1, -1, -1,  0, -1,  9, 11, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{24, -1, 23,  1, 17, -1,  3, -1, 10, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{25, -1, -1, -1,  8, -1, -1, -1,  7, 18, -1, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{13, 24, -1, -1,  0, -1,  8, -1,  6, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{ 7, 20, -1, 16, 22, 10, -1, -1, 23, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{11, -1, -1, -1, 19, -1, -1, -1, 13, -1,  3, 17, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{25, -1,  8, -1, 23, 18, -1, 14,  9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{ 3, -1, -1, -1, 16, -1, -1,  2, 25,  5, -1, -1,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Row k of a sub-block with shift s has its one in column (k + s) mod Z.
  function automatic int circ_col(int k, int s);
    return (k + s) % Z;
  endfunction

  // Control-unit states, in the order the sequence visits them.
  typedef enum logic [3:0] {
    S_ACCEPT_MSG  = 4'd0,
    S_READ_MSG    = 4'd1,
    S_START_ENC   = 4'd2,
    S_ENCODING    = 4'd3,
    S_CHANNEL     = 4'd4,
    S_INIT_MAG    = 4'd5,
    S_READ_MAG    = 4'd6,
    S_DECODING    = 4'd7,
    S_LOAD_PISO   = 4'd8,
    S_ENABLE_PISO = 4'd9
  } cu_state_t;

endpackage
