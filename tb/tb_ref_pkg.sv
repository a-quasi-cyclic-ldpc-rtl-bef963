// tb_ref_pkg - reference data and a reference encoder for the testbenches.
//
// TABLE2 holds the 27 read-out packets (24 bits each, first bit in the MSB) of
// the codeword that the board demonstration displays; table2_codeword() turns
// them into a 648-bit vector with bit i = codeword bit i+1.
//
// The reference encoder does not use the dual-diagonal shortcut of the RTL.
// init_ref() expands H into 324 check rows and inverts the 324 x 324 parity
// part by Gauss-Jordan elimination over GF(2); ref_encode() then computes
// p = Hp^-1 * (Hs * m). syndrome_ok() checks H * c = 0 directly.
package tb_ref_pkg;
  import qc_ldpc_pkg::*;

  localparam logic [23:0] TABLE2 [27] = '{
    24'hd9da7b, 24'hea1a31, 24'hd8abe2, 24'ha27b4e, 24'h855c5c, 24'h5c50ed,
    24'h00c483, 24'h88ea9b, 24'h0fb7c2, 24'h04c2c1, 24'h2d3997, 24'h157a6f,
    24'hc8e4bb, 24'he43dbf, 24'h9ada21, 24'hb31d1d, 24'hcc3e52, 24'h120b3f,
    24'haac201, 24'hde829a, 24'h29424a, 24'h871d86, 24'h7e168b, 24'h646768,
    24'hffe45c, 24'hdb0c62, 24'h1a23c6
  };

  function automatic logic [N-1:0] table2_codeword();
    logic [N-1:0] cw;
    for (int p = 0; p < 27; p++)
      for (int t = 0; t < 24; t++) cw[24*p + t] = TABLE2[p][23 - t];
    return cw;
  endfunction

  // row i of H as a 648-bit vector
  logic [N-1:0] hrow [M];
  // inverse of the parity part, one 324-bit row per check
  logic [M-1:0] hp_inv [M];
  bit           ref_ready = 0;

  function automatic void init_ref();
    logic [M-1:0] a [M];
    logic [M-1:0] inv [M];
    logic [M-1:0] t;
    for (int r = 0; r < MB; r++)
      for (int k = 0; k < Z; k++) begin
        hrow[r*Z + k] = '0;
        for (int c = 0; c < NB; c++)
          if (BASE[r][c] >= 0) hrow[r*Z + k][c*Z + (k + BASE[r][c]) % Z] = 1'b1;
      end
    for (int i = 0; i < M; i++) begin
      a[i]   = hrow[i][N-1:K];
      inv[i] = '0;
      inv[i][i] = 1'b1;
    end
    for (int col = 0; col < M; col++) begin
      int piv;
      piv = -1;
      for (int i = col; i < M; i++)
        if (a[i][col] && piv < 0) piv = i;
      if (piv < 0) $fatal(1, "parity part of H is singular");
      t = a[piv];   a[piv]   = a[col];   a[col]   = t;
      t = inv[piv]; inv[piv] = inv[col]; inv[col] = t;
      for (int i = 0; i < M; i++)
        if (i != col && a[i][col]) begin
          a[i]   ^= a[col];
          inv[i] ^= inv[col];
        end
    end
    for (int i = 0; i < M; i++) hp_inv[i] = inv[i];
    ref_ready = 1;
  endfunction

  function automatic logic [N-1:0] ref_encode(logic [K-1:0] msg);
    logic [M-1:0] s;
    logic [M-1:0] p;
    if (!ref_ready) init_ref();
    for (int i = 0; i < M; i++) s[i] = ^(hrow[i][K-1:0] & msg);
    for (int i = 0; i < M; i++) p[i] = ^(hp_inv[i] & s);
    return {p, msg};
  endfunction

  function automatic bit syndrome_ok(logic [N-1:0] cw);
    if (!ref_ready) init_ref();
    for (int i = 0; i < M; i++)
      if (^(hrow[i] & cw)) return 0;
    return 1;
  endfunction

  function automatic logic [K-1:0] rand_msg();
    logic [K-1:0] m;
    for (int i = 0; i < K; i++) m[i] = 1'($urandom);
    return m;
  endfunction

endpackage
