// ldpc_decoder - min-sum decoder for the IEEE 802.11n (648, 324) QC-LDPC code.
//
// The decoder first stores the received frame lambda (648 signed 5-bit LLRs,
// positive = bit 0), written one 27-value sub-block per lam_valid beat. init
// (init2) clears the check-to-variable messages, the iteration count and done.
//
// While enable (enable_dec) is high and done is low, one full flooding
// iteration of the min-sum algorithm is done per clock cycle, all in parallel:
//   * every variable node v adds its LLR and all incoming check messages:
//     sum_v = lambda_v + sum_e c2v_e; the hard decision is the sign of sum_v;
//   * every edge sends v2c_e = sum_v - c2v_e to its check, saturated to +/-15;
//   * every check node returns to each edge the product of the other edges'
//     signs times the smallest magnitude among the other edges (min1, or min2
//     for the edge that holds min1).
// In the same cycle the 324 parity checks are evaluated on the hard decision.
// If all hold, decoding stops (done, parity_ok) and the message bits are
// latched; otherwise the new messages are stored and the next iteration runs.
// After MAX_ITER iterations without success the decoder stops with parity_ok
// low and outputs the last hard decision.
//
// The decoder position in the system, the 4-bit LLR magnitude and the frame
// register follow the design description; the choice of plain min-sum (the
// simplification of sum-product the description discusses), the flooding
// schedule with one iteration per cycle and MAX_ITER are this design's own.
//
// Timing: a frame without errors is accepted in the first enabled cycle; each
// extra iteration costs one cycle, so done rises (iterations + 1) cycles after
// enable is first seen. done stays high until the next init. Reset is
// asynchronous, active high.
module ldpc_decoder
  import qc_ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic         lam_valid,
  input  logic [4:0]   lam_blk,
  input  llr_t         lam_data [Z],
  input  logic         enable,
  output logic [K-1:0] msg_dec,
  output logic         done,
  output logic         parity_ok,
  output logic [7:0]   iter_count
);

  localparam llr_t LMAX = llr_t'(LLR_MAX);
  localparam llr_t LMIN = -LMAX;

  llr_t lam [N];                  // stored frame
  llr_t c2v [MB][NB][Z];          // check-to-variable messages (zero sub-blocks unused)

  // ---- variable nodes: total sum and hard decision -----------------------
  vsum_t        vsum [N];
  logic [N-1:0] hard;
  always_comb begin
    for (int v = 0; v < N; v++) vsum[v] = vsum_t'(lam[v]);
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (BASE[r][c] >= 0)
          for (int k = 0; k < Z; k++)
            vsum[c*Z + circ_col(k, BASE[r][c])] += vsum_t'(c2v[r][c][k]);
    for (int v = 0; v < N; v++) hard[v] = vsum[v][SUM_W-1];
  end

  // ---- parity checks on the hard decision ---------------------------------
  logic syn_ok;
  always_comb begin
    logic [M-1:0] syn;
    syn = '0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (BASE[r][c] >= 0)
          for (int k = 0; k < Z; k++)
            syn[r*Z + k] ^= hard[c*Z + circ_col(k, BASE[r][c])];
    syn_ok = (syn == '0);
  end

  // ---- variable-to-check messages ----------------------------------------
  llr_t v2c [MB][NB][Z];
  always_comb begin
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        for (int k = 0; k < Z; k++) begin
          vsum_t d;
          d = '0;
          if (BASE[r][c] >= 0)
            d = vsum[c*Z + circ_col(k, BASE[r][c])] - vsum_t'(c2v[r][c][k]);
          if (d > vsum_t'(LMAX))      v2c[r][c][k] = LMAX;
          else if (d < vsum_t'(LMIN)) v2c[r][c][k] = LMIN;
          else                        v2c[r][c][k] = llr_t'(d);
        end
  end

  // ---- check nodes: min-sum -----------------------------------------------
  llr_t c2v_new [MB][NB][Z];
  always_comb begin
    for (int r = 0; r < MB; r++)
      for (int k = 0; k < Z; k++) begin
        logic [LLR_W-2:0] min1, min2, mag;
        logic [4:0]       idx1;
        logic             sgn;
        min1 = '1; min2 = '1; mag = '0; idx1 = '0; sgn = 1'b0;
        for (int c = 0; c < NB; c++)
          if (BASE[r][c] >= 0) begin
            mag = v2c[r][c][k][LLR_W-1] ? (LLR_W-1)'(-v2c[r][c][k]) : v2c[r][c][k][LLR_W-2:0];
            sgn ^= v2c[r][c][k][LLR_W-1];
            if (mag < min1) begin
              min2 = min1;
              min1 = mag;
              idx1 = 5'(c);
            end else if (mag < min2) begin
              min2 = mag;
            end
          end
        for (int c = 0; c < NB; c++) begin
          c2v_new[r][c][k] = '0;
          if (BASE[r][c] >= 0) begin
            mag = (5'(c) == idx1) ? min2 : min1;
            c2v_new[r][c][k] = (sgn ^ v2c[r][c][k][LLR_W-1]) ? -llr_t'({1'b0, mag})
                                                             :  llr_t'({1'b0, mag});
          end
        end
      end
  end

  // input rules: beats address one of the 24 sub-blocks, and the frame is not
  // cleared or rewritten while iterations run
  a_blk_range: assert property (@(posedge clk) disable iff (rst)
    lam_valid |-> int'(lam_blk) < NB);
  a_no_write_while_decoding: assert property (@(posedge clk) disable iff (rst)
    enable |-> !(init || lam_valid));

  // ---- control and storage -----------------------------------------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int v = 0; v < N; v++) lam[v] <= '0;
      for (int r = 0; r < MB; r++)
        for (int c = 0; c < NB; c++)
          for (int k = 0; k < Z; k++) c2v[r][c][k] <= '0;
      msg_dec    <= '0;
      done       <= 1'b0;
      parity_ok  <= 1'b0;
      iter_count <= '0;
    end else begin
      if (lam_valid)
        for (int k = 0; k < Z; k++) lam[int'(lam_blk)*Z + k] <= lam_data[k];
      if (init) begin
        for (int r = 0; r < MB; r++)
          for (int c = 0; c < NB; c++)
            for (int k = 0; k < Z; k++) c2v[r][c][k] <= '0;
        done       <= 1'b0;
        parity_ok  <= 1'b0;
        iter_count <= '0;
      end else if (enable && !done) begin
        if (syn_ok || int'(iter_count) == MAX_ITER) begin
          done      <= 1'b1;
          parity_ok <= syn_ok;
          msg_dec   <= hard[K-1:0];
        end else begin
          c2v        <= c2v_new;
          iter_count <= iter_count + 8'd1;
        end
      end
    end
  end

endmodule
