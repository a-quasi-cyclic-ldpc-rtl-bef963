// tb_ldpc_decoder - self-checking testbench for ldpc_decoder.
//
// Codewords come from the reference encoder of tb_ref_pkg. Each frame is
// written 27 LLRs per beat in a random block order, then the decoder is
// enabled. Checked:
//   * error-free frames (hard +/-8 and random soft magnitudes): done one cycle
//     after enable, zero iterations, parity_ok, message correct;
//   * every single-bit error in the board read-out codeword and in random
//     codewords: corrected, parity_ok, done = iterations + 1 cycles;
//   * double errors: whenever parity_ok is reported the message is correct;
//   * a random (non-codeword) frame: stops after exactly MAX_ITER iterations,
//     MAX_ITER + 1 cycles, with parity_ok low;
//   * enable low pauses decoding; init clears done.
module tb_ldpc_decoder;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int MAX_ITER = 10;   // the decoder default

  logic         clk = 0, rst = 1, init = 0, lam_valid = 0, enable = 0;
  logic [4:0]   lam_blk = '0;
  llr_t         lam_data [Z];
  logic [K-1:0] msg_dec;
  logic         done, parity_ok;
  logic [7:0]   iter_count;
  int checks = 0, failures = 0;
  int corrected = 0, double_ok = 0;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // load a frame of LLRs and decode it; returns cycles from enable to done
  task automatic run(input llr_t llr [N], input bit pause, output int cyc);
    int order [NB];
    for (int b = 0; b < NB; b++) order[b] = b;
    for (int b = NB - 1; b > 0; b--) begin
      int j, t;
      j = $urandom_range(0, b);
      t = order[b]; order[b] = order[j]; order[j] = t;
    end
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    check(!done, "init clears done");
    foreach (order[i]) begin
      lam_valid = 1;
      lam_blk = 5'(order[i]);
      for (int k = 0; k < Z; k++) lam_data[k] = llr[order[i]*Z + k];
      @(negedge clk);
    end
    lam_valid = 0;
    cyc = 0;
    enable = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      if (enable) cyc++;
      enable = pause ? 1'($urandom) : 1'b1;
    end
    enable = 0;
  endtask

  function automatic void hard_frame(logic [N-1:0] bits, output llr_t llr [N]);
    for (int v = 0; v < N; v++) llr[v] = bits[v] ? -5'sd8 : 5'sd8;
  endfunction

  initial begin
    llr_t         llr [N];
    logic [N-1:0] cw, rx;
    logic [K-1:0] m;
    int cyc, pos, pos2;
    for (int k = 0; k < Z; k++) lam_data[k] = '0;
    init_ref();
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // error-free frames
    for (int n = 0; n < 4; n++) begin
      m = rand_msg();
      cw = ref_encode(m);
      if (n < 2) hard_frame(cw, llr);
      else for (int v = 0; v < N; v++) begin
        llr_t mag;
        mag = llr_t'($urandom_range(1, 15));
        llr[v] = cw[v] ? -mag : mag;
      end
      run(llr, 0, cyc);
      check(cyc == 1 && iter_count == 0, $sformatf("error-free frame done in 1 cycle (got %0d)", cyc));
      check(parity_ok && msg_dec == m, "error-free frame decoded");
    end

    // every single error in the read-out codeword, and in random codewords
    for (int n = 0; n < N + 60; n++) begin
      if (n < N) begin
        cw = table2_codeword();
        pos = n;
      end else begin
        cw = ref_encode(rand_msg());
        pos = $urandom_range(0, N - 1);
      end
      rx = cw;
      rx[pos] = ~rx[pos];
      hard_frame(rx, llr);
      run(llr, n % 50 == 7, cyc);
      check(parity_ok && msg_dec == cw[K-1:0], $sformatf("single error at bit %0d corrected", pos));
      check(cyc == int'(iter_count) + 1 && iter_count >= 1, "done after iterations + 1 cycles");
      if (parity_ok && msg_dec == cw[K-1:0]) corrected++;
    end

    // double errors
    for (int n = 0; n < 40; n++) begin
      cw = ref_encode(rand_msg());
      pos = $urandom_range(0, N - 1);
      pos2 = (pos + $urandom_range(1, N - 1)) % N;
      rx = cw;
      rx[pos] = ~rx[pos];
      rx[pos2] = ~rx[pos2];
      hard_frame(rx, llr);
      run(llr, 0, cyc);
      if (parity_ok) begin
        check(msg_dec == cw[K-1:0], "a double error reported as decoded is decoded right");
        double_ok++;
      end
    end

    // random frame: no codeword nearby
    for (int v = 0; v < N; v++) llr[v] = 1'($urandom) ? -5'sd8 : 5'sd8;
    run(llr, 0, cyc);
    check(!parity_ok && iter_count == MAX_ITER, "random frame gives up after MAX_ITER iterations");
    check(cyc == MAX_ITER + 1, $sformatf("and takes MAX_ITER + 1 cycles (got %0d)", cyc));

    $display("single errors corrected: %0d, double errors decoded: %0d of 40", corrected, double_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
