// tb_enc_channel_dec - end-to-end testbench of the whole encoder-channel-decoder
// system at its default parameters.
//
// Each run writes (or keeps) a message, raises data_read, optionally injects a
// single bit error in the channel step after a random wait on channel_rdy,
// and collects the serial output until stop2. Checked per run: the 324 bits
// that come out equal the message, parity_ok, the codeword read-out (24-bit
// packets) equals the reference encoding, the decoded-message read-out
// (12-bit packets) equals the message, and the run takes exactly
// 360 + iterations + (channel wait - 1) cycles outside accept_msg.
// The board message is run without error (read-out must equal the 27 printed
// packets) and with an error at each of the 32 positions flip_number reaches.
// Every mechanism - message write, data_read wait, encoder wait, channel wait,
// error injection, error correction, error-free decoding, serial output and
// both display modes - is counted and must occur at least once.
module tb_enc_channel_dec;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1;
  logic         msg_wr = 0, data_read = 0, channel_rdy = 0, flip = 0, show_dec = 0;
  logic [K-1:0] msg_in = '0;
  logic [4:0]   flip_number = '0, disp_addr = '0;
  logic         enc_done, dec_done, parity_ok, decoded, decoded_valid, stop2;
  logic [7:0]   iter_count;
  cu_state_t    state;
  logic [23:0]  packet;
  logic [6:0]   hex [6];
  int checks = 0, failures = 0;

  typedef enum int {M_WRITE, M_IDLE_WAIT, M_ENC_WAIT, M_CHAN_WAIT, M_FLIP, M_CORRECT,
                    M_CLEAN, M_SERIAL, M_DISP_CW, M_DISP_DEC, M_NUM} mech_t;
  int mech [M_NUM];

  enc_channel_dec dut (.*);

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

  task automatic run(input logic [K-1:0] m, input bit write, input bit do_flip,
                     input logic [4:0] fn, input int chan_wait, input int idle_wait);
    logic [N-1:0] cw;
    logic [K-1:0] got;
    int nbits, busy, guard;
    bit cw_ok, dec_ok;
    cw = ref_encode(m);
    @(negedge clk);
    if (write) begin
      @(negedge clk) begin msg_wr = 1; msg_in = m; end
      @(negedge clk) begin msg_wr = 0; msg_in = ~m; end
      mech[M_WRITE]++;
    end
    repeat (idle_wait) begin
      @(negedge clk);
      check(state == S_ACCEPT_MSG, "waits in accept_msg without data_read");
    end
    if (idle_wait > 0) mech[M_IDLE_WAIT]++;
    data_read = 1;
    channel_rdy = (chan_wait == 0);
    flip = do_flip;
    flip_number = fn;
    nbits = 0; busy = 0; guard = 0;
    cw_ok = 1; dec_ok = 1;
    // wait for the run to leave accept_msg
    @(negedge clk);
    data_read = 0;
    while (state != S_ACCEPT_MSG && guard < 5000) begin
      guard++;
      busy++;
      if (state == S_ENCODING) mech[M_ENC_WAIT]++;
      if (state == S_CHANNEL) begin
        if (chan_wait > 0) begin
          chan_wait--;
          mech[M_CHAN_WAIT]++;
          if (chan_wait == 0) channel_rdy = 1;
        end
      end
      @(negedge clk);
      if (decoded_valid) begin
        got[nbits] = decoded;
        nbits++;
      end
    end
    flip = 0;
    channel_rdy = 0;
    // codeword and decoded-message read-out at all addresses, while the
    // system idles in accept_msg with both results still held
    for (int p = 0; p < 27; p++) begin
      logic [23:0] e;
      disp_addr = 5'(p);
      show_dec = 0;
      #1;
      for (int t = 0; t < 24; t++) e[23 - t] = cw[24*p + t];
      if (packet != e) cw_ok = 0;
      show_dec = 1;
      #1;
      e = '0;
      for (int t = 0; t < 12; t++) e[11 - t] = m[12*p + t];
      if (packet != e) dec_ok = 0;
    end
    mech[M_DISP_CW]++;
    mech[M_DISP_DEC]++;
    check(nbits == K, $sformatf("324 bits sent (got %0d)", nbits));
    check(got == m, "serial output equals the message");
    check(parity_ok, "decoder reports all checks satisfied");
    check(cw_ok, "codeword read-out equals the reference encoding");
    check(dec_ok, "decoded read-out equals the message");
    check(stop2, "stop2 high at the end");
    if (nbits == K) mech[M_SERIAL]++;
    if (do_flip) begin
      mech[M_FLIP]++;
      check(iter_count >= 1, "an injected error needs at least one iteration");
      if (got == m) mech[M_CORRECT]++;
    end else begin
      check(iter_count == 0, "an error-free frame needs no iteration");
      mech[M_CLEAN]++;
    end
    check(busy == 360 + int'(iter_count) + extra_chan,
          $sformatf("run length %0d cycles, expected %0d", busy, 360 + int'(iter_count) + extra_chan));
  endtask

  int extra_chan;

  initial begin
    logic [N-1:0] t2;
    t2 = table2_codeword();
    init_ref();
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // the stored board message, no error: read-out must be the printed packets
    extra_chan = 0;
    run(t2[K-1:0], 0, 0, '0, 0, 0);
    begin
      bit ok;
      ok = 1;
      show_dec = 0;
      for (int p = 0; p < 27; p++) begin
        disp_addr = 5'(p);
        #1;
        if (packet != TABLE2[p]) ok = 0;
      end
      check(ok, "read-out of the board message equals the 27 printed packets");
    end

    // every position flip_number can reach
    for (int f = 0; f < 32; f++) begin
      extra_chan = 0;
      run(t2[K-1:0], 0, 1, 5'(f), 0, f % 3);
    end

    // random messages, random waits, with and without errors
    for (int n = 0; n < 12; n++) begin
      int cw_wait;
      cw_wait = (n % 3 == 0) ? 0 : $urandom_range(2, 5);
      extra_chan = (cw_wait > 0) ? cw_wait - 1 : 0;
      run(rand_msg(), 1, n % 2 == 0, 5'($urandom), cw_wait, $urandom_range(0, 2));
    end

    foreach (mech[i]) check(mech[i] > 0, $sformatf("mechanism %s occurred (%0d times)",
                                                   mech_t'(i), mech[i]));
    $display("mechanisms: write %0d, idle %0d, enc-wait %0d, chan-wait %0d, flip %0d, corrected %0d, clean %0d, serial %0d, disp %0d/%0d",
             mech[M_WRITE], mech[M_IDLE_WAIT], mech[M_ENC_WAIT], mech[M_CHAN_WAIT], mech[M_FLIP],
             mech[M_CORRECT], mech[M_CLEAN], mech[M_SERIAL], mech[M_DISP_CW], mech[M_DISP_DEC]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
