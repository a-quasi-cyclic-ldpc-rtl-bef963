// tb_channel - self-checking testbench for channel.
//
// For random codewords, with and without a bit flip at a random 5-bit
// position, the testbench runs init then read and checks: 24 beats, block
// indices 0..23 in order, every LLR equal to +8 for a received 0 and -8 for a
// received 1 (the flipped bit inverted), stop rising with beat 24 and no beat
// after stop, the first beat one cycle after read, and that read pauses the
// transfer without losing beats.
module tb_channel;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1;
  logic [N-1:0] codeword = '0;
  logic         flip = 0, init = 0, read = 0;
  logic [4:0]   flip_number = '0;
  logic         lam_valid, stop;
  logic [4:0]   lam_blk;
  llr_t         lam_data [Z];
  int checks = 0, failures = 0;

  channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!stop && !lam_valid, "idle after reset");
    for (int n = 0; n < 30; n++) begin
      logic [N-1:0] cw, rx;
      int beats, cyc, first;
      bit pauses;
      bit ok;
      cw = {rand_msg(), rand_msg()};
      pauses = (n % 3 == 2);
      @(negedge clk) begin
        codeword = cw;
        flip = (n % 2 == 1);
        flip_number = 5'($urandom);
        init = 1;
      end
      rx = cw;
      if (flip) rx[flip_number] = ~rx[flip_number];
      @(negedge clk) begin
        init = 0;
        codeword = ~cw;        // channel must have captured the codeword at init
        flip = 0;
      end
      check(!stop, "stop cleared by init");
      read = 1;
      beats = 0; cyc = 0; first = -1;
      while (!stop && cyc < 100) begin
        @(negedge clk);
        cyc++;
        if (lam_valid) begin
          if (first < 0) first = cyc;
          ok = (int'(lam_blk) == beats);
          for (int k = 0; k < Z; k++)
            if (lam_data[k] != (rx[beats*Z + k] ? -5'sd8 : 5'sd8)) ok = 0;
          check(ok, $sformatf("beat %0d carries block %0d with the right LLRs", beats, beats));
          beats++;
          check(stop == (beats == NB), "stop rises with the last beat only");
        end
        if (pauses) read = 1'($urandom);
        else        read = 1;
      end
      read = 1;
      check(beats == NB, $sformatf("24 beats (got %0d)", beats));
      if (!pauses) check(first == 1 && cyc == NB, "one beat per cycle from the first cycle");
      repeat (3) begin
        @(negedge clk);
        check(!lam_valid && stop, "no beat after stop");
      end
      read = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
