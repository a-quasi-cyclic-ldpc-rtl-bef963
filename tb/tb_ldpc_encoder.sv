// tb_ldpc_encoder - self-checking testbench for ldpc_encoder.
//
// 1. The board demonstration message must give exactly the 27 read-out packets.
// 2. Random messages must give a codeword whose first half is the message and
//    whose parity equals that of a reference encoder that inverts the parity
//    part of H by Gaussian elimination (no dual-diagonal shortcut).
// 3. enc_done must rise exactly 3 cycles after start and stay until the next
//    start; back-to-back starts must produce one codeword per cycle.
module tb_ldpc_encoder;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1, start = 0;
  logic [K-1:0] msg = '0;
  logic [N-1:0] codeword;
  logic         enc_done;
  int checks = 0, failures = 0;

  ldpc_encoder dut (.*);

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

  task automatic encode(logic [K-1:0] m, output int lat);
    @(negedge clk) begin start = 1; msg = m; end
    @(negedge clk) start = 0;
    lat = 1;
    while (!enc_done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    logic [N-1:0] t2, exp_cw;
    logic [K-1:0] m [3];
    int lat;
    t2 = table2_codeword();
    init_ref();
    check(syndrome_ok(t2), "read-out codeword satisfies H (reference check)");
    check(ref_encode(t2[K-1:0]) == t2, "reference encoder reproduces the read-out codeword");
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(enc_done == 0, "enc_done low after reset");

    encode(t2[K-1:0], lat);
    check(lat == 3, $sformatf("latency 3 cycles (got %0d)", lat));
    for (int p = 0; p < 27; p++) begin
      logic [23:0] pk;
      for (int t = 0; t < 24; t++) pk[23 - t] = codeword[24*p + t];
      check(pk == TABLE2[p], $sformatf("packet %0d = %06h (expected %06h)", p, pk, TABLE2[p]));
    end
    repeat (3) @(negedge clk);
    check(enc_done == 1, "enc_done holds");

    for (int n = 0; n < 40; n++) begin
      logic [K-1:0] r;
      r = rand_msg();
      if (n == 0) r = '0;
      if (n == 1) r = '1;
      encode(r, lat);
      exp_cw = ref_encode(r);
      check(lat == 3, "latency 3 cycles");
      check(codeword == exp_cw, $sformatf("random message %0d encodes like the reference", n));
      check(syndrome_ok(codeword), "codeword satisfies H");
    end

    // pipelined: three starts in consecutive cycles
    for (int i = 0; i < 3; i++) m[i] = rand_msg();
    for (int i = 0; i < 3; i++) @(negedge clk) begin start = 1; msg = m[i]; end
    @(negedge clk) start = 0;
    check(enc_done == 0, "enc_done low while pipeline runs");
    check(codeword == ref_encode(m[0]), "first pipelined codeword");
    @(negedge clk);
    check(enc_done == 0, "enc_done waits for the last start");
    check(codeword == ref_encode(m[1]), "second pipelined codeword");
    @(negedge clk);
    check(enc_done == 1, "enc_done with the last codeword");
    check(codeword == ref_encode(m[2]), "third pipelined codeword");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
