// tb_piso - self-checking testbench for piso.
//
// Loads random 324-bit words and checks that enabled cycles send bit 1 first
// and bit 324 last, one bit per enabled cycle (also when enable toggles), that
// stop rises together with the last bit and nothing is sent after it, and that
// a new load clears stop.
module tb_piso;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1, load = 0, enable = 0;
  logic [K-1:0] parallel_in = '0;
  logic         serial_out, serial_valid, stop;
  int checks = 0, failures = 0;

  piso dut (.*);

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
    check(!stop && !serial_valid, "idle after reset");
    for (int n = 0; n < 8; n++) begin
      logic [K-1:0] w, got;
      int nbits, cyc, en_cycles;
      bit toggling, ok;
      w = rand_msg();
      toggling = (n >= 4);
      @(negedge clk) begin load = 1; parallel_in = w; end
      @(negedge clk) begin load = 0; parallel_in = ~w; end
      check(!stop, "load clears stop");
      nbits = 0; cyc = 0; en_cycles = 0; ok = 1;
      enable = 1;
      while (!stop && cyc < 2000) begin
        @(negedge clk);
        cyc++;
        if (serial_valid) begin
          got[nbits] = serial_out;
          nbits++;
          if (stop != (nbits == K)) ok = 0;
        end
        if (enable) en_cycles++;
        enable = toggling ? 1'($urandom) : 1'b1;
      end
      check(ok, "stop rises with bit 324 only");
      check(nbits == K, $sformatf("324 bits sent (got %0d)", nbits));
      check(got == w, "bits come out in order 1, 2, ..., 324");
      if (!toggling) check(cyc == K, "one bit per cycle");
      else           check(en_cycles == K, "one bit per enabled cycle");
      enable = 1;
      repeat (4) begin
        @(negedge clk);
        check(!serial_valid && stop, "nothing sent after stop");
      end
      enable = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
