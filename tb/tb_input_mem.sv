// tb_input_mem - self-checking testbench for input_mem.
//
// Checks that after reset the stored message is the message half of the
// board read-out codeword, that read copies the register to msg_out one edge
// later, that msg_out holds while read is low, and that a write replaces the
// stored message only for later reads.
module tb_input_mem;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1, wr = 0, read = 0;
  logic [K-1:0] msg_in = '0, msg_out;
  int checks = 0, failures = 0;

  input_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    logic [N-1:0] cw;
    logic [K-1:0] m, prev;
    cw = table2_codeword();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(msg_out == '0, "msg_out cleared by reset");
    @(negedge clk) read = 1;
    @(negedge clk) read = 0;
    check(msg_out == cw[K-1:0], "reset contents are the demonstration message");
    for (int n = 0; n < 20; n++) begin
      prev = msg_out;
      m = rand_msg();
      @(negedge clk) begin wr = 1; msg_in = m; end
      @(negedge clk) wr = 0;
      check(msg_out == prev, "write alone does not change msg_out");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(msg_out == prev, "msg_out holds without read");
      read = 1;
      @(negedge clk) read = 0;
      check(msg_out == m, "read returns the written message");
    end
    // write and read in the same cycle: the old contents are read
    prev = msg_out;
    m = rand_msg();
    @(negedge clk) begin wr = 1; read = 1; msg_in = m; end
    @(negedge clk) begin wr = 0; read = 0; end
    check(msg_out == prev, "simultaneous read sees the old contents");
    @(negedge clk) read = 1;
    @(negedge clk) read = 0;
    check(msg_out == m, "then the new contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
