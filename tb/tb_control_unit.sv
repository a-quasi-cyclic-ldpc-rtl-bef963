// tb_control_unit - self-checking testbench for control_unit.
//
// Runs several complete sequences with random waits on every handshake input
// and checks after each clock edge that the state is the one a reference
// model of the ten-state sequence predicts and that exactly the outputs of
// that state are high. Also checks that an asynchronous reset returns to
// accept_msg from the middle of a sequence.
module tb_control_unit;
  import qc_ldpc_pkg::*;

  logic      clk = 0, rst = 1;
  logic      data_read = 0, enc_done = 0, channel_rdy = 0, stop1 = 0, dec_done = 0, stop2 = 0;
  logic      read1, start, init1, init2, read2, enable_dec, load, enable;
  cu_state_t state;
  int checks = 0, failures = 0;
  int visits [10];

  control_unit dut (.*);

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

  // reference: state index 0..9 in sequence order
  int exp_s;

  function automatic logic [7:0] outs_of(int s);
    // {read1, start, init1, init2, read2, enable_dec, load, enable}
    case (s)
      1: return 8'b1000_0000;
      2: return 8'b0100_0000;
      5: return 8'b0011_0000;
      6: return 8'b0000_1000;
      7: return 8'b0000_0100;
      8: return 8'b0000_0010;
      9: return 8'b0000_0001;
      default: return 8'b0000_0000;
    endcase
  endfunction

  function automatic int next_of(int s);
    case (s)
      0: return data_read   ? 1 : 0;
      1: return 2;
      2: return 3;
      3: return enc_done    ? 4 : 3;
      4: return channel_rdy ? 5 : 4;
      5: return 6;
      6: return stop1       ? 7 : 6;
      7: return dec_done    ? 8 : 7;
      8: return 9;
      9: return stop2       ? 0 : 9;
      default: return 0;
    endcase
  endfunction

  initial begin
    int steps;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp_s = 0;
    for (int step = 0; step < 2000; step++) begin
      // random inputs, biased so that sequences complete
      @(negedge clk) begin
        data_read   = ($urandom_range(0, 3) == 0);
        enc_done    = ($urandom_range(0, 2) == 0);
        channel_rdy = ($urandom_range(0, 2) == 0);
        stop1       = ($urandom_range(0, 2) == 0);
        dec_done    = ($urandom_range(0, 2) == 0);
        stop2       = ($urandom_range(0, 2) == 0);
      end
      exp_s = next_of(exp_s);
      @(posedge clk) #1;
      check(int'(state) == exp_s, $sformatf("state %0d expected %0d", state, exp_s));
      check({read1, start, init1, init2, read2, enable_dec, load, enable} == outs_of(exp_s),
            $sformatf("outputs of state %0d", exp_s));
      visits[exp_s]++;
    end
    for (int s = 0; s < 10; s++) check(visits[s] > 0, $sformatf("state %0d visited", s));
    // asynchronous reset from the middle of a sequence
    steps = 0;
    while (int'(state) != 7 && steps < 200) begin
      @(negedge clk) begin
        data_read = 1; enc_done = 1; channel_rdy = 1; stop1 = 1; dec_done = 0; stop2 = 0;
      end
      steps++;
    end
    check(int'(state) == 7, "reached decoding");
    #2 rst = 1;
    #1 check(state == S_ACCEPT_MSG, "asynchronous reset to accept_msg");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
