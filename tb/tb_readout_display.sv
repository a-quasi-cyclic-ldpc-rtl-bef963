// tb_readout_display - self-checking testbench for readout_display.
//
// Shows the board read-out codeword and checks all 27 packets, then compares
// the digits for addresses 01000 and 10111 with the patterns "0F b7C2" and
// "64 6768" of the board photographs. Random codewords and messages check the
// packet order of both modes, the blank upper digits of 12-bit packets and
// the blanking of addresses 27..31. Segment patterns come from a table kept
// here as lit-segment strings, independent of the RTL's table.
module tb_readout_display;
  import qc_ldpc_pkg::*;
  import tb_ref_pkg::*;

  logic [N-1:0] codeword;
  logic [K-1:0] msg_dec;
  logic         show_dec;
  logic [4:0]   addr;
  logic [23:0]  packet;
  logic [6:0]   hex [6];
  int checks = 0, failures = 0;

  readout_display dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // lit segments of each digit, letters a..g
  localparam string LIT [16] = '{
    "abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
    "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"
  };

  function automatic logic [6:0] pattern(int d);
    logic [6:0] p;
    string s;
    p = '1;
    s = LIT[d];
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b0;
    return p;
  endfunction

  task automatic expect_digits(logic [23:0] v, int ndig, string what);
    bit ok;
    ok = 1;
    for (int d = 0; d < 6; d++)
      if (d < ndig) begin
        if (hex[d] != pattern(int'(v[4*d +: 4]))) ok = 0;
      end else if (hex[d] != 7'h7f) ok = 0;
    check(ok, what);
  endtask

  initial begin
    logic [N-1:0] cw;
    logic [K-1:0] m;
    codeword = table2_codeword();
    msg_dec = '0;
    show_dec = 0;
    for (int p = 0; p < 27; p++) begin
      addr = 5'(p);
      #1;
      check(packet == TABLE2[p], $sformatf("read-out packet %0d", p));
      expect_digits(TABLE2[p], 6, $sformatf("digits of packet %0d", p));
    end
    addr = 5'b01000; #1;
    check(hex[5] == pattern(0) && hex[4] == pattern(15) && hex[3] == pattern(11) &&
          hex[2] == pattern(7) && hex[1] == pattern(12) && hex[0] == pattern(2),
          "address 01000 shows 0F b7C2");
    addr = 5'b10111; #1;
    check(hex[5] == pattern(6) && hex[4] == pattern(4) && hex[3] == pattern(6) &&
          hex[2] == pattern(7) && hex[1] == pattern(6) && hex[0] == pattern(8),
          "address 10111 shows 64 6768");
    for (int n = 0; n < 20; n++) begin
      cw = {rand_msg(), rand_msg()};
      m = rand_msg();
      codeword = cw;
      msg_dec = m;
      addr = 5'($urandom_range(0, 26));
      show_dec = 0;
      #1;
      begin
        logic [23:0] e;
        for (int t = 0; t < 24; t++) e[23 - t] = cw[24*int'(addr) + t];
        check(packet == e, "codeword packet, first bit in the MSB");
        expect_digits(e, 6, "codeword digits");
      end
      show_dec = 1;
      #1;
      begin
        logic [23:0] e;
        e = '0;
        for (int t = 0; t < 12; t++) e[11 - t] = m[12*int'(addr) + t];
        check(packet == e, "message packet, first bit in the MSB");
        expect_digits(e, 3, "message digits, upper three blank");
      end
    end
    for (int a = 27; a < 32; a++) begin
      addr = 5'(a);
      show_dec = 1'(a);
      #1;
      expect_digits(24'h0, 0, $sformatf("address %0d blank", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
