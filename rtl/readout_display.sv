// readout_display - packet read-out of the codeword and decoded message on six
// seven-segment digits.
//
// The 648-bit codeword is cut into 27 packets of 24 bits and the 324-bit
// decoded message into 27 packets of 12 bits. A 5-bit address picks packet
// addr; show_dec chooses decoded message (1) or codeword (0). The packet is
// formed with its first transmitted bit in the most significant position, so
// packet p of the codeword reads bits 24p+1 .. 24p+24 left to right. A
// 24-bit packet fills all six digits (hex[5] leftmost); a 12-bit packet uses
// hex[2..0] and blanks the rest. Addresses 27..31 blank every digit and give
// packet 0.
//
// Packet sizes, count and the six-digit hexadecimal display follow the design
// description's board test; the digit placement of 12-bit packets, the
// blanking and the active-low a..g segment order are this design's choices.
// Purely combinational.
module readout_display
  import qc_ldpc_pkg::*;
#(
  parameter int PKT_CW  = 24,
  parameter int PKT_MSG = 12
) (
  input  logic [N-1:0]      codeword,
  input  logic [K-1:0]      msg_dec,
  input  logic              show_dec,
  input  logic [4:0]        addr,
  output logic [PKT_CW-1:0] packet,
  output logic [6:0]        hex [6]
);

  localparam int NPKT = N / PKT_CW;        // 27, equal to K / PKT_MSG

  logic in_range;
  assign in_range = int'(addr) < NPKT;

  always_comb begin
    packet = '0;
    if (in_range) begin
      if (show_dec)
        for (int t = 0; t < PKT_MSG; t++)
          packet[PKT_MSG-1-t] = msg_dec[int'(addr)*PKT_MSG + t];
      else
        for (int t = 0; t < PKT_CW; t++)
          packet[PKT_CW-1-t] = codeword[int'(addr)*PKT_CW + t];
    end
  end

  for (genvar d = 0; d < 6; d++) begin : g_digit
    hex7seg u_seg (
      .digit (packet[4*d +: 4]),
      .blank (!in_range || (show_dec && d >= PKT_MSG / 4)),
      .seg   (hex[d])
    );
  end

endmodule
