// input_mem - message register in front of the encoder.
//
// Holds one 324-bit message. When the control unit asserts read (read1) the
// stored message is copied to msg_out, where it waits at the encoder input until
// the encoder is started. A write port (wr, msg_in) replaces the stored message;
// the register resets to INIT_MSG.
//
// The register and its read strobe follow the design description. The write
// port and the reset contents are this design's own: INIT_MSG is the message of
// the board demonstration, whose full codeword is the 27-packet read-out listed
// in tb_ldpc_encoder. It is written first-bit-in-MSB, as the read-out prints it,
// and reversed so that vector bit i is message bit i+1.
//
// Timing: msg_out changes on the clock edge where read is high; a write and a
// read in the same cycle pass the old contents. Reset is asynchronous, active high.
module input_mem
  import qc_ldpc_pkg::*;
#(
  parameter logic [K-1:0] INIT_MSG_MSB_FIRST = {
    96'hd9da7b_ea1a31_d8abe2_a27b4e, 96'h855c5c_5c50ed_00c483_88ea9b,
    96'h0fb7c2_04c2c1_2d3997_157a6f, 24'hc8e4bb, 12'he43}
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [K-1:0] msg_in,
  input  logic         read,
  output logic [K-1:0] msg_out
);

  localparam logic [K-1:0] INIT_MSG = {<<{INIT_MSG_MSB_FIRST}};

  logic [K-1:0] mem;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mem     <= INIT_MSG;
      msg_out <= '0;
    end else begin
      if (wr)   mem     <= msg_in;
      if (read) msg_out <= mem;
    end
  end

endmodule
