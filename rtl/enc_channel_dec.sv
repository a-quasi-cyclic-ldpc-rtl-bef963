// enc_channel_dec - complete encoder-channel-decoder system for the IEEE 802.11n
// rate-1/2, 648-bit QC-LDPC code.
//
// Data path: input_mem (324-bit message) -> ldpc_encoder (648-bit codeword)
// -> channel (optional single bit error, 4-bit-magnitude LLR frame, sent to the
// decoder 27 values per cycle) -> ldpc_decoder (min-sum, up to MAX_ITER
// iterations) -> piso (decoded message out serially, bit 1 first).
// control_unit sequences one message through these steps: data_read starts a
// run, channel_rdy releases the channel step, and the run ends when the last
// decoded bit has been sent (stop2). readout_display shows any 24-bit packet of
// the codeword, or 12-bit packet of the decoded message, on six seven-segment
// digits, as on the board used to test the design.
//
// The blocks and their connections follow the design description; the message
// write port, the parity_ok and decoded_valid status outputs and the display
// select are this design's additions.
//
// Timing for one run without waits: 1 (accept) + 1 (read) + 1 (start) + 3
// (encode) + 1 (channel, if channel_rdy is already high) + 1 (init) + 25
// (frame transfer) + iterations + 2 (decode) + 1 (load) + 325 (serial)
// cycles, about 360 cycles for an error-free frame. Reset is asynchronous,
// active high.
module enc_channel_dec
  import qc_ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         msg_wr,
  input  logic [K-1:0] msg_in,
  input  logic         data_read,
  input  logic         channel_rdy,
  input  logic         flip,
  input  logic [4:0]   flip_number,
  input  logic         show_dec,
  input  logic [4:0]   disp_addr,
  output logic         enc_done,
  output logic         dec_done,
  output logic         parity_ok,
  output logic [7:0]   iter_count,
  output logic         decoded,
  output logic         decoded_valid,
  output logic         stop2,
  output cu_state_t    state,
  output logic [23:0]  packet,
  output logic [6:0]   hex [6]
);

  logic         read1, start, init1, init2, read2, enable_dec, load, enable;
  logic         stop1;
  logic [K-1:0] msg_out;
  logic [N-1:0] codeword;
  logic         lam_valid;
  logic [4:0]   lam_blk;
  llr_t         lam_data [Z];
  logic [K-1:0] msg_dec;

  control_unit u_ctrl (
    .clk, .rst, .data_read, .enc_done, .channel_rdy, .stop1, .dec_done, .stop2,
    .read1, .start, .init1, .init2, .read2, .enable_dec, .load, .enable, .state
  );

  input_mem u_mem (
    .clk, .rst, .wr(msg_wr), .msg_in, .read(read1), .msg_out
  );

  ldpc_encoder u_enc (
    .clk, .rst, .start, .msg(msg_out), .codeword, .enc_done
  );

  channel u_chan (
    .clk, .rst, .codeword, .flip, .flip_number, .init(init1), .read(read2),
    .lam_valid, .lam_blk, .lam_data, .stop(stop1)
  );

  ldpc_decoder u_dec (
    .clk, .rst, .init(init2), .lam_valid, .lam_blk, .lam_data, .enable(enable_dec),
    .msg_dec, .done(dec_done), .parity_ok, .iter_count
  );

  piso u_piso (
    .clk, .rst, .load, .enable, .parallel_in(msg_dec),
    .serial_out(decoded), .serial_valid(decoded_valid), .stop(stop2)
  );

  readout_display u_disp (
    .codeword, .msg_dec, .show_dec, .addr(disp_addr), .packet, .hex
  );

endmodule
