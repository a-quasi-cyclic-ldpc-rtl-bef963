// control_unit - Moore state machine that sequences one message through the system.
//
// Ten states, visited in this order:
//   accept_msg  - reset state; wait for data_read
//   read_msg    - read1: input memory presents the message to the encoder
//   start_enc   - start: launch the encoder
//   encoding    - wait for enc_done
//   channel     - the user may inject a bit error; wait for channel_rdy
//   init_mag    - init1: channel builds the LLR frame; init2: decoder clears
//   read_mag    - read2: frame is sent to the decoder; wait for stop1
//   decoding    - enable_dec: decoder iterates; wait for dec_done
//   load_piso   - load: decoded message into the PISO
//   enable_piso - enable: serial output; wait for stop2, then back to accept_msg
// States without a condition advance after one cycle. Every output depends on
// the state alone and is decoded combinationally from the state register.
//
// The states, their order, their outputs and their wait conditions follow the
// design description; which state drives init2 and enable_dec, the exit from
// read_msg after one cycle and the binary state code are this design's choices.
// The decoding state leaves on dec_done.
//
// Reset is asynchronous and active high and puts the machine in accept_msg.
module control_unit
  import qc_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      data_read,
  input  logic      enc_done,
  input  logic      channel_rdy,
  input  logic      stop1,
  input  logic      dec_done,
  input  logic      stop2,
  output logic      read1,
  output logic      start,
  output logic      init1,
  output logic      init2,
  output logic      read2,
  output logic      enable_dec,
  output logic      load,
  output logic      enable,
  output cu_state_t state
);

  cu_state_t nxt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_ACCEPT_MSG;
    else     state <= nxt;
  end

  always_comb begin
    nxt = state;
    unique case (state)
      S_ACCEPT_MSG:  if (data_read)   nxt = S_READ_MSG;
      S_READ_MSG:                     nxt = S_START_ENC;
      S_START_ENC:                    nxt = S_ENCODING;
      S_ENCODING:    if (enc_done)    nxt = S_CHANNEL;
      S_CHANNEL:     if (channel_rdy) nxt = S_INIT_MAG;
      S_INIT_MAG:                     nxt = S_READ_MAG;
      S_READ_MAG:    if (stop1)       nxt = S_DECODING;
      S_DECODING:    if (dec_done)    nxt = S_LOAD_PISO;
      S_LOAD_PISO:                    nxt = S_ENABLE_PISO;
      S_ENABLE_PISO: if (stop2)       nxt = S_ACCEPT_MSG;
      default:                        nxt = S_ACCEPT_MSG;
    endcase
  end

  always_comb begin
    read1      = (state == S_READ_MSG);
    start      = (state == S_START_ENC);
    init1      = (state == S_INIT_MAG);
    init2      = (state == S_INIT_MAG);
    read2      = (state == S_READ_MAG);
    enable_dec = (state == S_DECODING);
    load       = (state == S_LOAD_PISO);
    enable     = (state == S_ENABLE_PISO);
  end

  // one step at a time: no two step strobes together (init1 and init2 are one step)
  a_one_step: assert property (@(posedge clk) disable iff (rst)
    $onehot0({read1, start, init1, read2, enable_dec, load, enable}));

endmodule
