// piso - parallel-in serial-out register for the decoded message.
//
// load copies the 324 decoded bits into a shift register and clears stop.
// While enable is high, one bit per cycle is presented on serial_out, message
// bit 1 first and bit 324 last, with serial_valid marking each sent bit; stop
// (stop2) rises together with the last bit and stays high until the next load,
// so no bit is sent twice.
//
// The load/enable/stop behaviour and the bit order 1, 2, ..., 324 follow the
// design description; serial_valid is this design's addition.
//
// Timing: the first bit appears on the edge after enable is first seen; 324
// enabled cycles send the whole message. Reset is asynchronous, active high.
module piso
  import qc_ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         enable,
  input  logic [K-1:0] parallel_in,
  output logic         serial_out,
  output logic         serial_valid,
  output logic         stop
);

  // a load and a shift are never requested together
  a_load_or_shift: assert property (@(posedge clk) disable iff (rst) !(load && enable));

  logic [K-1:0] sreg;
  logic [8:0]   count;           // bits sent so far

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sreg         <= '0;
      count        <= '0;
      serial_out   <= 1'b0;
      serial_valid <= 1'b0;
      stop         <= 1'b0;
    end else begin
      serial_valid <= 1'b0;
      if (load) begin
        sreg  <= parallel_in;
        count <= '0;
        stop  <= 1'b0;
      end else if (enable && !stop) begin
        serial_out   <= sreg[0];
        serial_valid <= 1'b1;
        sreg         <= sreg >> 1;
        count        <= count + 9'd1;
        if (int'(count) == K - 1) stop <= 1'b1;
      end
    end
  end

endmodule
