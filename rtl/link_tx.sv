// link_tx: transmitter half of the communication link. It turns one message
// of the target (a response to a host command, a character from EMIT, a host
// call from EXEC_PC, or the end of a started word) into a record of bytes
// for uart_tx.
//
// A message is taken when msg_valid and msg_ready are both high. Its code
// byte is sent first, then nbytes (0 to 2) payload bytes: with one byte the
// low byte of arg, with two the high byte first. msg_ready is high only
// between records. Bytes are handed to the UART with a valid/ready
// handshake, one per UART frame. The record layout is this design's choice.
module link_tx
  import forth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  msg_t       msg,
  input  logic       msg_valid,
  output logic       msg_ready,
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready
);

  logic [7:0] bytes [3];
  logic [1:0] left;     // bytes of the current record not yet accepted
  logic [1:0] idx;

  assign msg_ready = (left == 2'd0);
  assign out_valid = (left != 2'd0);
  assign out_data  = bytes[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left  <= '0;
      idx   <= '0;
      bytes <= '{default: '0};
    end else if (left == 2'd0) begin
      if (msg_valid) begin
        bytes[0] <= msg.code;
        bytes[1] <= (msg.nbytes == 2'd2) ? msg.arg[15:8] : msg.arg[7:0];
        bytes[2] <= msg.arg[7:0];
        left     <= (msg.nbytes > 2'd2) ? 2'd3 : msg.nbytes + 2'd1;
        idx      <= '0;
      end
    end else if (out_ready) begin
      left <= left - 2'd1;
      idx  <= idx + 2'd1;
    end
  end

endmodule
