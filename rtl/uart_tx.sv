// uart_tx: 8N1 UART transmitter for the target side of the communication link.
//
// A byte is accepted when in_valid and in_ready are both high; it is then
// shifted out LSB first as one start bit (0), eight data bits and one stop
// bit (1), each CLKS_PER_BIT clock cycles long. in_ready is high only while
// the transmitter is idle, so one frame takes exactly 10*CLKS_PER_BIT cycles
// and a new byte can be accepted on the cycle after the stop bit ends.
// The line idles high. The frame format and bit rate are this design's
// choice; only the use of a UART is given for the link.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;     // stop, data[7:0], start
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign in_ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 4'd0) begin
      txd <= 1'b1;
      if (in_valid) begin
        shreg     <= {1'b1, in_data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= CW'(CLKS_PER_BIT - 1);
        txd       <= 1'b0;
      end
    end else begin
      txd <= shreg[0];
      if (cnt == '0) begin
        cnt       <= CW'(CLKS_PER_BIT - 1);
        bits_left <= bits_left - 4'd1;
        shreg     <= {1'b1, shreg[9:1]};
        txd       <= shreg[1];
        if (bits_left == 4'd1) txd <= 1'b1;
      end else begin
        cnt <= cnt - CW'(1);
      end
    end
  end

endmodule
