// uart_rx: 8N1 UART receiver for the target side of the communication link.
//
// The serial input is synchronised with two flip-flops. A falling edge on
// the idle-high line starts a frame; the start bit is checked again at its
// middle (a shorter glitch is ignored), then each data bit is sampled in the
// middle of its bit period, LSB first. The received byte is presented for one
// clock cycle on out_data with out_valid when the stop bit is sampled high.
// A frame whose stop bit is low (framing error, for example a line that is
// held low while the terminal is unplugged) is dropped and reported by a
// one-cycle frame_err pulse; the receiver then waits for the line to go
// high before it looks for the next start bit. out_valid comes 9.5 bit periods after the start
// edge plus two synchroniser cycles. Frame format and bit rate are this
// design's choice; only the use of a UART is given for the link.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] out_data,
  output logic       out_valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_STOP, R_BREAK} rstate_e;

  rstate_e       state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!sync[1]) begin
          state <= R_START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        R_START: if (cnt == '0) begin
          if (!sync[1]) begin
            state <= R_DATA;
            bitn  <= '0;
            cnt   <= CW'(CLKS_PER_BIT - 1);
          end else begin
            state <= R_IDLE;
          end
        end else cnt <= cnt - CW'(1);
        R_DATA: if (cnt == '0) begin
          shreg <= {sync[1], shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          bitn  <= bitn + 3'd1;
          if (bitn == 3'd7) state <= R_STOP;
        end else cnt <= cnt - CW'(1);
        R_STOP: if (cnt == '0) begin
          state <= R_IDLE;
          if (sync[1]) begin
            out_data  <= shreg;
            out_valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
            state     <= R_BREAK;
          end
        end else cnt <= cnt - CW'(1);
        R_BREAK: if (sync[1]) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
