// link_rx: receiver half of the communication link. It collects the bytes
// delivered by uart_rx into command records and passes each complete record
// to the monitor as one decoded command.
//
// A record is a command code byte followed by its payload, most significant
// byte first: READ and EXEC carry a 16-bit address, WRITE an address and a
// 16-bit data word, RESUME nothing. A first byte that is not a command code
// is dropped. If the gap between two bytes of a record exceeds GAP_CYCLES
// clock cycles, the partial record is discarded, so that a terminal that
// is unplugged in the middle of a record and plugged in again starts from a
// clean record boundary. The decoded command is held on cmd with cmd_valid
// until cmd_ready; bytes that arrive while a command is still held are
// dropped. cmd_valid rises on the cycle after the last byte of the record.
// The record layout and the gap timeout are this design's choices.
module link_rx
  import forth_pkg::*;
#(
  parameter int unsigned GAP_CYCLES = 50_000   // 1 ms at 50 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output cmd_t       cmd,
  output logic       cmd_valid,
  input  logic       cmd_ready,
  output logic       dropped     // one-cycle pulse: byte or partial record lost
);

  localparam int unsigned GW = $clog2(GAP_CYCLES + 1);

  logic [2:0]  need;       // payload bytes still expected
  logic        in_rec;     // a record has been started
  cmd_code_e   code;
  logic [23:0] payload;
  logic [GW-1:0] gap;

  function automatic logic [2:0] payload_len(input logic [7:0] c);
    case (c)
      CMD_READ, CMD_EXEC: return 3'd2;
      CMD_WRITE:          return 3'd4;
      CMD_RESUME:         return 3'd0;
      default:            return 3'd7;   // not a command code
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      need      <= '0;
      in_rec    <= 1'b0;
      code      <= CMD_READ;
      payload   <= '0;
      gap       <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;

      if (in_rec && !in_valid) begin
        if (gap == GW'(GAP_CYCLES)) begin
          in_rec  <= 1'b0;
          dropped <= 1'b1;
        end else begin
          gap <= gap + GW'(1);
        end
      end

      if (in_valid) begin
        gap <= '0;
        if (cmd_valid && !cmd_ready) begin
          dropped <= 1'b1;
        end else if (!in_rec) begin
          if (payload_len(in_data) == 3'd7) begin
            dropped <= 1'b1;
          end else if (payload_len(in_data) == 3'd0) begin
            cmd       <= '{code: cmd_code_e'(in_data), addr: '0, data: '0};
            cmd_valid <= 1'b1;
          end else begin
            code   <= cmd_code_e'(in_data);
            need   <= payload_len(in_data);
            in_rec <= 1'b1;
          end
        end else begin
          payload <= {payload[15:0], in_data};
          need    <= need - 3'd1;
          if (need == 3'd1) begin
            in_rec    <= 1'b0;
            cmd_valid <= 1'b1;
            if (code == CMD_WRITE)
              cmd <= '{code: code, addr: payload[23:8], data: {payload[7:0], in_data}};
            else
              cmd <= '{code: code, addr: {payload[7:0], in_data}, data: '0};
          end
        end
      end
    end
  end

  // a decoded command is held unchanged until the monitor takes it
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
