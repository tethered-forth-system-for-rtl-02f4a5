// forth_target: the target part of a tethered Forth system, to be placed in
// an FPGA next to the logic it is meant to test, debug or control.
//
// The full Forth dictionary and all compiling words live in a host terminal
// (PC or smartphone). The target holds only compiled code and data in its
// RAM and executes it on a small 16-bit CPU. A monitor serves the host's
// requests over a UART: read a RAM word, write a RAM word, start execution
// of a word at an address, resume after a host call. Because the state lives
// entirely in the target's RAM, the terminal can be disconnected and
// reconnected at any time without disturbing a running word.
//
//   rxd -> uart_rx -> link_rx -> forth_monitor <-> forth_cpu
//   txd <- uart_tx <- link_tx <-/      |                |
//                                      +-- forth_ram <--+  (monitor has priority)
//
// Ports: clk and active-low asynchronous rst_n; rxd/txd, the UART lines
// (8N1, idle high); led, driven by the CPU's LEDIO instruction. The regs
// output shows the CPU registers and cpu_busy whether a word is running,
// for observation only; link_err pulses when a UART frame with a bad
// stop bit, or a partial or unexpected record, is discarded. Defaults: 50 MHz clock, 8192 x 16 RAM; the bit
// rate (115200), the memory layout and the link protocol are this design's
// choices.
module forth_target
  import forth_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned MEM_WORDS   = 8192,
  parameter int unsigned DSTACK_BASE = 4096,
  parameter int unsigned GAP_CYCLES  = 50_000,
  parameter int unsigned LED_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rxd,
  output logic             txd,
  output logic [LED_W-1:0] led,
  output cpu_regs_t        regs,
  output logic             cpu_busy,
  output logic             link_err
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;

  logic        rx_ferr;
  logic        rx_dropped;

  logic [7:0]  rx_byte;
  logic        rx_valid;
  logic [7:0]  tx_byte;
  logic        tx_valid, tx_ready;
  cmd_t        cmd;
  logic        cmd_valid, cmd_ready;
  msg_t        msg;
  logic        msg_valid, msg_ready;

  logic        start;
  addr_t       start_addr;
  logic        done_valid, done_ready;
  cpu_status_e done_status;
  logic        emit_valid, emit_ready;
  logic [7:0]  emit_char;
  logic        hcall_valid, hcall_ready, hcall_resume;
  word_t       hcall_id;

  mem_req_t    cpu_mem_req, ram_req;
  logic        cpu_mem_gnt;
  word_t       ram_rdata;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst_n, .rxd,
    .out_data(rx_byte), .out_valid(rx_valid), .frame_err(rx_ferr)
  );

  link_rx #(.GAP_CYCLES(GAP_CYCLES)) u_link_rx (
    .clk, .rst_n, .in_data(rx_byte), .in_valid(rx_valid),
    .cmd, .cmd_valid, .cmd_ready, .dropped(rx_dropped)
  );

  link_tx u_link_tx (
    .clk, .rst_n, .msg, .msg_valid, .msg_ready,
    .out_data(tx_byte), .out_valid(tx_valid), .out_ready(tx_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst_n, .in_data(tx_byte), .in_valid(tx_valid), .in_ready(tx_ready), .txd
  );

  forth_monitor u_monitor (
    .clk, .rst_n,
    .cmd, .cmd_valid, .cmd_ready,
    .msg, .msg_valid, .msg_ready,
    .start, .start_addr, .busy(cpu_busy),
    .done_valid, .done_status, .done_ready,
    .emit_valid, .emit_char, .emit_ready,
    .hcall_valid, .hcall_id, .hcall_ready, .hcall_resume,
    .cpu_mem_req, .cpu_mem_gnt, .ram_req, .ram_rdata
  );

  forth_cpu #(
    .DSTACK_BASE(addr_t'(DSTACK_BASE)),
    .RSTACK_TOP (17'(MEM_WORDS)),
    .LED_W      (LED_W)
  ) u_cpu (
    .clk, .rst_n,
    .start, .start_addr, .busy(cpu_busy),
    .done_valid, .done_status, .done_ready,
    .emit_valid, .emit_char, .emit_ready,
    .hcall_valid, .hcall_id, .hcall_ready, .hcall_resume,
    .mem_req(cpu_mem_req), .mem_gnt(cpu_mem_gnt), .mem_rdata(ram_rdata),
    .led, .regs
  );

  // one-cycle pulse: a received frame or record was discarded
  assign link_err = rx_ferr | rx_dropped;

  forth_ram #(.WORDS(MEM_WORDS)) u_ram (
    .clk, .req(ram_req), .rdata(ram_rdata)
  );

endmodule
