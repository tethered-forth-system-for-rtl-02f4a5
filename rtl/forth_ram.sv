// forth_ram: the internal block RAM of the target. It holds the reduced
// dictionary (compiled words and variables) at low addresses, the data stack
// growing upwards above it and the return stack growing downwards from the
// top of memory.
//
// Single port, synchronous: on a cycle with req high the word at addr is
// written when we is high, otherwise read; read data appears on rdata on the
// next cycle and is held until the next read. Only the low $clog2(WORDS)
// address bits are used, so addresses alias above WORDS. The contents are
// not cleared by reset, so the dictionary survives a reset of the logic.
// The default of 8192 words of 16 bits is the 8 RAMB16 blocks used by the
// reference build; the single-port organisation is this design's choice.
module forth_ram
  import forth_pkg::*;
#(
  parameter int unsigned WORDS = 8192
) (
  input  logic     clk,
  input  mem_req_t req,
  output word_t    rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (req.req) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      else        rdata <= mem[req.addr[AW-1:0]];
    end
  end

endmodule
