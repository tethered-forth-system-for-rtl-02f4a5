// tb_forth_ram: self-checking testbench for forth_ram at its full size.
// Random writes and reads are compared with an array in the testbench;
// read data must appear on the cycle after the request and stay unchanged
// through following writes and idle cycles.
module tb_forth_ram;
  import forth_pkg::*;
  localparam int unsigned WORDS = 8192;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mem_req_t req = '0;
  word_t    rdata;

  forth_ram dut (.clk, .req, .rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t model [WORDS];
  bit    known [WORDS];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t last;
    bit    have_last = 1'b0;
    // fill a region and the two ends
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b1, addr: (i < 32) ? 16'(i) : 16'(WORDS - 64 + i), wdata: 16'($urandom)};
      model[req.addr[12:0]] = req.wdata; known[req.addr[12:0]] = 1'b1;
    end
    for (int n = 0; n < 4000; n++) begin
      int a;
      @(negedge clk);
      if (have_last) check(rdata == last, "read data held");
      a = (n % 2 == 0) ? $urandom_range(31) : WORDS - 32 + $urandom_range(31);
      case ($urandom_range(2))
        0: begin
          req = '{req: 1'b1, we: 1'b1, addr: 16'(a), wdata: 16'($urandom)};
          model[a] = req.wdata; known[a] = 1'b1;
        end
        1: begin
          req = '{req: 1'b1, we: 1'b0, addr: 16'(a), wdata: 16'($urandom)};
          @(negedge clk);
          req.req = 1'b0;
          check(rdata == model[a], $sformatf("read %0d got %h expected %h", a, rdata, model[a]));
          last = rdata; have_last = 1'b1;
        end
        default: req.req = 1'b0;
      endcase
    end
    // address aliasing above WORDS
    @(negedge clk); req = '{req: 1'b1, we: 1'b0, addr: 16'(WORDS + 5), wdata: '0};
    @(negedge clk); req.req = 1'b0;
    check(rdata == model[5], "addresses alias modulo WORDS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
