// tb_seed_rom - self-checking test of the bit-serial seed ROM and its
// counter.
//
// A 15-bit ROM holding the pattern 101100111000101 is stepped with a random
// enable through two full passes; the address, the bit read and the
// last-address flag are compared with an index kept by the testbench.
module tb_seed_rom;

  localparam int DEPTH = 15;
  localparam logic [DEPTH-1:0] C = 15'b101100111000101;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, bit_out, last;
  logic [3:0] addr;
  int idx = 0, wraps = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seed_rom #(.DEPTH(DEPTH), .CONTENTS(C)) dut (.clk, .rst_n, .en, .addr, .bit_out, .last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at index %0d", what, idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (wraps < 2) begin
      en = ($urandom_range(0, 2) != 0);
      #1;
      check(addr == 4'(idx), "address");
      check(bit_out == C[idx], "data bit");
      check(last == (idx == DEPTH - 1), "last flag");
      @(posedge clk);
      if (en) begin
        if (idx == DEPTH - 1) begin
          idx = 0;
          wraps++;
        end else idx++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
