// tb_response_monitor - self-checking test of the MISR response monitor.
//
// Random response vectors are captured with a random enable into an 8-bit
// MISR with polynomial x^8 + x^4 + x^3 + x^2 + 1 and into the default 2-bit
// one. The reference treats the signature as a polynomial over GF(2): each
// capture computes S(x) * x + D(x) and reduces it modulo P(x) by
// subtracting P(x) when the x^R term is present.
module tb_response_monitor;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [7:0] resp8, sig8;
  logic [1:0] resp2, sig2;
  int unsigned ref8, ref2;
  int checks = 0, failures = 0;

  localparam int unsigned P8 = 'h11D;  // x^8+x^4+x^3+x^2+1
  localparam int unsigned P2 = 'h7;    // x^2+x+1

  always #5 clk = ~clk;

  response_monitor #(.R(8), .POLY(8'h1D)) dut8 (.clk, .rst_n, .en, .resp(resp8), .sig(sig8));
  response_monitor dut2 (.clk, .rst_n, .en, .resp(resp2), .sig(sig2));

  function automatic int unsigned misr_step(int unsigned s, int unsigned d, int unsigned p, int r);
    int unsigned t = (s * 2) ^ d;
    if (t >= (1 << r)) t = t ^ p;
    return t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; resp8 = 0; resp2 = 0; ref8 = 0; ref2 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      en    = ($urandom_range(0, 4) != 0);
      resp8 = 8'($urandom);
      resp2 = 2'($urandom);
      @(posedge clk);
      if (en) begin
        ref8 = misr_step(ref8, 32'(resp8), P8, 8);
        ref2 = misr_step(ref2, 32'(resp2), P2, 2);
      end
      #1;
      checks += 2;
      if (sig8 != 8'(ref8)) begin failures++; $display("FAIL sig8 %h expected %h", sig8, ref8); end
      if (sig2 != 2'(ref2)) begin failures++; $display("FAIL sig2 %h expected %h", sig2, ref2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
