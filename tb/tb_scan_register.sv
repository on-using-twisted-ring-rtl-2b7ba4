// tb_scan_register - self-checking test of the n-bit scan register.
//
// A random serial stream with a random enable is fed in; the testbench keeps
// the register as an array of flip-flops F_1..F_n (F_1 takes the input, F_i
// takes F_{i-1}) and compares every bit, with F_1 at q[N-1], and the serial
// output F_n.
module tb_scan_register;

  localparam int N = 7;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, sin, so;
  logic [N-1:0] q;
  bit f [1:N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_register #(.N(N)) dut (.clk, .rst_n, .en, .sin, .q, .so);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; sin = 0;
    for (int i = 1; i <= N; i++) f[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      en  = ($urandom_range(0, 3) != 0);
      sin = 1'($urandom_range(0, 1));
      #1;
      for (int i = 1; i <= N; i++) begin
        checks++;
        if (q[N-i] != f[i]) begin
          failures++;
          $display("FAIL F_%0d = %b expected %b at %0t", i, q[N-i], f[i], $time);
        end
      end
      checks++;
      if (so != f[N]) begin
        failures++;
        $display("FAIL serial out");
      end
      @(posedge clk);
      if (en) begin
        for (int i = N; i > 1; i--) f[i] = f[i-1];
        f[1] = sin;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
