// tb_test_control_fsm - self-checking test of the Load/Twist1/Twist2/Shift
// FSM.
//
// TE, SE and the step enable are driven at random. A transition table
// written out in the testbench (Load -TE-> Twist1 -TE-> Twist2 -TE-> Shift,
// Shift -SE-> Load, Shift -!SE-> Twist1, no move without step) predicts the
// state code and SCE every cycle; the two-bit codes are checked against the
// literal values 00, 01, 10, 11. Every transition must be seen at least once.
module tb_test_control_fsm;
  import trc_bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step, te, se, sce;
  tc_state_e state;
  int checks = 0, failures = 0;
  logic [1:0] model;
  int seen [8];

  always #5 clk = ~clk;

  test_control_fsm dut (.clk, .rst_n, .step, .te, .se, .state, .sce);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (state %b model %b)", what, $time, state, model);
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
    step = 0; te = 0; se = 0;
    model = 2'b00;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      step = ($urandom_range(0, 4) != 0);
      te   = ($urandom_range(0, 2) == 0);
      se   = ($urandom_range(0, 1) == 0);
      #1;
      check(2'(state) == model, "state code");
      check(sce == (model == 2'b11), "SCE");
      @(posedge clk);
      if (step) begin
        case (model)
          2'b00: if (te) begin model = 2'b01; seen[0]++; end
          2'b01: if (te) begin model = 2'b10; seen[1]++; end
          2'b10: if (te) begin model = 2'b11; seen[2]++; end
          2'b11: if (se) begin model = 2'b00; seen[3]++; end
                 else    begin model = 2'b01; seen[4]++; end
        endcase
      end else begin
        seen[5]++;
      end
      #1;
    end
    for (int t = 0; t < 6; t++) check(seen[t] > 0, $sformatf("transition %0d exercised", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
