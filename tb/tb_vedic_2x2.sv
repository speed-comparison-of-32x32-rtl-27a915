// tb_vedic_2x2 -- self-checking testbench for the 2x2 Vedic multiplier cell.
//
// Applies all sixteen operand pairs, waits one time step for the
// combinational output and compares q with a*b computed by the simulator.
// It also counts the pairs where the crosswise column carried (a1b0 and
// a0b1 both 1) and fails if that case was never exercised.  A watchdog ends
// the run with a failure if it takes too long.
`timescale 1ns/1ps
module tb_vedic_2x2;

  logic [1:0] a, b;
  logic [3:0] q;

  int checks   = 0;
  int failures = 0;
  int cross_carries = 0;

  vedic_2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (a[1] & b[0] & a[0] & b[1]) cross_carries++;
        if (q !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, q);
        end
      end
    end
    checks++;
    if (cross_carries == 0) begin
      failures++;
      $display("FAIL crosswise carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
