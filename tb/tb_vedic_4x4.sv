// tb_vedic_4x4 -- self-checking testbench for the 4x4 Vedic multiplier.
//
// Drives operand pairs into the purely combinational multiplier, waits one
// time step and compares q with the product computed here by the
// simulator's own 8-bit multiplication.  Every operand pair is tried.
// It also counts how often the middle carry save adder of the top level
// produced carry bits above its 4-bit operand width (the bits that the
// combiner forwards to the upper adder), and fails if that never happened.
// A watchdog ends the run with a failure if it takes too long.
`timescale 1ns/1ps
module tb_vedic_4x4;

  localparam int unsigned N     = 4;
  localparam int unsigned NC    = 8;
  localparam int unsigned NRAND = 100000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;

  int checks   = 0;
  int failures = 0;
  int mid_carries = 0;   // vectors whose middle adder result exceeded N bits

  vedic_4x4 dut (.a(a), .b(b), .q(q));

  function automatic logic [N-1:0] corner(int i);
    case (i)
      0: return '0;
      1: return N'(1);
      2: return '1;
      3: return {(N/2){2'b10}};
      4: return {(N/2){2'b01}};
      5: return {1'b1, {(N-1){1'b0}}};
      6: return {1'b0, {(N-1){1'b1}}};
      default: return N'(3);
    endcase
  endfunction

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*N)'(x) * (2*N)'(y);
    checks++;
    if (dut.u_combine.mid[N+1:N] != 2'b00) mid_carries++;
    if (q !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0d x %0d: got %h expected %h", x, y, q, expected);
    end
  endtask

  initial begin
    // exhaustive: every operand pair
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        check(N'(i), N'(j));
    checks++;
    if (mid_carries == 0) begin
      failures++;
      $display("FAIL middle adder never carried beyond N bits");
    end
    $display("middle adder carries forwarded: %0d", mid_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
