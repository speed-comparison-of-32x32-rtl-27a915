// tb_vedic_combine -- self-checking testbench for the partial product
// combiner at its default size (H = 16, i.e. the 32x32 level).
//
// For random and corner operands A and B the four partial products
// A_H*B_H, A_H*B_L, A_L*B_H and A_L*B_L are computed here with the
// simulator's multiplication and applied to the combiner; its output must
// equal A*B.  Counts how often the middle adder's two carry bits were
// non-zero (the bits forwarded to the upper adder) and fails if never.
// A watchdog ends the run with a failure.
`timescale 1ns/1ps
module tb_vedic_combine;

  localparam int unsigned H = 16;

  logic [2*H-1:0] p_hh, p_hl, p_lh, p_ll;
  logic [4*H-1:0] q;

  int checks   = 0;
  int failures = 0;
  int mid_carries = 0;

  vedic_combine dut (.p_hh(p_hh), .p_hl(p_hl), .p_lh(p_lh), .p_ll(p_ll), .q(q));

  task automatic check(input logic [2*H-1:0] a, input logic [2*H-1:0] b);
    logic [4*H-1:0] expected;
    p_hh = (2*H)'(a[2*H-1:H]) * (2*H)'(b[2*H-1:H]);
    p_hl = (2*H)'(a[2*H-1:H]) * (2*H)'(b[H-1:0]);
    p_lh = (2*H)'(a[H-1:0])   * (2*H)'(b[2*H-1:H]);
    p_ll = (2*H)'(a[H-1:0])   * (2*H)'(b[H-1:0]);
    #1;
    expected = (4*H)'(a) * (4*H)'(b);
    checks++;
    if (dut.mid[2*H+1:2*H] != 2'b00) mid_carries++;
    if (q !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %h x %h: got %h expected %h", a, b, q, expected);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 32'hA0A0_A0A0);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h0000_FFFF, 32'hFFFF_0000);
    for (int n = 0; n < 50000; n++)
      check($urandom, $urandom);
    checks++;
    if (mid_carries == 0) begin
      failures++;
      $display("FAIL middle adder carry bits never set");
    end
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
