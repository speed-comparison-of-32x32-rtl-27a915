// tb_carry_save_adder -- self-checking testbench for the three-operand
// carry save adder.
//
// Instance u_small (W = 3) is driven with all 512 operand triples; instance
// u_wide (W = 32, the width used at the top of the multiplier) with corner
// and random triples.  Each result is compared with x + y + z computed by
// the simulator.  The count of results that needed both extra bits (above
// 2^(W+1)) must be non-zero.  A watchdog ends the run with a failure.
`timescale 1ns/1ps
module tb_carry_save_adder;

  logic [2:0]  xs, ys, zs;
  logic [4:0]  ss;
  logic [31:0] xw, yw, zw;
  logic [33:0] sw;

  int checks   = 0;
  int failures = 0;
  int top_bit  = 0;

  carry_save_adder #(.W(3))  u_small (.x(xs), .y(ys), .z(zs), .s(ss));
  carry_save_adder #(.W(32)) u_wide  (.x(xw), .y(yw), .z(zw), .s(sw));

  task automatic check_wide(input logic [31:0] x, input logic [31:0] y,
                            input logic [31:0] z);
    logic [33:0] expected;
    xw = x; yw = y; zw = z;
    #1;
    expected = 34'(x) + 34'(y) + 34'(z);
    checks++;
    if (sw[33]) top_bit++;
    if (sw !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %h+%h+%h: got %h expected %h", x, y, z, sw, expected);
    end
  endtask

  initial begin
    xw = '0; yw = '0; zw = '0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) begin
          xs = 3'(i); ys = 3'(j); zs = 3'(k);
          #1;
          checks++;
          if (ss !== 5'(i + j + k)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d", i, j, k, ss);
          end
        end
    check_wide('1, '1, '1);
    check_wide('1, '1, '0);
    check_wide('1, 32'd1, '0);
    check_wide(32'hAAAA_AAAA, 32'h5555_5555, 32'd1);
    for (int n = 0; n < 20000; n++)
      check_wide($urandom, $urandom, $urandom);
    checks++;
    if (top_bit == 0) begin
      failures++;
      $display("FAIL top result bit never set");
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
