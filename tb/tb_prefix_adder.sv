// tb_prefix_adder: self-checking test of the 64-bit prefix adder.
//
// Compares {cout, sum} with a + b + cin for corner cases (all ones, long
// carry chains) and random operands.
`timescale 1ns/1ps
module tb_prefix_adder;

  int unsigned checks = 0, failures = 0;

  logic [63:0] a, b, sum;
  logic        cin, cout;

  prefix_adder #(.W(64)) dut (.*);

  task automatic try(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] e;
    a = x; b = y; cin = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + 65'(c);
    checks++;
    if ({cout, sum} != e) begin
      failures++;
      if (failures < 20) $display("FAIL: %h + %h + %0d = %h, expected %h", x, y, c, {cout, sum}, e);
    end
  endtask

  initial begin
    fork
      begin
        try('1, '0, 1'b1);
        try('1, 64'd1, 1'b0);
        try('1, '1, 1'b1);
        try(64'h7fff_ffff_ffff_ffff, 64'd1, 1'b0);
        for (int i = 0; i < 64; i++) try(64'd1 << i, '1 >> (63 - i), 1'b0);
        for (int i = 0; i < 5000; i++) try({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end

endmodule
