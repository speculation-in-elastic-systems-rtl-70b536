// tb_secded_decoder: self-checking test of the (72,64) SECDED decoder.
//
// Random data words are encoded by a reference encoder kept in the
// testbench. Each codeword is checked clean, with every single bit flipped
// (must be corrected and flagged sec), and with random pairs of flipped bits
// (must be flagged ded, never sec).
`timescale 1ns/1ps
module tb_secded_decoder;
  import spec_pkg::*;

  `include "tb/tb_secded_model.svh"

  int unsigned checks = 0, failures = 0;

  logic [71:0] code;
  logic [63:0] data_raw, data_fixed;
  logic        sec, ded, err;

  secded_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    fork
      begin
        for (int t = 0; t < 60; t++) begin
          logic [63:0] d;
          logic [71:0] cw;
          d  = (t == 0) ? '0 : (t == 1) ? '1 : {$urandom, $urandom};
          cw = ref_secded_encode(d);
          code = cw;
          #1;
          check(!sec && !ded && !err && data_fixed == d && data_raw == d, "clean word flagged or changed");
          for (int b = 0; b < 72; b++) begin
            code = cw ^ (72'd1 << b);
            #1;
            check(sec && !ded && err && data_fixed == d, $sformatf("single error at bit %0d not corrected", b));
          end
          for (int k = 0; k < 20; k++) begin
            int unsigned b1, b2;
            b1 = $urandom_range(0, 71);
            b2 = (b1 + $urandom_range(1, 71)) % 72;
            code = cw ^ (72'd1 << b1) ^ (72'd1 << b2);
            #1;
            check(!sec && ded && err, $sformatf("double error at bits %0d,%0d not detected", b1, b2));
            check(data_raw == ref_secded_data(code), "raw data bits wrong");
          end
        end
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
