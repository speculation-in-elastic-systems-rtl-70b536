// tb_spec_loop: self-checking test of the speculative loop.
//
// Every value on the loop's output is compared with the recurrence
// x' = F(G(x) ? x + OFFSET : x). While the output is never stopped, the cycle
// of each multiplexor firing is compared with a model of the round-robin
// scheduler: 1 cycle for a right guess, 2 for a wrong one. Later the output
// is stopped at random. Right guesses, wrong guesses and stalls must occur.
`timescale 1ns/1ps
module tb_spec_loop;
  import spec_pkg::*;


  localparam int unsigned N_LOOP   = 300;   // loop iterations checked
  localparam int unsigned WATCHDOG = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic        loop_out_vp, loop_out_sp, loop_stat_fire, loop_stat_mispredict;
  logic [15:0] loop_out_data;

  spec_loop dut (
    .clk, .rst_n, .out_vp(loop_out_vp), .out_sp(loop_out_sp), .out_data(loop_out_data),
    .stat_fire(loop_stat_fire), .stat_mispredict(loop_stat_mispredict)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------------------------------------------------------- loop
  logic [15:0] loop_x = 16'd1;           // next expected output value
  logic [15:0] fire_x = 16'd1;           // value the next firing starts from
  bit          pref = 1'b0;              // model of the round-robin pointer
  int unsigned loop_next_fire = 0;       // expected cycle of the next firing
  int unsigned loop_outs = 0, loop_fires = 0;
  bit          loop_timed = 1'b1;        // no output stall seen yet
  int unsigned n_loop_right = 0, n_loop_wrong = 0, n_loop_stall = 0;

  function automatic logic [15:0] loop_next(input logic [15:0] x);
    logic g;
    g = ^(x & 16'h0a14);
    return (g ? x + 16'h0130 : x) + 16'd4;
  endfunction

  initial begin
    loop_out_sp = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;

      // ---------------- loop
      if (loop_stat_fire) begin
        logic g;
        g = ^(fire_x & 16'h0a14);
        if (loop_timed && loop_fires < N_LOOP) begin
          int unsigned cost;
          cost = (pref == g) ? 1 : 2;
          check(cycle == loop_next_fire + cost - 1, $sformatf("loop firing %0d at cycle %0d, expected %0d", loop_fires, cycle, loop_next_fire + cost - 1));
        end
        if (pref == g) n_loop_right++; else n_loop_wrong++;
        pref           = !g;
        loop_next_fire = cycle + 1;
        fire_x         = loop_next(fire_x);
        loop_fires++;
      end
      if (loop_out_vp && !loop_out_sp) begin
        check(loop_out_data == loop_x, $sformatf("loop value %h expected %h", loop_out_data, loop_x));
        loop_x = loop_next(loop_x);
        loop_outs++;
      end
      if (loop_out_vp && loop_out_sp) n_loop_stall++;
      if (loop_fires >= N_LOOP) begin
        loop_timed = 1'b0;
        loop_out_sp <= ($urandom_range(0, 3) == 0);
      end

      if (loop_outs >= 2 * N_LOOP) finish_test();
    end
  end

  task automatic finish_test();
    check(n_loop_right > 0, "loop: no right guess seen");
    check(n_loop_wrong > 0, "loop: no wrong guess seen");
    check(n_loop_stall > 0, "loop: output never stalled");
    $display("loop: %0d right, %0d wrong guesses, %0d stalls", n_loop_right, n_loop_wrong, n_loop_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
