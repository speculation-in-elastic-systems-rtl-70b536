// tb_spec_elastic_top: end-to-end test of the three speculative designs.
//
// Speculative loop: every value on its output is compared with the
// recurrence x' = F(G(x) ? x + OFFSET : x); while the output is never stopped
// the cycle of every multiplexor firing is compared with a model of the
// round-robin scheduler (1 cycle per right guess, 2 per wrong guess).
// ALU and adder: a first phase sends back-to-back operations with no
// back-pressure and checks that the last result appears exactly
// (operations - 1) + (wrong guesses) + latency cycles after the first input;
// a second phase adds random input gaps and output stalls. Every result is
// compared with a reference computed here (including SECDED with 0, 1 or 2
// flipped bits per operand). Each mechanism (right and wrong guesses,
// replays, double errors, stalls) must occur at least once.
`timescale 1ns/1ps
module tb_spec_elastic_top;
  import spec_pkg::*;

  `include "tb/tb_secded_model.svh"

  localparam int unsigned N_LOOP   = 300;   // loop iterations checked
  localparam int unsigned N_FAST   = 200;   // ops in the back-to-back phase
  localparam int unsigned N_OPS    = 800;   // ops in total per datapath
  localparam int unsigned LATENCY  = 2;     // input transfer to output valid
  localparam int unsigned WATCHDOG = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  // DUT ports
  logic        loop_out_vp, loop_out_sp, loop_stat_fire, loop_stat_mispredict;
  logic [15:0] loop_out_data;
  logic        alu_in_vp, alu_in_sp, alu_out_vp, alu_out_sp, alu_out_zero, alu_out_neg;
  logic        alu_stat_replay, alu_stat_fast;
  alu_op_e     alu_in_op;
  logic [7:0]  alu_in_a, alu_in_b, alu_out_result;
  logic        add_in_vp, add_in_sp, add_out_vp, add_out_sp, add_out_cout, add_out_ded;
  logic        add_stat_replay, add_stat_fast;
  logic [71:0] add_in_a_code, add_in_b_code;
  logic [63:0] add_out_sum;

  spec_elastic_top dut (.*);

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

  // --------------------------------------------------------------- ALU
  typedef struct packed { logic [7:0] r; logic z; logic n; } alu_exp_t;
  alu_exp_t    alu_q[$];
  int unsigned alu_sent = 0, alu_got = 0, alu_errs_fast = 0;
  int unsigned alu_t_first = 0, alu_t_last = 0;
  int unsigned n_alu_replay = 0, n_alu_fast = 0, n_alu_stall = 0;

  // ------------------------------------------------------------- adder
  typedef struct packed { logic [63:0] s; logic c; logic ded; } add_exp_t;
  add_exp_t    add_q[$];
  int unsigned add_sent = 0, add_got = 0, add_errs_fast = 0;
  int unsigned add_t_first = 0, add_t_last = 0;
  int unsigned n_add_replay = 0, n_add_fast = 0, n_add_ded = 0, n_add_stall = 0;

  task automatic new_alu_op(input bit first_phase);
    logic [7:0] a, b, r, bb;
    alu_op_e    op;
    logic [4:0] lo;
    a  = 8'($urandom);
    b  = 8'($urandom);
    op = alu_op_e'($urandom_range(0, 4));
    bb = (op == ALU_SUB) ? ~b : b;
    unique case (op)
      ALU_ADD: r = a + b;
      ALU_SUB: r = a - b;
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      default: r = a ^ b;
    endcase
    lo = {1'b0, a[3:0]} + {1'b0, bb[3:0]} + 5'(op == ALU_SUB);
    if (first_phase && (op == ALU_ADD || op == ALU_SUB) && lo[4]) alu_errs_fast++;
    alu_in_a  <= a;
    alu_in_b  <= b;
    alu_in_op <= op;
    alu_q.push_back('{r: r, z: (r == 8'd0), n: r[7]});
  endtask

  task automatic new_add_op(input bit first_phase);
    logic [63:0] a, b, ea, eb, s;
    logic [71:0] ca, cb;
    int unsigned na, nb;
    logic        c, ded;
    a  = {$urandom, $urandom};
    b  = {$urandom, $urandom};
    ca = ref_secded_encode(a);
    cb = ref_secded_encode(b);
    // 0 errors mostly, sometimes 1, rarely 2 per operand
    na = ($urandom_range(0, 9) < 7) ? 0 : (($urandom_range(0, 3) == 0) ? 2 : 1);
    nb = ($urandom_range(0, 9) < 8) ? 0 : (($urandom_range(0, 3) == 0) ? 2 : 1);
    for (int unsigned i = 0; i < na; i++) ca[(i * 37 + $urandom_range(0, 35)) % 72] ^= 1'b1;
    for (int unsigned i = 0; i < nb; i++) cb[(i * 37 + $urandom_range(0, 35)) % 72] ^= 1'b1;
    ea  = (na == 2) ? ref_secded_data(ca) : a;
    eb  = (nb == 2) ? ref_secded_data(cb) : b;
    ded = (na == 2) || (nb == 2);
    {c, s} = {1'b0, ea} + {1'b0, eb};
    if (first_phase && (na != 0 || nb != 0)) add_errs_fast++;
    add_in_a_code <= ca;
    add_in_b_code <= cb;
    add_q.push_back('{s: s, c: c, ded: ded});
  endtask

  initial begin
    loop_out_sp = 1'b0;
    alu_in_vp = 1'b0; alu_out_sp = 1'b0; alu_in_op = ALU_ADD; alu_in_a = '0; alu_in_b = '0;
    add_in_vp = 1'b0; add_out_sp = 1'b0; add_in_a_code = '0; add_in_b_code = '0;
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

      // ---------------- ALU
      if (alu_stat_replay) n_alu_replay++;
      if (alu_stat_fast)   n_alu_fast++;
      if (alu_in_vp && !alu_in_sp) begin
        if (alu_sent == 0) alu_t_first = cycle;
        alu_sent++;
      end
      if (alu_out_vp && alu_out_sp) n_alu_stall++;
      if (alu_out_vp && !alu_out_sp) begin
        alu_exp_t e;
        if (alu_q.size() == 0) check(1'b0, "ALU result with no operation pending");
        else begin
          e = alu_q.pop_front();
          check({alu_out_result, alu_out_zero, alu_out_neg} == e,
                $sformatf("ALU result %h z%0b n%0b expected %h z%0b n%0b", alu_out_result, alu_out_zero, alu_out_neg, e.r, e.z, e.n));
        end
        alu_got++;
        if (alu_got == N_FAST) begin
          alu_t_last = cycle;
          check(alu_t_last - alu_t_first == N_FAST - 1 + alu_errs_fast + LATENCY,
                $sformatf("ALU: %0d ops took %0d cycles, expected %0d (%0d wrong guesses)", N_FAST, alu_t_last - alu_t_first, N_FAST - 1 + alu_errs_fast + LATENCY, alu_errs_fast));
        end
      end
      if (!(alu_in_vp && alu_in_sp)) begin
        if (alu_sent < N_FAST) begin
          alu_in_vp <= 1'b1;
          new_alu_op(1'b1);
        end else if (alu_sent < N_OPS && alu_got >= N_FAST && $urandom_range(0, 2) != 0) begin
          alu_in_vp <= 1'b1;
          new_alu_op(1'b0);
        end else alu_in_vp <= 1'b0;
      end
      alu_out_sp <= (alu_got >= N_FAST) && ($urandom_range(0, 3) == 0);

      // ---------------- adder
      if (add_stat_replay) n_add_replay++;
      if (add_stat_fast)   n_add_fast++;
      if (add_in_vp && !add_in_sp) begin
        if (add_sent == 0) add_t_first = cycle;
        add_sent++;
      end
      if (add_out_vp && add_out_sp) n_add_stall++;
      if (add_out_vp && !add_out_sp) begin
        add_exp_t e;
        if (add_q.size() == 0) check(1'b0, "adder result with no operation pending");
        else begin
          e = add_q.pop_front();
          if (e.ded) n_add_ded++;
          check({add_out_sum, add_out_cout, add_out_ded} == e,
                $sformatf("adder result %h c%0b d%0b expected %h c%0b d%0b", add_out_sum, add_out_cout, add_out_ded, e.s, e.c, e.ded));
        end
        add_got++;
        if (add_got == N_FAST) begin
          add_t_last = cycle;
          check(add_t_last - add_t_first == N_FAST - 1 + add_errs_fast + LATENCY,
                $sformatf("adder: %0d ops took %0d cycles, expected %0d (%0d wrong guesses)", N_FAST, add_t_last - add_t_first, N_FAST - 1 + add_errs_fast + LATENCY, add_errs_fast));
        end
      end
      if (!(add_in_vp && add_in_sp)) begin
        if (add_sent < N_FAST) begin
          add_in_vp <= 1'b1;
          new_add_op(1'b1);
        end else if (add_sent < N_OPS && add_got >= N_FAST && $urandom_range(0, 2) != 0) begin
          add_in_vp <= 1'b1;
          new_add_op(1'b0);
        end else add_in_vp <= 1'b0;
      end
      add_out_sp <= (add_got >= N_FAST) && ($urandom_range(0, 3) == 0);

      // ---------------- end
      if (loop_outs >= 2 * N_LOOP && alu_got >= N_OPS && add_got >= N_OPS) finish_test();
    end
  end

  task automatic finish_test();
    check(n_loop_right > 0, "loop: no right guess seen");
    check(n_loop_wrong > 0, "loop: no wrong guess seen");
    check(n_loop_stall > 0, "loop: output never stalled");
    check(n_alu_fast > 0,   "ALU: no speculative result used");
    check(n_alu_replay > 0, "ALU: no replay");
    check(n_alu_stall > 0,  "ALU: output never stalled");
    check(n_add_fast > 0,   "adder: no speculative result used");
    check(n_add_replay > 0, "adder: no replay");
    check(n_add_ded > 0,    "adder: no double error");
    check(n_add_stall > 0,  "adder: output never stalled");
    check(n_alu_replay + n_alu_fast == N_OPS, "ALU: firings do not match operations");
    check(n_add_replay + n_add_fast == N_OPS, "adder: firings do not match operations");
    $display("loop: %0d right, %0d wrong guesses, %0d stalls; ALU: %0d fast, %0d replays; adder: %0d fast, %0d replays, %0d double errors",
             n_loop_right, n_loop_wrong, n_loop_stall, n_alu_fast, n_alu_replay, n_add_fast, n_add_replay, n_add_ded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired: loop %0d, ALU %0d, adder %0d results", loop_outs, alu_got, add_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
