// tb_resilient_adder: self-checking test of the SECDED-protected adder.
//
// Operands are encoded here and get 0, 1 or 2 flipped bits. A first phase
// sends back-to-back additions with no back-pressure and checks that the last
// sum appears exactly (additions - 1) + (additions with an error) + latency
// cycles after the first input: error-free additions cost nothing, each
// error one cycle. A second phase adds random gaps and stalls. Every sum,
// carry and double-error flag is compared with a reference.
`timescale 1ns/1ps
module tb_resilient_adder;
  import spec_pkg::*;

  `include "tb/tb_secded_model.svh"

  localparam int unsigned N_FAST   = 200;   // ops in the back-to-back phase
  localparam int unsigned N_OPS    = 800;   // ops in total per datapath
  localparam int unsigned LATENCY  = 2;     // input transfer to output valid
  localparam int unsigned WATCHDOG = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic        add_in_vp, add_in_sp, add_out_vp, add_out_sp, add_out_cout, add_out_ded;
  logic        add_stat_replay, add_stat_fast;
  logic [71:0] add_in_a_code, add_in_b_code;
  logic [63:0] add_out_sum;

  resilient_adder dut (
    .clk, .rst_n, .in_vp(add_in_vp), .in_sp(add_in_sp), .in_a_code(add_in_a_code), .in_b_code(add_in_b_code),
    .out_vp(add_out_vp), .out_sp(add_out_sp), .out_sum(add_out_sum), .out_cout(add_out_cout),
    .out_ded(add_out_ded), .stat_replay(add_stat_replay), .stat_fast(add_stat_fast)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------- adder
  typedef struct packed { logic [63:0] s; logic c; logic ded; } add_exp_t;
  add_exp_t    add_q[$];
  int unsigned add_sent = 0, add_got = 0, add_errs_fast = 0;
  int unsigned add_t_first = 0, add_t_last = 0;
  int unsigned n_add_replay = 0, n_add_fast = 0, n_add_ded = 0, n_add_stall = 0;

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
    add_in_vp = 1'b0; add_out_sp = 1'b0; add_in_a_code = '0; add_in_b_code = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;

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

      if (add_got >= N_OPS) finish_test();
    end
  end

  task automatic finish_test();
    check(n_add_fast > 0,   "adder: no speculative result used");
    check(n_add_replay > 0, "adder: no replay");
    check(n_add_ded > 0,    "adder: no double error");
    check(n_add_stall > 0,  "adder: output never stalled");
    check(n_add_replay + n_add_fast == N_OPS, "adder: firings do not match operations");
    $display("adder: %0d fast, %0d replays, %0d double errors", n_add_fast, n_add_replay, n_add_ded);
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
