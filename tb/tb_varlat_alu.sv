// tb_varlat_alu: self-checking test of the variable-latency ALU.
//
// A first phase sends back-to-back operations with no back-pressure and
// checks that the last result appears exactly (operations - 1) + (operations
// whose approximate result was wrong) + latency cycles after the first input:
// no cost for a right guess, one cycle per wrong one. A second phase adds
// random input gaps and output stalls. Every result (value and flags) is
// compared with a reference computed here.
`timescale 1ns/1ps
module tb_varlat_alu;
  import spec_pkg::*;


  localparam int unsigned N_FAST   = 200;   // ops in the back-to-back phase
  localparam int unsigned N_OPS    = 800;   // ops in total per datapath
  localparam int unsigned LATENCY  = 2;     // input transfer to output valid
  localparam int unsigned WATCHDOG = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic        alu_in_vp, alu_in_sp, alu_out_vp, alu_out_sp, alu_out_zero, alu_out_neg;
  logic        alu_stat_replay, alu_stat_fast;
  alu_op_e     alu_in_op;
  logic [7:0]  alu_in_a, alu_in_b, alu_out_result;

  varlat_alu dut (
    .clk, .rst_n, .in_vp(alu_in_vp), .in_sp(alu_in_sp), .in_op(alu_in_op), .in_a(alu_in_a), .in_b(alu_in_b),
    .out_vp(alu_out_vp), .out_sp(alu_out_sp), .out_result(alu_out_result), .out_zero(alu_out_zero),
    .out_neg(alu_out_neg), .stat_replay(alu_stat_replay), .stat_fast(alu_stat_fast)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // --------------------------------------------------------------- ALU
  typedef struct packed { logic [7:0] r; logic z; logic n; } alu_exp_t;
  alu_exp_t    alu_q[$];
  int unsigned alu_sent = 0, alu_got = 0, alu_errs_fast = 0;
  int unsigned alu_t_first = 0, alu_t_last = 0;
  int unsigned n_alu_replay = 0, n_alu_fast = 0, n_alu_stall = 0;

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

  initial begin
    alu_in_vp = 1'b0; alu_out_sp = 1'b0; alu_in_op = ALU_ADD; alu_in_a = '0; alu_in_b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;

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

      if (alu_got >= N_OPS) finish_test();
    end
  end

  task automatic finish_test();
    check(n_alu_fast > 0,   "ALU: no speculative result used");
    check(n_alu_replay > 0, "ALU: no replay");
    check(n_alu_stall > 0,  "ALU: output never stalled");
    check(n_alu_replay + n_alu_fast == N_OPS, "ALU: firings do not match operations");
    $display("ALU: %0d fast, %0d replays", n_alu_fast, n_alu_replay);
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
