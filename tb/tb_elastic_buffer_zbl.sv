// tb_elastic_buffer_zbl: self-checking test of the elastic buffer with zero backward latency.
//
// The sender offers tokens numbered 0, 1, 2, ... and skips a number whenever
// an anti-token reaches it. The receiver counts every event that uses up one
// number (a token received, a token killed at the output, an anti-token
// handed to the buffer); each received token must carry that count, which is
// transfer equivalence with a plain FIFO. Directed phases check the forward
// latency (1), full throughput, the capacity (CAP) and the backward latency
// of anti-tokens (LB); a random phase mixes stalls, gaps and anti-tokens on
// both sides, with the SELF rules checked on both channels.
`timescale 1ns/1ps
module tb_elastic_buffer_zbl;

  localparam int unsigned W   = 16;
  localparam int unsigned CAP = 1;
  localparam int unsigned LB  = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic         in_vp, in_sp, in_vn, in_sn, out_vp, out_sp, out_vn, out_sn;
  logic [W-1:0] in_data, out_data;

  elastic_buffer_zbl #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  int unsigned s_seq = 0, r_cnt = 0;
  int unsigned n_in = 0, n_out = 0, n_kill_out = 0, n_anti_in = 0, n_cancel_in = 0;
  int unsigned first_send = 0, first_out = 0, anti_cycle = 0;
  bit          seen_out = 1'b0, seen_anti = 1'b0;
  int unsigned p_send = 0, p_stop = 0, p_anti = 0;   // percent
  bit          vp_prev = 0, sp_prev = 0, vnp_prev = 0, vn_prev = 0, sn_prev = 0;
  logic [W-1:0] data_prev;

  initial begin
    in_vp = 0; in_sn = 0; in_data = '0; out_sp = 0; out_vn = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      bit nvp, nvn;
      cycle <= cycle + 1;
      // phases
      if      (cycle < 100) begin p_send = 100; p_stop = 0;   p_anti = 0;  end
      else if (cycle < 130) begin p_send = 100; p_stop = 100; p_anti = 0;  end
      else if (cycle < 140) begin p_send = 0;   p_stop = 0;   p_anti = 0;  end
      else if (cycle < 150) begin p_send = 0;   p_stop = 0;   p_anti = 0;  end
      else                  begin p_send = 60;  p_stop = 30;  p_anti = 15; end

      // SELF rules on both channels
      check(!(in_sp && in_vn) && !(out_vp && out_sn), "stop and kill together");
      if (vp_prev && sp_prev && !vnp_prev) check(out_vp && out_data == data_prev, "token not persistent");
      if (vn_prev && sn_prev) check(in_vn, "anti-token not persistent");
      vp_prev = out_vp; sp_prev = out_sp; vnp_prev = out_vn; data_prev = out_data;
      vn_prev = in_vn;  sn_prev = in_sn;

      // directed checks
      if (cycle == 129) check(n_in - n_out == CAP, $sformatf("capacity %0d, expected %0d", n_in - n_out, CAP));
      if (cycle == 99)  check(n_out >= 99 - first_out - 1, $sformatf("throughput: %0d tokens", n_out));
      if (cycle == 145) begin
        check(LB == 0 || !in_vn, "anti-token crossed the buffer in zero cycles");
        anti_cycle = cycle;
      end
      if (!seen_anti && anti_cycle != 0 && in_vn) begin
        seen_anti = 1'b1;
        check(cycle - anti_cycle == LB, $sformatf("anti-token took %0d cycles back, expected %0d", cycle - anti_cycle, LB));
      end

      // sender side
      if (in_vp && in_vn) begin n_cancel_in++; s_seq++; end
      else if (in_vp && !in_sp) begin
        if (n_in == 0) first_send = cycle;
        n_in++; s_seq++;
      end else if (!in_vp && in_vn && !in_sn) begin n_anti_in++; s_seq++; end
      if (in_vp && in_sp && !in_vn) nvp = 1'b1;
      else nvp = ($urandom_range(0, 99) < p_send);
      in_vp   <= nvp;
      in_data <= W'(s_seq);
      in_sn   <= !nvp && ($urandom_range(0, 1) == 0);

      // receiver side
      if (out_vp && !out_sp && !out_vn) begin
        check(out_data == W'(r_cnt), $sformatf("received %0d expected %0d", out_data, r_cnt));
        if (!seen_out) begin
          seen_out = 1'b1;
          first_out = cycle;
          check(cycle - first_send == 1, "forward latency is not 1");
        end
        n_out++; r_cnt++;
      end else if (out_vn && (out_vp || !out_sn)) begin
        if (out_vp) n_kill_out++;
        r_cnt++;
      end
      if (out_vn && out_sn && !out_vp) nvn = 1'b1;
      else nvn = (cycle == 144) || ($urandom_range(0, 99) < p_anti);
      out_vn <= nvn;
      out_sp <= !nvn && ($urandom_range(0, 99) < p_stop);

      if (cycle == 3000) begin
        check(n_kill_out > 0 && n_anti_in > 0 && n_cancel_in > 0, "not every anti-token case happened");
        $display("tokens in %0d out %0d, killed at output %0d, anti-tokens to sender %0d, cancelled at input %0d",
                 n_in, n_out, n_kill_out, n_anti_in, n_cancel_in);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
