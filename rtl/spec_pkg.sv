// spec_pkg: types and datapath functions shared by the speculative elastic designs.
//
// Holds the scheduler policy encoding, the ALU operation encoding of the
// variable-latency ALU, the sample functions F and G of the speculative loop,
// and the (72,64) SECDED code helpers. The handshake of every elastic channel
// uses four control bits: vp (valid, forward), sp (stop, backward), vn
// (anti-token valid, backward) and sn (anti-token stop, forward).
package spec_pkg;

  // Scheduler prediction policies.
  //  SCHED_RR      : round-robin among valid channels; the pointer moves past a
  //                  channel as soon as it was offered, so a misprediction
  //                  (offered but stopped) is corrected in the next cycle.
  //  SCHED_PRIMARY : always predict channel 0 ("the fast guess is right");
  //                  after a token on channel 0 was flagged wrong, predict the
  //                  replay channel once.
  typedef enum logic [0:0] {SCHED_RR = 1'b0, SCHED_PRIMARY = 1'b1} sched_policy_e;

  // Operations of the variable-latency ALU.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  // SECDED code sizes: 64 data bits protected by 8 check bits.
  localparam int unsigned SECDED_DATA_W  = 64;
  localparam int unsigned SECDED_CHECK_W = 8;
  localparam int unsigned SECDED_CODE_W  = SECDED_DATA_W + SECDED_CHECK_W;

  // Hamming position (1..71) of data bit d: the d-th position that is not a
  // power of two. Check bit j (j < 7) sits at position 2**j; check bit 7 is
  // the overall parity of the other 71 bits.
  function automatic int unsigned secded_data_pos(input int unsigned d);
    int unsigned pos;
    int unsigned cnt;
    pos = 0;
    cnt = 0;
    for (int unsigned p = 1; p < SECDED_CODE_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (cnt == d) pos = p;
        cnt++;
      end
    end
    return pos;
  endfunction

endpackage
