// secded_decoder: single-error-correct, double-error-detect check of a
// 72-bit codeword holding 64 data bits and 8 check bits.
//
// Code: extended Hamming code. Codeword bit p (1..71) is Hamming position p;
// check bit j (0..6) is at position 2**j and the data bits fill the other
// positions in increasing order (spec_pkg::secded_data_pos). Bit 0 is the
// overall parity of the whole word. The 7-bit syndrome is the XOR of the
// positions of all set bits; with the overall parity it classifies the word:
//  syndrome 0, parity ok    -> no error
//  parity wrong             -> single error at position syndrome: corrected
//  syndrome != 0, parity ok -> double error: detected, data not corrected
// Purely combinational. The 64+8 code size follows the published resilient
// adder; the bit placement is this design's choice.
module secded_decoder
  import spec_pkg::*;
(
  input  logic [SECDED_CODE_W-1:0] code,
  output logic [SECDED_DATA_W-1:0] data_raw,   // data bits as received
  output logic [SECDED_DATA_W-1:0] data_fixed, // data bits after correction
  output logic                     sec,        // single error found (corrected)
  output logic                     ded,        // double error found
  output logic                     err         // any error found
);

  logic [6:0]               syndrome;
  logic                     parity;
  logic [SECDED_CODE_W-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int unsigned p = 1; p < SECDED_CODE_W; p++) begin
      if (code[p]) syndrome = syndrome ^ 7'(p);
    end
    parity = ^code;
    sec    = parity;
    ded    = !parity && (syndrome != '0);
    err    = sec || ded;
    fixed  = code;
    if (parity && int'(syndrome) < SECDED_CODE_W) fixed[syndrome] = !code[syndrome];
  end

  for (genvar d = 0; d < SECDED_DATA_W; d++) begin : g_data
    localparam int unsigned POS = secded_data_pos(d);
    assign data_raw[d]   = code[POS];
    assign data_fixed[d] = fixed[POS];
  end

endmodule
