// Reference model of the (72,64) extended Hamming code used by the
// testbenches: codeword bit p (1..71) is Hamming position p, check bits at
// positions 1,2,4,...,64, data bits in the remaining positions in order,
// bit 0 the overall parity.
function automatic logic [71:0] ref_secded_encode(input logic [63:0] data);
  logic [71:0] cw;
  int unsigned d;
  cw = '0;
  d  = 0;
  for (int unsigned p = 1; p < 72; p++) begin
    if ((p & (p - 1)) != 0) begin
      cw[p] = data[d];
      d++;
    end
  end
  for (int unsigned j = 0; j < 7; j++) begin
    logic par;
    par = 1'b0;
    for (int unsigned p = 1; p < 72; p++) if (((p >> j) & 1) == 1 && p != (1 << j)) par ^= cw[p];
    cw[1 << j] = par;
  end
  cw[0] = ^cw[71:1];
  return cw;
endfunction

function automatic logic [63:0] ref_secded_data(input logic [71:0] cw);
  logic [63:0] data;
  int unsigned d;
  d = 0;
  for (int unsigned p = 1; p < 72; p++) begin
    if ((p & (p - 1)) != 0) begin
      data[d] = cw[p];
      d++;
    end
  end
  return data;
endfunction
