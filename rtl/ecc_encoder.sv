// ecc_encoder - SEC-DED (extended Hamming) encoder, purely combinational.
//
// Turns a DATA_W-bit word into a CODE_W-bit codeword (16 -> 22 by default).
// Codeword layout, 1-based Hamming positions 1..CODE_W-1 live at code_o[i]:
//   * check bit j (j = 0..PAR_W-1) at position 2**j; it is the XOR of every
//     position whose index has bit j set, so the syndrome of a single error
//     equals the position of the flipped bit;
//   * data bits, LSB first, at the positions that are not powers of two;
//   * code_o[0] is the overall parity (XOR of positions 1..CODE_W-1), which
//     lets the decoder tell one error from two.
// The five Hamming check bits over 16 data bits follow the source design;
// the overall parity bit (22 bits instead of 21) is added here because a
// 21-bit Hamming code alone cannot detect every double error.
module ecc_encoder
#(
  parameter int unsigned DATA_W = hm_pkg::HM_DATA_W,
  parameter int unsigned PAR_W  = hm_pkg::hamming_par_w(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W + 1
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [CODE_W-1:0] code_o
);

  always_comb begin
    logic [CODE_W-1:0] cw;
    int unsigned       d;
    cw = '0;
    d  = 0;
    // Scatter the data bits over the non-power-of-two positions.
    for (int unsigned pos = 1; pos < CODE_W; pos++) begin
      if (!hm_pkg::is_pow2(pos)) begin
        cw[pos] = data_i[d];
        d++;
      end
    end
    // Hamming check bits.
    for (int unsigned j = 0; j < PAR_W; j++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos < CODE_W; pos++)
        if (pos[j] && !hm_pkg::is_pow2(pos)) p ^= cw[pos];
      cw[1 << j] = p;
    end
    // Overall parity over positions 1..CODE_W-1.
    cw[0] = ^cw[CODE_W-1:1];
    code_o = cw;
  end

endmodule
