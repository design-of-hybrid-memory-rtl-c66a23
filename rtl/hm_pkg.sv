// hm_pkg - sizes and code-geometry helpers shared by the fault-tolerant memory.
//
// The memory holds 64 words of 16 data bits. Each word is protected by an
// extended Hamming (SEC-DED) code: the Hamming check bits sit at the
// power-of-two positions 1, 2, 4, 8, 16 of a 1-based codeword, the data bits
// fill the remaining positions in increasing order, and one overall parity
// bit sits at index 0. For 16 data bits this gives 5 Hamming check bits plus
// the overall parity bit, a 22-bit codeword. The 5 check bits and the
// 64 x 16 geometry follow the source design; the extra overall parity bit is
// what makes double-error detection possible and is this design's choice.
package hm_pkg;

  localparam int unsigned HM_DATA_W = 16;
  localparam int unsigned HM_DEPTH  = 64;

  // Number of Hamming check bits r for k data bits: smallest r with
  // 2**r >= k + r + 1.
  function automatic int unsigned hamming_par_w(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  // Codeword width: data + Hamming check bits + overall parity bit.
  function automatic int unsigned secded_code_w(input int unsigned k);
    return k + hamming_par_w(k) + 1;
  endfunction

  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  localparam int unsigned HM_CODE_W = secded_code_w(HM_DATA_W);  // 22

endpackage
