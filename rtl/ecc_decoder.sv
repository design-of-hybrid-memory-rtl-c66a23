// ecc_decoder - SEC-DED (extended Hamming) decoder, purely combinational.
//
// Reads a codeword in the layout of ecc_encoder (overall parity at bit 0,
// Hamming positions 1..CODE_W-1, check bits at the power-of-two positions).
// The syndrome is the XOR of the indices of all set positions; the overall
// parity is the XOR of every bit:
//   syndrome = 0, parity even  -> no error
//   parity odd, syndrome < CODE_W -> single error at position `syndrome`
//                                 (0 = the overall parity bit), corrected
//   syndrome != 0, parity even -> double error, flagged, data not corrected
//   parity odd, syndrome >= CODE_W -> impossible for one error, flagged as
//                                 uncorrectable
// Correction of single errors and flagging of double errors follow the
// source design; the decision table above is the standard one for an
// extended Hamming code.
module ecc_decoder
#(
  parameter int unsigned DATA_W = hm_pkg::HM_DATA_W,
  parameter int unsigned PAR_W  = hm_pkg::hamming_par_w(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W + 1
) (
  input  logic [CODE_W-1:0] code_i,
  output logic [DATA_W-1:0] data_o,
  output logic              single_err_o,
  output logic              double_err_o,
  output logic [PAR_W-1:0]  syndrome_o
);

  logic [PAR_W-1:0] syn;
  logic             par_odd;

  always_comb begin
    syn = '0;
    for (int unsigned pos = 1; pos < CODE_W; pos++)
      if (code_i[pos]) syn ^= PAR_W'(pos);
    par_odd = ^code_i;
  end

  always_comb begin
    logic [CODE_W-1:0] fixed;
    int unsigned       d;
    fixed        = code_i;
    single_err_o = 1'b0;
    double_err_o = 1'b0;
    if (par_odd) begin
      if (32'(syn) < CODE_W) begin
        single_err_o = 1'b1;
        fixed[syn]   = ~code_i[syn];
      end else begin
        double_err_o = 1'b1;
      end
    end else if (syn != '0) begin
      double_err_o = 1'b1;
    end
    // Gather the data bits back from the non-power-of-two positions.
    data_o = '0;
    d      = 0;
    for (int unsigned pos = 1; pos < CODE_W; pos++) begin
      if (!hm_pkg::is_pow2(pos)) begin
        data_o[d] = fixed[pos];
        d++;
      end
    end
  end

  assign syndrome_o = syn;

endmodule
