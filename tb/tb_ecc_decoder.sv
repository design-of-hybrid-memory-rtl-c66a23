// tb_ecc_decoder - self-checking test of ecc_decoder.
//
// Codewords come from the reference model in secded_ref_pkg. For random data
// words the test applies the clean codeword (no flag, data intact), every
// single-bit flip of all 22 bits (data corrected, single flag, syndrome equal
// to the flipped position for positions 1..21) and every double-bit flip
// (double flag, no single flag). The decoder is combinational; outputs are
// sampled 1 time unit after each input change.
module tb_ecc_decoder;
  import secded_ref_pkg::*;

  logic [21:0] code;
  logic [15:0] data;
  logic        single_err, double_err;
  logic [4:0]  syndrome;
  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0;

  ecc_decoder dut (
    .code_i(code), .data_o(data), .single_err_o(single_err),
    .double_err_o(double_err), .syndrome_o(syndrome)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic [21:0] c, input logic [15:0] d,
                            input bit exp_single, input bit exp_double,
                            input int exp_syn);
    code = c;
    #1;
    checks++;
    if ((!exp_double && data !== d) || single_err !== exp_single ||
        double_err !== exp_double || (exp_syn >= 0 && syndrome !== 5'(exp_syn))) begin
      failures++;
      $display("FAIL code=%h data=%h/%h single=%b/%b double=%b/%b syn=%0d/%0d",
               c, data, d, single_err, exp_single, double_err, exp_double,
               syndrome, exp_syn);
    end
  endtask

  initial begin
    for (int t = 0; t < 40; t++) begin
      logic [15:0] d;
      logic [21:0] c;
      d = (t == 0) ? 16'h0000 : (t == 1) ? 16'hFFFF : 16'($urandom);
      c = ref_encode(d);
      expect_out(c, d, 1'b0, 1'b0, 0);
      n_clean++;
      for (int i = 0; i < 22; i++) begin
        expect_out(c ^ (22'(1) << i), d, 1'b1, 1'b0, i);
        n_single++;
      end
      for (int i = 0; i < 22; i++)
        for (int j = i + 1; j < 22; j++) begin
          expect_out(c ^ (22'(1) << i) ^ (22'(1) << j), d, 1'b0, 1'b1, -1);
          n_double++;
        end
    end
    $display("clean=%0d single=%0d double=%0d", n_clean, n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
