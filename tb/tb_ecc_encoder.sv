// tb_ecc_encoder - self-checking test of ecc_encoder.
//
// Applies hand-worked vectors, every single-bit data word and 2000 random
// words. Each codeword is compared with the reference model and must also
// satisfy the code's own rules: zero syndrome (XOR of set positions) and
// even overall parity. The encoder is combinational; outputs are sampled
// 1 ns after each input change.
module tb_ecc_encoder;
  import secded_ref_pkg::*;

  logic [15:0] data;
  logic [21:0] code;
  int checks = 0, failures = 0;

  ecc_encoder dut (.data_i(data), .code_o(code));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input logic [15:0] d);
    int s;
    data = d;
    #1;
    s = 0;
    for (int p = 1; p < 22; p++) if (code[p]) s ^= p;
    checks++;
    if (code !== ref_encode(d) || s != 0 || (^code) != 1'b0) begin
      failures++;
      $display("FAIL data=%h code=%h expected=%h syn=%0d", d, code, ref_encode(d), s);
    end
  endtask

  task automatic check_known(input logic [15:0] d, input logic [21:0] exp);
    data = d;
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL known data=%h code=%h expected=%h", d, code, exp);
    end
  endtask

  initial begin
    // Worked by hand: d0 sits at position 3 = 0b00011, so check bits 1 and 2
    // are set; three ones at positions 1..3 make the overall parity bit 1.
    check_known(16'h0000, 22'h000000);
    check_known(16'h0001, 22'h00000F);
    // d15 sits at position 21 = 0b10101: check bits 1, 4, 16, position 21,
    // four ones -> overall parity 0.
    check_known(16'h8000, 22'h210012);
    for (int i = 0; i < 16; i++) check_word(16'(1) << i);
    check_word(16'hFFFF);
    for (int i = 0; i < 2000; i++) check_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
