// tb_ram - self-checking test of the codeword RAM (64 x 22).
//
// Writes a random word to every address, reads every address back in
// random order and compares with a scoreboard array. Also checks the
// one-cycle read latency, that rdata holds while no read is issued, that
// a write does not disturb rdata, and that a simultaneous read and write of
// one address returns the old word.
module tb_ram;
  localparam int DEPTH = 64;
  localparam int WIDTH = 22;

  logic             clk = 1'b0;
  logic             we = 1'b0, re = 1'b0;
  logic [5:0]       addr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  int cycle = 0;

  ram dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: rdata=%h expected=%h", what, rdata, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; addr = 6'(a); wdata = WIDTH'($urandom);
      model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    // Read back in a scrambled order: a * 37 mod 64 visits every address.
    for (int k = 0; k < DEPTH; k++) begin
      int a;
      a = (k * 37) % DEPTH;
      re = 1'b1; addr = 6'(a);
      @(negedge clk);
      check(model[a], "readback");
    end
    // rdata holds with re low, even across a write.
    re = 1'b0;
    begin
      logic [WIDTH-1:0] held;
      held = rdata;
      we = 1'b1; addr = 6'd3; wdata = ~model[3]; model[3] = wdata;
      @(negedge clk);
      we = 1'b0;
      @(negedge clk);
      check(held, "hold");
    end
    // Latency: the word appears after exactly one edge.
    re = 1'b1; addr = 6'd3;
    begin
      int c0;
      c0 = cycle;
      @(posedge clk); #1;
      checks++;
      if (cycle - c0 != 1 || rdata !== model[3]) begin
        failures++;
        $display("FAIL latency");
      end
    end
    // Read and write together: old word returned, new word stored.
    @(negedge clk);
    we = 1'b1; re = 1'b1; addr = 6'd10; wdata = ~model[10];
    @(negedge clk);
    check(model[10], "read-during-write");
    model[10] = wdata;
    we = 1'b0;
    @(negedge clk);
    check(model[10], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
