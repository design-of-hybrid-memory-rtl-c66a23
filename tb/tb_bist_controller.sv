// tb_bist_controller - self-checking test of the BIST state machine.
//
// The controller drives a real ram instance; between them the testbench can
// insert memory defects:
//   * none                      -> done, no error, after 3*2*64+1 edges;
//   * bit 5 of address 17 stuck at 1 on read -> error, fail_addr 17;
//   * bit 0 of address 0 stuck at 0         -> error, fail_addr 0;
//   * address 41 decoded as 40 (odd/even pair) -> error, fail_addr 40;
//   * address 42 decoded as 40 (same parity; only the address pass sees it)
//                               -> error, fail_addr 40.
// Each run also checks the number of memory writes and reads (192 each),
// the duration, that busy covers the run, and that a clean run after a
// faulty one clears the error flag.
module tb_bist_controller;
  localparam int DEPTH = 64;
  localparam int WIDTH = 22;

  typedef enum int {F_NONE, F_STUCK1, F_STUCK0, F_ALIAS_ODD, F_ALIAS_EVEN} fault_t;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  logic             busy, done, error;
  logic [5:0]       fail_addr;
  logic             mem_we, mem_re;
  logic [5:0]       mem_addr, ram_addr;
  logic [WIDTH-1:0] mem_wdata, mem_rdata, ram_rdata;
  fault_t           fault = F_NONE;
  logic [5:0]       last_rd_addr;
  int checks = 0, failures = 0;
  int n_wr, n_rd;

  bist_controller dut (
    .clk, .rst_n, .start, .busy, .done, .error, .fail_addr,
    .mem_we, .mem_re, .mem_addr, .mem_wdata, .mem_rdata
  );

  ram u_mem (.clk, .we(mem_we), .re(mem_re), .addr(ram_addr),
             .wdata(mem_wdata), .rdata(ram_rdata));

  // Fault insertion between controller and memory.
  always_comb begin
    ram_addr = mem_addr;
    if (fault == F_ALIAS_ODD  && mem_addr == 6'd41) ram_addr = 6'd40;
    if (fault == F_ALIAS_EVEN && mem_addr == 6'd42) ram_addr = 6'd40;
    mem_rdata = ram_rdata;
    if (fault == F_STUCK1 && last_rd_addr == 6'd17) mem_rdata[5] = 1'b1;
    if (fault == F_STUCK0 && last_rd_addr == 6'd0)  mem_rdata[0] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (mem_re) last_rd_addr <= mem_addr;
    if (mem_we) n_wr <= n_wr + 1;
    if (mem_re) n_rd <= n_rd + 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input fault_t f, input bit exp_err, input logic [5:0] exp_addr);
    int edges;
    bit busy_ok;
    fault = f;
    n_wr = 0; n_rd = 0;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);          // start edge
    #1 start = 1'b0;
    edges = 0;
    busy_ok = 1'b1;
    while (!done && edges < 1000) begin
      if (!busy) busy_ok = 1'b0;
      @(posedge clk); #1;
      edges++;
    end
    chk(edges == 3 * 2 * DEPTH + 1, $sformatf("%s duration %0d", f.name(), edges));
    chk(busy_ok && !busy, $sformatf("%s busy", f.name()));
    chk(n_wr == 3 * DEPTH && n_rd == 3 * DEPTH,
        $sformatf("%s accesses wr=%0d rd=%0d", f.name(), n_wr, n_rd));
    chk(error == exp_err, $sformatf("%s error=%b", f.name(), error));
    if (exp_err) chk(fail_addr == exp_addr, $sformatf("%s fail_addr=%0d", f.name(), fail_addr));
    // done holds until the next start
    repeat (3) @(posedge clk);
    #1 chk(done && !busy, $sformatf("%s done held", f.name()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!busy && !done && !error, "idle after reset");
    run(F_NONE,       1'b0, 6'd0);
    run(F_STUCK1,     1'b1, 6'd17);
    run(F_NONE,       1'b0, 6'd0);
    run(F_STUCK0,     1'b1, 6'd0);
    run(F_ALIAS_ODD,  1'b1, 6'd40);
    run(F_ALIAS_EVEN, 1'b1, 6'd40);
    run(F_NONE,       1'b0, 6'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
