// tb_hybrid_mem_top - end-to-end test of the fault-tolerant memory at its
// default size (64 words x 16 bits, 22-bit codewords, no parameter override).
//
// A monitor checks every READY against a queue of expected responses, which
// also checks the two-edge request-to-READY latency and that no request is
// lost or answered twice. The stimulus walks through:
//   1. back-to-back writes of random data to all 64 words, then back-to-back
//      reads in a scrambled order: data intact, no error flags;
//   2. single-bit upsets: each of the 22 codeword bits flipped on a write
//      through inj_mask, read back corrected with single_err;
//   3. double-bit upsets: random bit pairs, read back with double_err;
//   4. self-test on a healthy memory: requests issued meanwhile are ignored,
//      BIST done after 385 edges without error;
//   5. self-test with a defective bit line (inj_mask during test): error at
//      address 0;
//   6. back in normal mode: write and read all words again;
//   7. 2000 random requests, reads and writes mixed at random addresses,
//      each write carrying no, one or two injected bit flips; the expected
//      flags of a read follow from how many flips the last write of that
//      address carried.
// Each mechanism is counted and a failure is counted for one that never ran.
module tb_hybrid_mem_top;
  localparam int DEPTH = 64;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        valid = 1'b0, wr_rd = 1'b0;
  logic [5:0]  address = '0;
  logic [15:0] data_in = '0;
  logic [15:0] data_out;
  logic        ready, single_err, double_err;
  logic        bist_start = 1'b0, bist_busy, bist_done, bist_error;
  logic [5:0]  bist_fail_addr;
  logic [21:0] inj_mask = '0;

  hybrid_mem_top dut (
    .clk, .rst_n, .valid, .wr_rd, .address, .data_in, .data_out, .ready,
    .single_err, .double_err, .bist_start, .bist_busy, .bist_done,
    .bist_error, .bist_fail_addr, .inj_mask
  );

  typedef struct {
    bit          is_read;
    logic [15:0] data;
    bit          exp_single;
    bit          exp_double;
    int          issue_cycle;
  } resp_t;

  resp_t       expq[$];
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_single_corrected = 0, n_double_detected = 0, n_bist_pass = 0;
  int n_bist_fault_found = 0, n_blocked_in_test = 0, n_back_to_normal = 0;
  int n_random_ops = 0;
  int flips [DEPTH];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  // Response monitor.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && ready) begin
      if (expq.size() == 0) begin
        chk(1'b0, "unexpected ready");
      end else begin
        resp_t r;
        r = expq.pop_front();
        chk(cycle - r.issue_cycle == 2, $sformatf("latency %0d", cycle - r.issue_cycle));
        if (r.is_read) begin
          // After a double error the data is known to be wrong: not compared.
          if (!r.exp_double)
            chk(data_out === r.data,
              $sformatf("read data %h expected %h", data_out, r.data));
          chk(single_err === r.exp_single && double_err === r.exp_double,
              $sformatf("flags s=%b d=%b expected s=%b d=%b",
                        single_err, double_err, r.exp_single, r.exp_double));
          if (r.exp_single && single_err && data_out === r.data) n_single_corrected++;
          if (r.exp_double && double_err) n_double_detected++;
        end
      end
    end
  end

  // Drive one request for one cycle; `expect_resp` queues its response.
  task automatic issue(input bit wr, input logic [5:0] a, input logic [15:0] d,
                       input logic [21:0] mask, input bit expect_resp,
                       input bit exp_single = 0, input bit exp_double = 0);
    resp_t r;
    valid = 1'b1; wr_rd = wr; address = a; data_in = d; inj_mask = mask;
    if (expect_resp) begin
      r.is_read = !wr; r.data = wr ? 16'h0 : model[a];
      r.exp_single = exp_single; r.exp_double = exp_double;
      r.issue_cycle = cycle;
      expq.push_back(r);
    end
    if (wr && expect_resp) model[a] = d;
    @(negedge clk);
    valid = 1'b0; inj_mask = '0;
  endtask

  task automatic drain();
    int n = 0;
    while (expq.size() != 0 && n < 20) begin
      @(negedge clk);
      n++;
    end
    chk(expq.size() == 0, "responses outstanding");
  endtask

  task automatic fill_and_check();
    for (int a = 0; a < DEPTH; a++) issue(1'b1, 6'(a), 16'($urandom), '0, 1'b1);
    for (int k = 0; k < DEPTH; k++) issue(1'b0, 6'((k * 37) % DEPTH), '0, '0, 1'b1);
    drain();
  endtask

  task automatic run_bist(input logic [21:0] mask, input bit exp_err,
                          input logic [5:0] exp_addr);
    int edges;
    @(negedge clk);
    bist_start = 1'b1;
    inj_mask = mask;
    @(posedge clk);
    #1 bist_start = 1'b0;
    edges = 0;
    while (!bist_done && edges < 1000) begin
      // Normal requests during test must be ignored.
      if (edges == 10 || edges == 200) begin
        @(negedge clk);
        valid = 1'b1; wr_rd = 1'b0; address = 6'd5;
        if (bist_busy) n_blocked_in_test++;
      end
      @(posedge clk); #1;
      valid = 1'b0;
      edges++;
    end
    inj_mask = '0;
    chk(edges == 3 * 2 * DEPTH + 1, $sformatf("bist duration %0d", edges));
    chk(bist_error == exp_err, $sformatf("bist_error=%b", bist_error));
    if (exp_err) begin
      chk(bist_fail_addr == exp_addr, $sformatf("bist_fail_addr=%0d", bist_fail_addr));
      if (bist_error && bist_fail_addr == exp_addr) n_bist_fault_found++;
    end else if (!bist_error) begin
      n_bist_pass++;
    end
    repeat (4) @(negedge clk);
    chk(expq.size() == 0, "no response to requests issued during test");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. clean traffic
    fill_and_check();

    // 2. single-bit upsets on every codeword bit
    for (int b = 0; b < 22; b++) begin
      logic [5:0] a;
      a = 6'($urandom_range(DEPTH - 1));
      issue(1'b1, a, 16'($urandom), 22'(1) << b, 1'b1);
      issue(1'b0, a, '0, '0, 1'b1, 1'b1, 1'b0);
    end
    drain();

    // 3. double-bit upsets
    for (int k = 0; k < 30; k++) begin
      int i, j;
      logic [5:0] a;
      i = $urandom_range(21);
      j = (i + 1 + $urandom_range(20)) % 22;
      a = 6'($urandom_range(DEPTH - 1));
      issue(1'b1, a, 16'($urandom), (22'(1) << i) | (22'(1) << j), 1'b1);
      issue(1'b0, a, '0, '0, 1'b1, 1'b0, 1'b1);
    end
    drain();

    // 4. self-test, healthy memory
    run_bist('0, 1'b0, 6'd0);

    // 5. self-test, bit 7 of every written word inverted (defective line)
    run_bist(22'(1) << 7, 1'b1, 6'd0);

    // 6. normal mode again
    begin
      int f0;
      f0 = failures;
      fill_and_check();
      if (failures == f0) n_back_to_normal++;
    end

    // 7. random mixed traffic with random upsets
    for (int a = 0; a < DEPTH; a++) flips[a] = 0;  // phase 6 wrote clean words
    for (int k = 0; k < 2000; k++) begin
      logic [5:0] a;
      a = 6'($urandom_range(DEPTH - 1));
      if ($urandom_range(1) == 1) begin
        int nf, i, j;
        logic [21:0] m;
        nf = $urandom_range(2);
        i = $urandom_range(21);
        j = (i + 1 + $urandom_range(20)) % 22;
        m = (nf == 0) ? '0 : (nf == 1) ? 22'(1) << i : (22'(1) << i) | (22'(1) << j);
        flips[a] = nf;
        issue(1'b1, a, 16'($urandom), m, 1'b1);
      end else begin
        issue(1'b0, a, '0, '0, 1'b1, flips[a] == 1, flips[a] == 2);
      end
      n_random_ops++;
    end
    drain();

    $display("random_ops=%0d", n_random_ops);
    $display("single_corrected=%0d double_detected=%0d bist_pass=%0d bist_fault_found=%0d blocked_in_test=%0d back_to_normal=%0d",
             n_single_corrected, n_double_detected, n_bist_pass, n_bist_fault_found,
             n_blocked_in_test, n_back_to_normal);
    chk(n_single_corrected >= 22, "single-bit correction exercised");
    chk(n_double_detected >= 30, "double-bit detection exercised");
    chk(n_bist_pass > 0, "passing self-test exercised");
    chk(n_bist_fault_found > 0, "failing self-test exercised");
    chk(n_blocked_in_test > 0, "request during self-test exercised");
    chk(n_back_to_normal > 0, "return to normal mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
