// bist_controller - memory built-in self-test state machine.
//
// On `start` (sampled while idle or done) the controller takes the memory
// port (`busy` high) and runs NPASS = 3 passes over all DEPTH locations:
//   pass 0  checkerboard: bit b of word a = b[0] ^ a[0] ^ 1 (...0101 on even
//           addresses, ...1010 on odd ones), for stuck-at bits and
//           coupling between neighbours;
//   pass 1  the inverse checkerboard, so every cell is seen at 0 and at 1;
//   pass 2  the address, replicated across the word, so an address
//           decoder fault (two addresses on one location, or none) shows
//           up as a wrong word.
// Each pass writes every address (one per cycle), then reads every address
// (one per cycle). The memory returns read data one cycle later, so the
// compare runs one cycle behind the read address; a single FLUSH cycle after
// the last read finishes the final compare. `done` rises
// NPASS * 2 * DEPTH + 1 clock edges after the start edge (385 for 64 words) and
// stays high with the result until the next start. `error` is set on any
// mismatch and `fail_addr` keeps the first failing address.
// Writing patterns, reading them back and comparing follows the source
// design; the choice of patterns and the timing are this design's own. Words
// are written raw, without ECC, so the check bits are tested as well.
module bist_controller #(
  parameter int unsigned DEPTH  = hm_pkg::HM_DEPTH,
  parameter int unsigned WIDTH  = hm_pkg::HM_CODE_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              error,
  output logic [ADDR_W-1:0] fail_addr,
  // memory port
  output logic              mem_we,
  output logic              mem_re,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WIDTH-1:0]  mem_wdata,
  input  logic [WIDTH-1:0]  mem_rdata
);

  localparam int unsigned NPASS = 3;

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_FLUSH, S_DONE} state_t;

  state_t            state;
  logic [1:0]        pass;
  logic [ADDR_W-1:0] addr;
  logic              cmp_pend;     // a read was issued last cycle
  logic [WIDTH-1:0]  cmp_exp;      // what that read must return
  logic [ADDR_W-1:0] cmp_addr;

  // Test word for a pass and an address.
  function automatic logic [WIDTH-1:0] pattern(input logic [1:0] p,
                                               input logic [ADDR_W-1:0] a);
    logic [WIDTH-1:0] w;
    for (int unsigned b = 0; b < WIDTH; b++) begin
      unique case (p)
        2'd0:    w[b] = ~(b[0] ^ a[0]);
        2'd1:    w[b] =   b[0] ^ a[0];
        default: w[b] = a[b % ADDR_W];
      endcase
    end
    return w;
  endfunction

  wire last_addr = (addr == ADDR_W'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pass      <= '0;
      addr      <= '0;
      cmp_pend  <= 1'b0;
      cmp_exp   <= '0;
      cmp_addr  <= '0;
      error     <= 1'b0;
      fail_addr <= '0;
    end else begin
      // Compare stage: runs one cycle behind each issued read.
      cmp_pend <= (state == S_READ);
      cmp_exp  <= pattern(pass, addr);
      cmp_addr <= addr;
      if (cmp_pend && (mem_rdata != cmp_exp)) begin
        if (!error) fail_addr <= cmp_addr;
        error <= 1'b1;
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_WRITE;
            pass  <= '0;
            addr  <= '0;
            error <= 1'b0;
            fail_addr <= '0;
          end
        end
        S_WRITE: begin
          addr <= last_addr ? '0 : addr + 1'b1;
          if (last_addr) state <= S_READ;
        end
        S_READ: begin
          addr <= last_addr ? '0 : addr + 1'b1;
          if (last_addr) begin
            if (pass == 2'(NPASS - 1)) begin
              state <= S_FLUSH;
            end else begin
              pass  <= pass + 1'b1;
              state <= S_WRITE;
            end
          end
        end
        S_FLUSH: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The memory port carries one access per cycle, and only during a test.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(mem_we && mem_re));
  a_access_in_test: assert property (@(posedge clk) disable iff (!rst_n)
                                     (mem_we || mem_re) |-> busy);

  assign busy      = (state == S_WRITE) || (state == S_READ) || (state == S_FLUSH);
  assign done      = (state == S_DONE);
  assign mem_we    = (state == S_WRITE);
  assign mem_re    = (state == S_READ);
  assign mem_addr  = addr;
  assign mem_wdata = pattern(pass, addr);

endmodule
