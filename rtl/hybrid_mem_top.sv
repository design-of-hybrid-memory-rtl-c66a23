// hybrid_mem_top - fault-tolerant 64 x 16 memory with SEC-DED ECC and BIST.
//
// Normal mode: a request is presented with `valid`, `wr_rd` (1 = write,
// 0 = read), `address` and, for a write, `data_in`. A write encodes data_in
// into a 22-bit codeword (ecc_encoder) and stores it in the RAM. A read
// fetches the codeword; ecc_decoder corrects a single-bit error and flags a
// double-bit error. `ready` pulses for one cycle, two clock edges after the
// edge that accepted the request (one for the RAM read register, one for the
// output register behind the decoder); for a read, `data_out`, `single_err`
// and `double_err` are valid with it and hold until the next read completes.
// A new request may be issued every cycle.
//
// Self-test mode: a `bist_start` pulse hands the memory port to the
// bist_controller, which writes and reads back three patterns over all words
// (385 cycles at the default size). While `bist_busy` is high, normal
// requests are ignored and get no `ready`. `bist_done`, `bist_error` and
// `bist_fail_addr` report the result. The self-test overwrites the memory.
//
// `inj_mask` is a fault-injection input: its set bits are XORed into every
// word written to the RAM, in both modes. In normal mode it emulates upsets
// in stored words; during self-test it emulates a defective bit line, which
// the BIST must catch. Tie it to zero in normal use.
//
// The split into encoder, memory, decoder and BIST, the two modes and the
// 64 x 16 size follow the source design. The port protocol (wr_rd polarity,
// ready pulse, latency), ignoring requests during test, and the injection
// port are this design's choices.
module hybrid_mem_top
#(
  parameter int unsigned DATA_W = hm_pkg::HM_DATA_W,
  parameter int unsigned DEPTH  = hm_pkg::HM_DEPTH,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned PAR_W  = hm_pkg::hamming_par_w(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // normal-mode access
  input  logic              valid,
  input  logic              wr_rd,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              ready,
  output logic              single_err,
  output logic              double_err,
  // self-test
  input  logic              bist_start,
  output logic              bist_busy,
  output logic              bist_done,
  output logic              bist_error,
  output logic [ADDR_W-1:0] bist_fail_addr,
  // fault injection
  input  logic [CODE_W-1:0] inj_mask
);

  // ---------------------------------------------------------------- control
  logic accept;        // a normal request is taken this cycle
  logic req_q;         // a normal request was taken at the last edge
  logic rd_pending;    // the RAM output this cycle belongs to a normal read
  logic dec_single, dec_double;

  assign accept = valid && !bist_busy && !bist_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_q      <= 1'b0;
      rd_pending <= 1'b0;
      ready      <= 1'b0;
    end else begin
      req_q      <= accept;
      rd_pending <= accept && !wr_rd;
      ready      <= req_q;
    end
  end

  // READY answers exactly the requests accepted two edges earlier; none is
  // accepted while the self-test owns the memory.
  a_ready_follows_request: assert property (@(posedge clk) disable iff (!rst_n)
                                            ready == $past(accept, 2));
  a_no_request_in_test: assert property (@(posedge clk) disable iff (!rst_n)
                                         bist_busy |-> !accept);
  a_one_error_flag: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(single_err && double_err));

  // Error flags are captured with each read and held with data_out.
  logic single_q, double_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      single_q <= 1'b0;
      double_q <= 1'b0;
    end else if (rd_pending) begin
      single_q <= dec_single;
      double_q <= dec_double;
    end
  end

  // -------------------------------------------------------------- datapath
  logic [CODE_W-1:0] enc_code;
  logic [CODE_W-1:0] ram_rdata;
  logic [DATA_W-1:0] dec_data;

  // BIST memory port
  logic              b_we, b_re;
  logic [ADDR_W-1:0] b_addr;
  logic [CODE_W-1:0] b_wdata;

  // RAM port, muxed between the two modes
  logic              m_we, m_re;
  logic [ADDR_W-1:0] m_addr;
  logic [CODE_W-1:0] m_wdata;

  ecc_encoder #(.DATA_W(DATA_W), .PAR_W(PAR_W), .CODE_W(CODE_W)) u_enc (
    .data_i (data_in),
    .code_o (enc_code)
  );

  always_comb begin
    if (bist_busy) begin
      m_we    = b_we;
      m_re    = b_re;
      m_addr  = b_addr;
      m_wdata = b_wdata ^ inj_mask;
    end else begin
      m_we    = accept &&  wr_rd;
      m_re    = accept && !wr_rd;
      m_addr  = address;
      m_wdata = enc_code ^ inj_mask;
    end
  end

  ram #(.DEPTH(DEPTH), .WIDTH(CODE_W), .ADDR_W(ADDR_W)) u_ram (
    .clk   (clk),
    .we    (m_we),
    .re    (m_re),
    .addr  (m_addr),
    .wdata (m_wdata),
    .rdata (ram_rdata)
  );

  // The decoder works on the held RAM output, so data_out stays valid until
  // the next read. Self-test reads also pass through the RAM output register;
  // the flags are only captured for normal reads.
  ecc_decoder #(.DATA_W(DATA_W), .PAR_W(PAR_W), .CODE_W(CODE_W)) u_dec (
    .code_i       (ram_rdata),
    .data_o       (dec_data),
    .single_err_o (dec_single),
    .double_err_o (dec_double),
    .syndrome_o   ()
  );

  bist_controller #(.DEPTH(DEPTH), .WIDTH(CODE_W), .ADDR_W(ADDR_W)) u_bist (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (bist_start),
    .busy      (bist_busy),
    .done      (bist_done),
    .error     (bist_error),
    .fail_addr (bist_fail_addr),
    .mem_we    (b_we),
    .mem_re    (b_re),
    .mem_addr  (b_addr),
    .mem_wdata (b_wdata),
    .mem_rdata (ram_rdata)
  );

  assign single_err = single_q;
  assign double_err = double_q;

  // During self-test the RAM output register is overwritten by BIST reads.
  // data_out therefore follows the decoder only for normal reads: hold it.
  always_ff @(posedge clk) begin
    if (!rst_n)          data_out <= '0;
    else if (rd_pending) data_out <= dec_data;
  end

endmodule
