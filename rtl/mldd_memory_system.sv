// Memory protected by a (15,7,5) EG-LDPC code with majority logic decoding/detection.
//
// Write path: the 7-bit word is encoded into a 15-bit codeword, a detector checks that
// the encoder produced a codeword, and the codeword is written to memory. If the
// detector rejects it, the write is held and encoded again in the next cycle, until it
// passes. Read path: the codeword is read from memory (one cycle) and decoded by the
// MLDD, which returns an error-free word after three iterations and runs the full
// 15-iteration majority decode only when those iterations saw an error.
//
// The encoder-memory-decoder chain follows the source. The memory depth, the
// handshakes and the two fault ports are this design's own: upset_* flips bits of a
// stored word (soft errors in the memory); enc_fault_mask is XORed onto the encoder's
// output before the detector, modelling a transient fault in the encoder.
//
// Interface and timing:
//   write: wr_en with wr_addr/wr_data while wr_ready=1. The codeword is written at that
//          clock edge if it passes the check; otherwise wr_ready drops, enc_retry
//          pulses for each rejected attempt and the write completes on a later edge.
//   read:  rd_en with rd_addr while rd_ready=1. rd_valid pulses with rd_data (the
//          corrected information bits), rd_codeword and rd_err_detected. From rd_en's
//          edge, rd_valid is high after 4 edges for an error-free word (one for the
//          memory, three decoding iterations) and after N+1 = 16 edges when an error
//          was detected (one for the memory, N iterations).
module mldd_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  info_t         wr_data,
  output logic          wr_ready,
  output logic          enc_retry,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  output logic          rd_valid,
  output info_t         rd_data,
  output codeword_t     rd_codeword,
  output logic          rd_err_detected,
  // fault injection
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  codeword_t     upset_mask,
  input  codeword_t     enc_fault_mask
);

  // ---------------- write path ----------------
  logic          wr_pend;
  logic [AW-1:0] wr_pend_addr;
  info_t         wr_pend_data;
  logic          wr_req;
  logic [AW-1:0] wr_req_addr;
  info_t         wr_req_data;
  codeword_t     enc_cw, enc_checked;
  codeword_t     enc_syndrome;
  logic          enc_error;
  logic          mem_we;

  assign wr_ready    = !wr_pend;
  assign wr_req      = wr_pend || wr_en;
  assign wr_req_addr = wr_pend ? wr_pend_addr : wr_addr;
  assign wr_req_data = wr_pend ? wr_pend_data : wr_data;

  eg_encoder u_enc (.info(wr_req_data), .cw(enc_cw));

  assign enc_checked = enc_cw ^ enc_fault_mask;

  eg_encoder_checker u_chk (.cw(enc_checked), .syndrome(enc_syndrome), .error(enc_error));

  assign mem_we    = wr_req && !enc_error;
  assign enc_retry = wr_req && enc_error;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend      <= 1'b0;
      wr_pend_addr <= '0;
      wr_pend_data <= '0;
    end else if (enc_retry) begin
      wr_pend      <= 1'b1;
      wr_pend_addr <= wr_req_addr;
      wr_pend_data <= wr_req_data;
    end else begin
      wr_pend      <= 1'b0;
    end
  end

  // ---------------- memory ----------------
  codeword_t mem_rdata;
  logic      rd_issue, rd_pend;

  assign rd_issue = rd_en && rd_ready;

  cw_memory #(.DEPTH(DEPTH), .WIDTH(N)) u_mem (
    .clk,
    .wr_en(mem_we), .wr_addr(wr_req_addr), .wr_data(enc_checked),
    .rd_en(rd_issue), .rd_addr, .rd_data(mem_rdata),
    .upset_en, .upset_addr, .upset_mask
  );

  // ---------------- read path ----------------
  logic dec_busy, dec_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pend <= 1'b0;
    else        rd_pend <= rd_issue;
  end

  assign rd_ready = !rd_pend && !dec_busy;

  mldd u_mldd (
    .clk, .rst_n, .start(rd_pend), .cw_in(mem_rdata),
    .busy(dec_busy), .done(dec_done), .y(rd_codeword), .err_detected(rd_err_detected)
  );

  assign rd_valid = dec_done;
  assign rd_data  = rd_codeword[K-1:0];

endmodule
