// Majority logic decoder/detector (MLDD) for the (15,7,5) EG-LDPC code.
//
// A codeword read from memory is loaded into a cyclic shift register. Each iteration
// the XOR matrix forms the J=4 check sums orthogonal on the register's MSB, the
// majority gate votes on them, and the register rotates one place with the MSB
// corrected by the vote as it wraps. After N=15 iterations every bit has been decoded
// once and the word is back in its original order. The control unit watches the check
// sums of the first three iterations: if none fired, the word is taken to be
// error-free and leaves after those three iterations. Every pattern of up to four
// flipped bits fires at least one check in those iterations, so the shortcut never
// passes a word with four or fewer errors; up to two errors are corrected.
//
// The output multiplexers undo the rotation: after an early finish the register has
// rotated DETECT_ITERS-1 = 2 places and is rotated back; after a full decode the
// register's next value (already in original order) is taken.
//
// Interface: start/cw_in are accepted when busy=0. done is a one-cycle pulse with the
// corrected codeword on y (held until the next done) and err_detected=1 when the full
// decode ran. Timing: a clean word takes five clock periods, the input period (start
// high, word loaded at its end), three iterations and the output period in which done
// is high, i.e. done rises 3 clock edges after the edge that takes start. A word with
// errors takes N+2 = 17 periods: done rises N = 15 edges after that edge.
module mldd
  import eg_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t cw_in,
  output logic      busy,
  output logic      done,
  output codeword_t y,
  output logic      err_detected
);

  codeword_t       q;
  checks_t         b;
  logic            maj, load, shift, finish, early;
  codeword_t       y_next;

  cyclic_shift_reg #(.N(N)) u_csr (
    .clk, .rst_n, .load, .load_data(cw_in), .shift, .corr(maj), .q
  );

  xor_matrix #(.N(N), .J(J), .MASK(CHECK_MASK)) u_xor (.q, .b);

  majority_gate #(.J(J)) u_maj (.b, .maj);

  mldd_control #(.N(N), .J(J)) u_ctrl (
    .clk, .rst_n, .start, .b, .load, .shift, .finish, .early, .busy,
    .or1(), .or2(), .dff1(), .dff2(), .iter()
  );

  // Output multiplexers.
  always_comb
    y_next = early ? rotl(q, N - (DETECT_ITERS - 1))
                   : {q[N-2:0], q[N-1] ^ maj};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done         <= 1'b0;
      y            <= '0;
      err_detected <= 1'b0;
    end else begin
      done <= finish;
      if (finish) begin
        y            <= y_next;
        err_detected <= !early;
      end
    end
  end

endmodule
