// Control unit of the majority logic decoder/detector (MLDD).
//
// It decides, after the first three decoding iterations, whether the word can leave
// the decoder at once. In every iteration an OR gate (or1) combines the check sums
// B1..BJ. During the first two iterations or1 is shifted into two detection registers
// (dff1, dff2); in the third iteration a second OR gate (or2) combines or1 with both
// registers. If or2 is 0 no check fired in three iterations: the word is error-free,
// finish is raised with early=1 and the register is not shifted again. Otherwise
// decoding runs on until iteration N, when finish is raised with early=0. An
// iteration counter, cleared by start, tracks the iteration number. All of this is the
// structure of the source's control schematic and flow diagram. The two-state FSM
// encoding, the counter width and the one-cycle start handshake are this design's own.
//
// Timing: start (accepted only while idle, i.e. busy=0) loads the word at clock edge
// e0; iteration k is evaluated between edges e(k-1) and e(k), and shift is high for
// it unless it is the early finish. finish is a combinational pulse in the last
// iteration (k=3 for a clean word, k=N otherwise).
module mldd_control #(
  parameter int unsigned N = 15,
  parameter int unsigned J = 4,
  localparam int unsigned IW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [J-1:0]  b,
  output logic          load,
  output logic          shift,
  output logic          finish,
  output logic          early,
  output logic          busy,
  output logic          or1,
  output logic          or2,
  output logic          dff1,
  output logic          dff2,
  output logic [IW-1:0] iter
);

  typedef enum logic {IDLE, DECODE} state_t;
  state_t state;

  localparam logic [IW-1:0] DETECT_AT = IW'(eg_ldpc_pkg::DETECT_ITERS);
  localparam logic [IW-1:0] LAST      = IW'(N);

  always_comb begin
    busy   = (state == DECODE);
    load   = (state == IDLE) && start;
    or1    = |b;
    or2    = or1 | dff1 | dff2;
    early  = busy && (iter == DETECT_AT) && !or2;
    finish = early || (busy && iter == LAST);
    shift  = busy && !early;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      iter  <= '0;
      dff1  <= 1'b0;
      dff2  <= 1'b0;
    end else if (load) begin
      state <= DECODE;
      iter  <= IW'(1);
      dff1  <= 1'b0;               // reset the detection registers
      dff2  <= 1'b0;
    end else if (busy) begin
      if (iter < DETECT_AT) begin  // load the detection registers
        dff1 <= or1;
        dff2 <= dff1;
      end
      if (finish) state <= IDLE;
      else        iter  <= iter + IW'(1);
    end
  end

  // Detection happens before the last iteration, so N must exceed it.
  initial assert (N > eg_ldpc_pkg::DETECT_ITERS);

endmodule
