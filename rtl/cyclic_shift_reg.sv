// Cyclic shift register of the majority logic decoder.
//
// N D flip-flops, each behind a multiplexer that selects either the parallel input
// (load) or its neighbour (shift). On a shift every bit moves one place towards the
// MSB and the MSB wraps round to the LSB, so no bit is lost; on the way round it is
// XORed with corr, the majority gate's verdict on it. The bit under decoding is thus
// always q[N-1]. The MSB-to-LSB wrap follows the source; putting the correcting XOR in
// the wrap path follows its decoder schematic.
//
// Interface: load has priority over shift; q is the register content. Reset clears it.
module cyclic_shift_reg #(
  parameter int unsigned N = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_data,
  input  logic         shift,
  input  logic         corr,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_data;
    else if (shift) q <= {q[N-2:0], q[N-1] ^ corr};
  end

endmodule
