// ppc_set1_psi: set 1 of the parallel-prefix comparison resolution module.
//
// One cell per bit position compares A_k with B_k and raises the termination
// flag d[k] when the two bits differ. A raised flag tells the set-2 and set-4
// cells that the comparison is decided at this position and that every bit of
// lower significance must stay 0 on both buses. The flag is the XOR of the two
// operand bits: the flag's role follows the design, the XOR is this
// implementation's choice as the simplest function with that meaning.
//
// Interface: a, b are the N-bit operands (bit N-1 is the MSB); d is the N-bit
// flag vector. Purely combinational, one gate level.
module ppc_set1_psi #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);

  for (genvar k = 0; k < N; k++) begin : g_psi
    assign d[k] = a[k] ^ b[k];
  end

endmodule
