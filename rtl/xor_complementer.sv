// xor_complementer: the row of two-input XOR gates in front of the b inputs of
// the adder/subtractor.
//
// Each bit of b is XORed with its own control bit: a control of 0 passes the
// bit, a control of 1 inverts it, so with all controls high the output is the
// one's complement of b. The control is one bit per XOR gate so that the
// instantiating module can wire each gate to the buffered copy of the select
// signal that drives it; the design uses two such copies, and in operation all
// control bits are equal. The per-bit control port is this implementation's
// choice.
//
// Ports: b and inv (WIDTH bits) in, b_eff = b ^ inv out. Combinational.
module xor_complementer #(
  parameter int unsigned WIDTH = asm_pkg::ASM_WIDTH
) (
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] inv,
  output logic [WIDTH-1:0] b_eff
);

  assign b_eff = b ^ inv;

endmodule
