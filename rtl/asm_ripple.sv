// asm_ripple: on-demand WIDTH-bit adder/subtractor (ASM) built as a ripple
// chain of XOAC full adders.
//
// select = 0: result = a + b, carry-in of bit 0 is 0, cout is the carry out.
// select = 1: result = a - b in two's complement. The XOR row inverts b and
//             select itself is the carry-in of bit 0, adding the 1 that turns
//             the one's complement into the two's complement. cout is then 1
//             when a >= b (unsigned), i.e. it is the inverse of a borrow.
//
// The select input has to reach one XOR gate per bit, so it is split over two
// buffered nets: sel_buf2 drives the XORs of bits 0 .. BUF2_BITS-1 and
// sel_buf1 those of bits BUF2_BITS .. WIDTH-1 (15 and 17 gates at WIDTH = 32).
// A buffer has no logic function, so both nets are plain copies of select
// here; they are kept apart only so the fan-out split stays visible. The carry
// into bit 0 is taken from select before the buffers. The chain, the XOR row,
// the split and the carry-in wiring follow the design; the port names and the
// meaning given to cout in subtraction are this implementation's.
//
// Ports: a, b (WIDTH bits), select in; result (WIDTH bits), cout out.
// Purely combinational: no clock and no reset. The longest path runs from
// select (or b) through bit 0's XOR, then through every stage's carry term to
// cout and result[WIDTH-1].
module asm_ripple #(
  parameter int unsigned WIDTH     = asm_pkg::ASM_WIDTH,
  parameter int unsigned BUF2_BITS = asm_pkg::BUF2_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             select,
  output logic [WIDTH-1:0] result,
  output logic             cout
);

  // Number of low-order XORs on buf2, limited to the word length.
  localparam int unsigned LO_BITS = (BUF2_BITS < WIDTH) ? BUF2_BITS : WIDTH;

  logic             sel_buf1;   // select copy for the upper XOR gates
  logic             sel_buf2;   // select copy for the lower XOR gates
  logic [WIDTH-1:0] inv;        // XOR control per bit
  logic [WIDTH-1:0] b_eff;      // b or ~b into the full adders
  logic [WIDTH:0]   carry;      // carry[i] enters bit i, carry[WIDTH] = cout

  assign sel_buf1 = select;
  assign sel_buf2 = select;

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      inv[i] = (i < LO_BITS) ? sel_buf2 : sel_buf1;
    end
  end

  xor_complementer #(.WIDTH(WIDTH)) u_xor (
    .b     (b),
    .inv   (inv),
    .b_eff (b_eff)
  );

  assign carry[0] = select;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    xoac_fa u_fa (
      .a    (a[i]),
      .b    (b_eff[i]),
      .cin  (carry[i]),
      .sum  (result[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
