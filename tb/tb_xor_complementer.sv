// tb_xor_complementer: checks the XOR row at its default 32-bit width.
//
// Applies all-zero and all-one controls (pass and one's complement) and
// random per-bit controls on random and corner-case operands, and compares
// each output bit with b when the control is 0 and with the inverted bit when
// it is 1, computed bit by bit with a conditional rather than an XOR.
module tb_xor_complementer;

  localparam int unsigned W = asm_pkg::ASM_WIDTH;

  logic [W-1:0] b, inv, b_eff;
  int checks   = 0;
  int failures = 0;

  xor_complementer dut (.b(b), .inv(inv), .b_eff(b_eff));

  task automatic apply(input logic [W-1:0] bv, input logic [W-1:0] iv);
    logic [W-1:0] exp;
    b   = bv;
    inv = iv;
    #1;
    for (int i = 0; i < W; i++) exp[i] = iv[i] ? !bv[i] : bv[i];
    checks++;
    if (b_eff !== exp) begin
      failures++;
      $display("FAIL b=%h inv=%h got %h want %h", bv, iv, b_eff, exp);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('0, '1);
    apply('1, '0);
    apply('1, '1);
    apply(32'h0000_0001, '1);
    apply(32'h8000_0000, '1);
    for (int n = 0; n < 500; n++) begin
      apply($urandom, '0);
      apply($urandom, '1);
      apply($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
