// tb_asm_ripple: end-to-end check of the 32-bit on-demand adder/subtractor at
// its default parameters.
//
// Directed corner cases and random operands are applied in both modes, with
// the mode switched between consecutive vectors. The expected values are
// computed from integer arithmetic, not from the adder structure:
//   add:      result = (a + b) mod 2^32,  cout = (a + b) >= 2^32
//   subtract: result = (a - b) mod 2^32,  cout = (a >= b), i.e. no borrow
// The testbench counts how often each behaviour of the design occurred and
// counts a failure for any that never did: both modes, a switch of mode with
// the operands held, a carry out of an addition, a subtraction with and
// without borrow, and a carry that ripples through all WIDTH stages in each
// mode (in subtraction the carry into bit 0 and every stage propagating; in
// addition a carry generated in bit 0 and every higher stage propagating).
module tb_asm_ripple;
  import asm_pkg::*;

  localparam int unsigned W = ASM_WIDTH;

  logic [W-1:0] a, b, result;
  logic         select;
  logic         cout;

  int checks   = 0;
  int failures = 0;

  // Occurrence counters, one per behaviour.
  int n_add = 0, n_sub = 0, n_switch = 0;
  int n_add_carry = 0, n_sub_borrow = 0, n_sub_noborrow = 0;
  int n_ripple_add = 0, n_ripple_sub = 0;

  asm_op_e last_op = OP_ADD;
  logic [W-1:0] last_a = '0, last_b = '0;

  asm_ripple dut (
    .a      (a),
    .b      (b),
    .select (select),
    .result (result),
    .cout   (cout)
  );

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv, input asm_op_e op);
    longint unsigned ua, ub, s;
    logic [W-1:0] exp_res;
    logic         exp_cout;
    logic [W-1:0] beff;

    if (checks > 0 && op != last_op && av == last_a && bv == last_b) n_switch++;
    a = av; b = bv; select = op; #1;

    ua = longint'(av);
    ub = longint'(bv);
    if (op == OP_ADD) begin
      s        = ua + ub;
      exp_res  = s[W-1:0];
      exp_cout = (s >> W) != 0;
      beff     = bv;
      n_add++;
      if (exp_cout) n_add_carry++;
      // carry generated in bit 0 and every higher stage propagates
      if (av[0] && beff[0] && (av[W-1:1] ^ beff[W-1:1]) == '1) n_ripple_add++;
    end else begin
      s        = ua - ub;
      exp_res  = s[W-1:0];
      exp_cout = ua >= ub;
      beff     = ~bv;
      n_sub++;
      if (exp_cout) n_sub_noborrow++;
      else n_sub_borrow++;
      // carry into bit 0 is 1 and every stage propagates
      if ((av ^ beff) == '1) n_ripple_sub++;
    end

    checks += 2;
    if (result !== exp_res) begin
      failures++;
      $display("FAIL %s a=%h b=%h result=%h want %h", op.name(), av, bv, result, exp_res);
    end
    if (cout !== exp_cout) begin
      failures++;
      $display("FAIL %s a=%h b=%h cout=%0b want %0b", op.name(), av, bv, cout, exp_cout);
    end
    last_op = op; last_a = av; last_b = bv;
  endtask

  task automatic need(input string what, input int n);
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL behaviour never exercised: %s", what);
    end
  endtask

  logic [W-1:0] ra, rb;

  initial begin
    // Addition corners; a carry entering bit 0 is only possible when
    // subtracting, so the longest addition carry starts as a generate in bit 0.
    apply('0, '0, OP_ADD);
    apply('1, W'(1), OP_ADD);           // carry generated in bit 0 runs to cout
    apply('1, '1, OP_ADD);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, OP_ADD);
    apply(32'h5555_5555, 32'hAAAA_AAAA, OP_ADD);
    // Subtraction corners
    apply('0, '0, OP_SUB);              // ~0 + 1: carry ripples through all stages
    apply(W'(5), W'(5), OP_SUB);
    apply('0, W'(1), OP_SUB);           // borrow
    apply(W'(1), '0, OP_SUB);
    apply('1, '1, OP_SUB);
    apply({1'b1, {(W-1){1'b0}}}, W'(1), OP_SUB);
    apply(W'(7), W'(9), OP_SUB);
    // Mode switches with operands held
    apply(32'h1234_5678, 32'h0FED_CBA9, OP_ADD);
    apply(32'h1234_5678, 32'h0FED_CBA9, OP_SUB);
    apply(32'h1234_5678, 32'h0FED_CBA9, OP_ADD);
    // One-hot b across every bit in both modes, so each XOR gate of both
    // select copies is seen inverting and passing
    for (int i = 0; i < W; i++) begin
      apply('0, W'(1) << i, OP_ADD);
      apply('0, W'(1) << i, OP_SUB);
      apply('1, W'(1) << i, OP_SUB);
    end
    // Random
    for (int n = 0; n < 20000; n++) begin
      ra = $urandom;
      rb = ($urandom % 4 == 0) ? ra ^ W'($urandom % 4) : $urandom;
      apply(ra, rb, asm_op_e'($urandom % 2));
      if (n % 16 == 0) apply(ra, rb, (last_op == OP_ADD) ? OP_SUB : OP_ADD);
    end

    $display("behaviours exercised:");
    need("addition", n_add);
    need("subtraction", n_sub);
    need("mode switch, operands held", n_switch);
    need("addition carry out", n_add_carry);
    need("subtraction with borrow", n_sub_borrow);
    need("subtraction without borrow", n_sub_noborrow);
    need("full-length ripple (add)", n_ripple_add);
    need("full-length ripple (sub)", n_ripple_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
