// tb_xoac_fa: exhaustive check of the one-bit XOAC full adder.
//
// All eight input combinations are applied and both outputs are compared with
// the full-adder truth table, held here as two 8-bit constants indexed by
// {a, b, cin}: sum is the parity of the inputs, cout is 1 when at least two
// inputs are 1. Each combination is applied twice, in ascending and then in a
// scrambled order, so a missing dependence on the previous input is caught too.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_xoac_fa;

  // Truth table columns, bit index = {a, b, cin}.
  localparam logic [7:0] SUM_TT  = 8'b1001_0110;
  localparam logic [7:0] COUT_TT = 8'b1110_1000;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  xoac_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [2:0] v);
    {a, b, cin} = v;
    #1;
    checks += 2;
    if (sum !== SUM_TT[v]) begin
      failures++;
      $display("FAIL sum  a=%0b b=%0b cin=%0b got %0b want %0b", a, b, cin, sum, SUM_TT[v]);
    end
    if (cout !== COUT_TT[v]) begin
      failures++;
      $display("FAIL cout a=%0b b=%0b cin=%0b got %0b want %0b", a, b, cin, cout, COUT_TT[v]);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) apply(3'(v));
    for (int v = 0; v < 8; v++) apply(3'((v * 5 + 3) % 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
