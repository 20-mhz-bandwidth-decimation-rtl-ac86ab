// tb_ripple_carry_adder: random and corner-case check of the 14-bit ripple carry adder
// (sum and carry-out, with and without carry-in) against integer addition.
module tb_ripple_carry_adder;
  localparam int unsigned W = 14;
  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   s;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s));

  task automatic check(int unsigned x, int unsigned y, bit c);
    a = W'(x);
    b = W'(y);
    cin = c;
    #1;
    checks++;
    if (int'(s) != int'(a) + int'(b) + int'(c)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d", a, b, c, s);
    end
  endtask

  initial begin
    check(0, 0, 0);
    check(16383, 16383, 1);
    check(16383, 1, 0);
    check(8191, 8192, 1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
