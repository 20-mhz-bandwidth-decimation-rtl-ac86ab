// tb_kogge_stone_adder: checks the parallel-prefix adder at the two widths the design
// uses, 14 bits (sinc vector merging adder) and 28 bits (FIR final subtraction), with
// corner cases (full carry propagation) and random operands, against integer addition.
module tb_kogge_stone_adder;
  logic [13:0] a14, b14, s14;
  logic [27:0] a28, b28, s28;
  logic        cin, co14, co28;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(14)) dut14 (.a(a14), .b(b14), .cin(cin), .s(s14), .cout(co14));
  kogge_stone_adder #(.W(28)) dut28 (.a(a28), .b(b28), .cin(cin), .s(s28), .cout(co28));

  task automatic check(longint unsigned x, longint unsigned y, bit c);
    longint unsigned r14, r28;
    a14 = 14'(x);
    b14 = 14'(y);
    a28 = 28'(x);
    b28 = 28'(y);
    cin = c;
    #1;
    r14 = longint'(a14) + longint'(b14) + longint'(c);
    r28 = longint'(a28) + longint'(b28) + longint'(c);
    checks += 2;
    if ({co14, s14} != 15'(r14)) begin
      failures++;
      $display("FAIL14 %0d + %0d + %0d = %0d", a14, b14, c, {co14, s14});
    end
    if ({co28, s28} != 29'(r28)) begin
      failures++;
      $display("FAIL28 %0d + %0d + %0d = %0d", a28, b28, c, {co28, s28});
    end
  endtask

  initial begin
    check(0, 0, 0);
    check(0, 0, 1);
    check(64'hFFFFFFF, 0, 1);
    check(64'hFFFFFFF, 1, 0);
    check(64'h5555555, 64'hAAAAAAA, 1);
    check(64'h3FFF, 64'h3FFF, 1);
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
