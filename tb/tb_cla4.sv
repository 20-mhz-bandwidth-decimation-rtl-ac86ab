// tb_cla4: exhaustive check of the 4-bit carry look-ahead adder against integer addition
// for all 256 input pairs.
module tb_cla4;
  logic [3:0] a, b;
  logic [4:0] s;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .s(s));

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(s) != i + j) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, j, s);
        end
      end
    end
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
