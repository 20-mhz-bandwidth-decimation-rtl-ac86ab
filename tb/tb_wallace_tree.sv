// tb_wallace_tree: checks that sum + carry equals the sum of all rows (mod 2^W) for the
// 14-row, 14-bit tree of the sinc stage and a 50-row, 28-bit tree of the FIR stage's
// size, with random rows, all-ones rows and single-row patterns.
module tb_wallace_tree;
  localparam int unsigned N1 = 14, W1 = 14;
  localparam int unsigned N2 = 50, W2 = 28;
  logic [W1-1:0] r1 [N1];
  logic [W2-1:0] r2 [N2];
  logic [W1-1:0] s1, c1;
  logic [W2-1:0] s2, c2;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N1), .W(W1)) dut1 (.rows(r1), .sum(s1), .carry(c1));
  wallace_tree #(.N(N2), .W(W2)) dut2 (.rows(r2), .sum(s2), .carry(c2));

  task automatic check();
    longint unsigned e1 = 0, e2 = 0;
    #1;
    foreach (r1[i]) e1 += longint'(r1[i]);
    foreach (r2[i]) e2 += longint'(r2[i]);
    checks += 2;
    if (W1'(s1 + c1) != W1'(e1)) begin
      failures++;
      $display("FAIL tree1 got %0d want %0d", W1'(s1 + c1), W1'(e1));
    end
    if (W2'(s2 + c2) != W2'(e2)) begin
      failures++;
      $display("FAIL tree2 got %0d want %0d", W2'(s2 + c2), W2'(e2));
    end
  endtask

  initial begin
    foreach (r1[i]) r1[i] = '1;
    foreach (r2[i]) r2[i] = '1;
    check();
    for (int k = 0; k < N2; k++) begin
      foreach (r1[i]) r1[i] = (i == k % N1) ? W1'($urandom) : '0;
      foreach (r2[i]) r2[i] = (i == k) ? W2'($urandom) : '0;
      check();
    end
    for (int t = 0; t < 1000; t++) begin
      foreach (r1[i]) r1[i] = W1'($urandom) >> ($urandom % W1);
      foreach (r2[i]) r2[i] = W2'($urandom) >> ($urandom % W2);
      check();
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
