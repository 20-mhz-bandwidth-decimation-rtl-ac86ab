// tb_reset_sync: checks that the synchronized reset falls as soon as the asynchronous
// reset is asserted (between clock edges), and rises on exactly the second enabled clock
// edge after release, both with the enable always high and with a sparse enable (the
// 1/5-rate use of the second synchronizer).
module tb_reset_sync;
  logic clk = 0, arst_n = 0, en = 1, rst_n_out;
  int checks = 0, failures = 0;

  reset_sync #(.STAGES(2)) dut (.clk(clk), .arst_n(arst_n), .en(en), .rst_n_out(rst_n_out));

  always #5 clk = ~clk;

  task automatic expect_val(bit want, string what);
    checks++;
    if (rst_n_out !== want) begin
      failures++;
      $display("FAIL %s: rst_n_out=%0b want %0b at %0t", what, rst_n_out, want, $time);
    end
  endtask

  // release reset, then count enabled edges until rst_n_out rises
  task automatic release_and_count(int en_period);
    int edges = 0;
    int cyc = 0;
    @(negedge clk);
    arst_n = 1;
    while (rst_n_out == 0 && cyc < 100) begin
      en = (cyc % en_period) == 0;
      @(posedge clk);
      if (en) edges++;
      cyc++;
      #1;
    end
    checks++;
    if (edges != 2) begin
      failures++;
      $display("FAIL release took %0d enabled edges, want 2 (en period %0d)", edges, en_period);
    end
    en = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 expect_val(0, "in reset");
    release_and_count(1);
    expect_val(1, "after release");
    repeat (3) @(posedge clk);
    // asynchronous assertion between edges
    #2 arst_n = 0;
    #1 expect_val(0, "async assert");
    repeat (2) @(posedge clk);
    release_and_count(5);
    expect_val(1, "after sparse release");
    repeat (4) @(posedge clk);
    #1 expect_val(1, "stays released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
