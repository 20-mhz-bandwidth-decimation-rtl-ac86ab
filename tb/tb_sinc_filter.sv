// tb_sinc_filter: drives blocks of five 4-bit samples into the polyphase sinc stage, one
// block every five clocks as in the design, and compares every output with a direct
// 17-tap convolution y(k) = sum_n h1(n) x(5k+4-n), h1 = (1+z^-1+..+z^-4)^4, computed here
// from the coefficients' definition (not from the block's own tables). The stream
// contains random blocks, a single impulse (to see every coefficient at the output) and
// a full-scale run (output 15 * 625 = 9375, the 14-bit limit). The output must appear on
// the edge that takes the block, i.e. one block period after the block is presented.
module tb_sinc_filter
  import decim_pkg::*;
;
  logic clk = 0, rst_n = 0, load = 0;
  logic [M-1:0][IN_W-1:0] blk = '0;
  logic [SINC_W-1:0] y;
  int checks = 0, failures = 0;
  int x [$];          // all samples presented
  int h1 [17];
  int full_scale_seen = 0;

  sinc_filter dut (.clk(clk), .rst_n(rst_n), .load(load), .blk(blk), .y(y));

  always #5 clk = ~clk;

  // h1 as the fourfold convolution of the 5-tap box
  task automatic make_h1();
    int a [17];
    int b [17];
    foreach (a[i]) a[i] = int'(i == 0);
    repeat (4) begin
      foreach (b[i]) begin
        b[i] = 0;
        for (int j = 0; j < 5; j++) if (i - j >= 0) b[i] += a[i-j];
      end
      a = b;
    end
    h1 = a;
  endtask

  function automatic int ref_y(int k);
    int acc = 0;
    for (int n = 0; n < 17; n++) begin
      int idx = 5*k + 4 - n;
      if (idx >= 0) acc += h1[n] * x[idx];
    end
    return acc;
  endfunction

  task automatic send_block(int kind);
    int k;
    k = x.size() / 5;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      int v;
      case (kind)
        0: v = $urandom % 16;
        1: v = (k == 40 && i == 0) ? 1 : 0;      // impulse
        default: v = 15;                         // full scale
      endcase
      blk[i] = IN_W'(v);
      x.push_back(v);
    end
    load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (int'(y) != ref_y(k)) begin
      failures++;
      $display("FAIL block %0d: y=%0d want %0d", k, y, ref_y(k));
    end
    if (y == 14'd9375) full_scale_seen++;
    repeat (3) @(negedge clk);
    // the output holds between block edges
    checks++;
    if (int'(y) != ref_y(k)) begin
      failures++;
      $display("FAIL block %0d: output did not hold", k);
    end
  endtask

  initial begin
    make_h1();
    checks++;
    if (h1[8] != 85 || h1[5] != 52 || h1[16] != 1) begin
      failures++;
      $display("FAIL reference coefficients");
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 40; k++) send_block(0);
    for (int k = 0; k < 6; k++) send_block(1);
    for (int k = 0; k < 6; k++) send_block(2);
    for (int k = 0; k < 200; k++) send_block(0);
    checks++;
    if (full_scale_seen == 0) begin
      failures++;
      $display("FAIL full scale never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
