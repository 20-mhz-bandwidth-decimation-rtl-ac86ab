// tb_fir_filter: drives blocks of five 14-bit samples into the polyphase FIR stage and
// compares every output with a direct 64-tap convolution out(k) = sum_n hf(n) y(5k+4-n).
// The reference taps are typed in here from the coefficient table (first half, mirrored).
// The stream has random blocks, an impulse (every tap appears at the output in turn,
// checking the coefficient mapping and signs), all-maximum input (most negative output,
// 9375 * -5818) and samples that give a positive output. One block is sent every 25 clocks
// as in the design; the output must appear on the edge that takes the block.
module tb_fir_filter
  import decim_pkg::*;
;
  logic clk = 0, rst_n = 0, load = 0;
  logic [M-1:0][SINC_W-1:0] blk = '0;
  logic signed [FIR_W-1:0] dout;
  int checks = 0, failures = 0;
  int y [$];
  int n_pos = 0, n_neg = 0;

  localparam int HALF [32] = '{1, 6, 13, 18, 17, 8, -9, -31, -52, -64, -61, -40, -7, 28,
    51, 52, 26, -20, -69, -100, -94, -46, 36, 124, 180, 168, 64, -132, -392, -666, -894,
    -1024};

  fir_filter dut (.clk(clk), .rst_n(rst_n), .load(load), .blk(blk), .dout(dout));

  always #5 clk = ~clk;

  function automatic longint ref_out(int k);
    longint acc = 0;
    for (int n = 0; n < 64; n++) begin
      int idx = 5*k + 4 - n;
      int h = (n < 32) ? HALF[n] : HALF[63-n];
      if (idx >= 0) acc += longint'(h) * longint'(y[idx]);
    end
    return acc;
  endfunction

  task automatic send_block(int kind);
    int k;
    k = y.size() / 5;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      int v;
      case (kind)
        0: v = $urandom % 9376;
        1: v = (y.size() == 400) ? 9375 : 0;    // impulse of full height
        default: v = 9375;
      endcase
      blk[i] = SINC_W'(v);
      y.push_back(v);
    end
    load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (longint'(dout) != ref_out(k)) begin
      failures++;
      $display("FAIL block %0d: out=%0d want %0d", k, dout, ref_out(k));
    end
    if (dout > 0) n_pos++;
    if (dout < 0) n_neg++;
    repeat (23) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 80; k++) send_block(0);
    for (int k = 0; k < 16; k++) send_block(1);
    for (int k = 0; k < 16; k++) send_block(2);
    checks++;
    if (dout != -28'sd54543750) begin
      failures++;
      $display("FAIL full-scale DC output %0d", dout);
    end
    for (int k = 0; k < 100; k++) send_block(0);
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL outputs of one sign only: %0d positive, %0d negative", n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
