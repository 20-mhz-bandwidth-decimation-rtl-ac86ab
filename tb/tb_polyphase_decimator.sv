// tb_polyphase_decimator: drives the decimator with a one-hot phase from a software ring
// counter and a random sample stream, with the enable always high (stage 1) and then
// high one cycle in five (stage 2). On every block edge the block output must hold the
// last five samples in order, blk[0] oldest, and block edges must come every 5 samples.
module tb_polyphase_decimator;
  localparam int unsigned W = 14, M = 5;
  logic clk = 0, rst_n = 0, en = 1;
  logic [M-1:0] phase = M'(1);
  logic [W-1:0] din = '0;
  logic [M-1:0][W-1:0] blk;
  logic load;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  int samples = 0, last_load = -1;

  polyphase_decimator #(.W(W), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .phase(phase), .din(din), .blk(blk), .load(load));

  always #5 clk = ~clk;

  task automatic run(int cycles, int en_period);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      en = (c % en_period) == 0;
      din = W'($urandom);
      #1;
      checks++;
      if (load != (en & phase[0])) begin
        failures++;
        $display("FAIL load=%0b with en=%0b phase=%b", load, en, phase);
      end
      @(posedge clk);
      #1;
      if (en) begin
        if (phase[0]) begin
          // samples taken so far: the block just handed over is the 5 before this one
          if (hist.size() >= M) begin
            for (int i = 0; i < int'(M); i++) begin
              checks++;
              if (blk[i] != hist[hist.size() - M + i]) begin
                failures++;
                $display("FAIL blk[%0d]=%0h want %0h", i, blk[i], hist[hist.size() - M + i]);
              end
            end
          end
          if (last_load >= 0) begin
            checks++;
            if (samples - last_load != int'(M)) begin
              failures++;
              $display("FAIL block spacing %0d", samples - last_load);
            end
          end
          last_load = samples;
        end
        hist.push_back(din);
        samples++;
        phase = {phase[M-2:0], phase[M-1]};
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (blk != '0) begin
      failures++;
      $display("FAIL block not cleared by reset");
    end
    @(negedge clk) rst_n = 1;
    run(200, 1);
    run(500, 5);
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
