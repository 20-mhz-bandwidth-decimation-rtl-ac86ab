// tb_ring_counter: checks the divide-by-5 ring counter: reset state 00001, a single '1'
// rotating one place per enabled edge, no movement without enable, and a period of
// exactly 5 enabled edges for every phase.
module tb_ring_counter;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] phase;
  int checks = 0, failures = 0;
  int pos = 0;           // model: index of the hot bit
  int last_p0 = -1, n_en = 0;

  ring_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (phase != N'(1)) begin
      failures++;
      $display("FAIL reset state %b", phase);
    end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      en = (i < 100) ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (en) begin
        pos = (pos + 1) % N;
        n_en++;
      end
      #1;
      checks++;
      if (phase != N'(1 << pos)) begin
        failures++;
        $display("FAIL phase %b want %b", phase, N'(1 << pos));
      end
      if (en && phase[0]) begin
        if (last_p0 >= 0) begin
          checks++;
          if (n_en - last_p0 != N) begin
            failures++;
            $display("FAIL phase[0] period %0d", n_en - last_p0);
          end
        end
        last_p0 = n_en;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
