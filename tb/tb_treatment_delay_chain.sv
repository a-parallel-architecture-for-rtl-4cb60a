// tb_treatment_delay_chain: random start strobes; checks that stage[k] is
// the start strobe of k+1 cycles earlier.
module tb_treatment_delay_chain;
  logic clk = 0, rst = 1, start = 0;
  logic [4:0] stage;
  logic hist [0:15];
  int checks = 0, failures = 0;

  treatment_delay_chain #(.N_STAGES(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      start = ($urandom_range(3) == 0);
      @(posedge clk);
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = start;
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (stage[k] != hist[k]) begin failures++; $display("n=%0d stage %0d", n, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
