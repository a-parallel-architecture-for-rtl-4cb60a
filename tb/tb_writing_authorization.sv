// tb_writing_authorization: starts writing phases for active and passive
// pixels every 16 cycles and checks that an active pixel gives exactly three
// write enables on the start cycle and the two after it, a passive one none.
module tb_writing_authorization;
  logic clk = 0, rst = 1, start = 0, active = 0;
  logic we, rot, busy;
  int checks = 0, failures = 0, n_act = 0, n_pas = 0;

  writing_authorization dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 600; n++) begin
      logic a;
      a = 1'($urandom);
      if (a) n_act++; else n_pas++;
      start = 1; active = a;
      for (int c = 0; c < 16; c++) begin
        #1;
        checks++;
        if (we != (a && c < 3) || rot != we || busy != we) begin
          failures++; $display("pixel %0d active %b cycle %0d: we=%b", n, a, c, we);
        end
        @(negedge clk); start = 0; active = 1'($urandom);
      end
    end
    checks++;
    if (n_act == 0 || n_pas == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
