// tb_reduced_coord_blocker: random positions and grey values every cycle,
// random sampling impulses; checks that the held reduced position equals the
// position divided by 4 at the last impulse and does not move in between.
module tb_reduced_coord_blocker;
  logic clk = 0, rst = 1, sample = 0;
  logic [9:0] line;
  logic [8:0] col;
  logic [7:0] grey, u_red, v_red, grey_held;
  logic valid;
  int checks = 0, failures = 0;
  int eu = 0, ev = 0, eg = 0, ev_valid = 0;

  reduced_coord_blocker dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line = 0; col = 0; grey = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      line   = 10'($urandom_range(655));
      col    = 9'($urandom_range(491));
      grey   = 8'($urandom);
      sample = ($urandom_range(15) == 0);
      @(posedge clk);
      ev_valid = sample;
      if (sample) begin eu = line / 4; ev = col / 4; eg = grey; end
      @(negedge clk);
      checks++;
      if (u_red != 8'(eu) || v_red != 8'(ev) || grey_held != 8'(eg) || valid != ev_valid[0]) begin
        failures++;
        $display("n=%0d got %0d %0d %0d %0d expected %0d %0d %0d %0d", n, u_red, v_red, grey_held, valid, eu, ev, eg, ev_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
