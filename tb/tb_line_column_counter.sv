// tb_line_column_counter: checks the column / line counters of a small image
// (5 lines x 7 columns) against a software count, with random gaps in
// pix_valid and a frame restart in the middle of a frame.
module tb_line_column_counter;
  localparam int NL = 5, NC = 7;
  logic clk = 0, rst = 1, frame_start = 0, pix_valid = 0;
  logic [9:0] line;
  logic [8:0] col;
  int checks = 0, failures = 0;
  int exp_l, exp_c;

  line_column_counter #(.NL(NL), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    exp_l = 0; exp_c = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      frame_start = (n == 0) || (n == 211);
      pix_valid   = frame_start || ($urandom_range(3) != 0);
      if (frame_start) begin exp_l = 0; exp_c = 0; end
      #1;
      if (pix_valid) begin
        checks++;
        if (line != 10'(exp_l) || col != 9'(exp_c)) begin
          failures++;
          $display("n=%0d got (%0d,%0d) expected (%0d,%0d)", n, line, col, exp_l, exp_c);
        end
        exp_c++;
        if (exp_c == NC) begin exp_c = 0; exp_l = (exp_l + 1) % NL; end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
