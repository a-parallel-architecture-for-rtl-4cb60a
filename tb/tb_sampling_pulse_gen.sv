// tb_sampling_pulse_gen: streams the first 16 lines of a default-size frame
// (492 columns, F = 16) and checks that the impulse falls exactly on the
// pixels with P mod 16 = 15, once every 16 cycles, that every 4 x 4 window of
// those lines gets exactly one impulse, and that the pixel index counts
// 0, 1, 2, ... after each impulse.
module tb_sampling_pulse_gen;
  localparam int NC = 492, F = 16, LINES = 16;
  logic clk = 0, rst = 1, frame_start = 0, pix_valid = 0;
  logic [9:0] line;
  logic [8:0] col;
  logic sample;
  logic [14:0] pixel_index;
  int checks = 0, failures = 0;
  int hits [LINES/4][NC/4];
  int k, last_t, t;

  sampling_pulse_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits[a, b]) hits[a][b] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    k = 0; last_t = -1; t = 0;
    for (int l = 0; l < LINES; l++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        pix_valid = 1; frame_start = (l == 0 && c == 0);
        line = 10'(l); col = 9'(c);
        #1;
        checks++;
        if (sample != (((l * NC + c) % F) == F - 1)) begin
          failures++; $display("impulse wrong at (%0d,%0d)", l, c);
        end
        if (sample) begin
          hits[l/4][c/4]++;
          if (last_t >= 0) begin
            checks++;
            if (t - last_t != F) begin failures++; $display("interval %0d", t - last_t); end
          end
          last_t = t;
        end
        @(posedge clk); #1;
        if (sample) ;
        if (((l * NC + c) % F) == F - 1) begin
          checks++;
          if (pixel_index != 15'(k)) begin failures++; $display("index %0d expected %0d", pixel_index, k); end
          k++;
        end
        t++;
      end
    foreach (hits[a, b]) begin
      checks++;
      if (hits[a][b] != 1) begin failures++; $display("window (%0d,%0d) hit %0d times", a, b, hits[a][b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
