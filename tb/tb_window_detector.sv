// tb_window_detector: a 12 x 20 image reduced by 4 x 4 (15 windows). Checks
// that every window yields exactly one retained pixel per frame, that the
// held (u_red, v_red) name the window of the retained pixel, that the grey
// value is the retained pixel's, that the indices run 0..14, and that the
// windows of the first reduced line come in the order 4, 3, 2, 1, 5
// (1-based) that the sampling rule P mod 16 = 15 produces for 20 columns.
// Two frames are streamed, the second with gaps in pix_valid.
module tb_window_detector;
  import rectif_pkg::*;
  localparam int NL = 12, NC = 20;
  logic clk = 0, rst = 1, frame_start = 0, pix_valid = 0;
  logic [9:0] line;
  logic [8:0] col;
  logic [7:0] grey;
  logic sample_o;
  red_pix_t red;
  int checks = 0, failures = 0;
  int hits [NL/4][NC/4];
  int k, first_line_order [5];
  int exp_order [5] = '{3, 2, 1, 0, 4};
  int last_l, last_c;

  window_detector #(.NL(NL), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] grey_of(int l, int c);
    return 8'(l * 37 + c * 11 + 5);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watch the held values one cycle after each impulse.
  always @(posedge clk) begin
    if (!rst && red.valid) begin
      checks++;
      if (red.u_red != 8'(last_l / 4) || red.v_red != 8'(last_c / 4) ||
          red.grey != grey_of(last_l, last_c) || red.index != 15'(k)) begin
        failures++;
        $display("held (%0d,%0d,%0d,%0d) for pixel (%0d,%0d) index %0d", red.u_red, red.v_red, red.grey, red.index, last_l, last_c, k);
      end
      if (k < 5) first_line_order[k] = int'(red.v_red);
      hits[red.u_red][red.v_red]++;
      k++;
    end
  end

  initial begin
    line = 0; col = 0; grey = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int fr = 0; fr < 2; fr++) begin
      foreach (hits[a, b]) hits[a][b] = 0;
      k = 0;
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < NC; c++) begin
          if (fr == 1) while ($urandom_range(2) == 0) begin
            @(negedge clk); pix_valid = 0; frame_start = 0;
          end
          @(negedge clk);
          pix_valid = 1; frame_start = (l == 0 && c == 0); grey = grey_of(l, c);
          #1;
          checks++;
          if (line != 10'(l) || col != 9'(c)) begin failures++; $display("counter mismatch"); end
          if (sample_o) begin last_l = l; last_c = c; end
        end
      @(negedge clk); pix_valid = 0; frame_start = 0;
      repeat (3) @(negedge clk);
      foreach (hits[a, b]) begin
        checks++;
        if (hits[a][b] != 1) begin failures++; $display("window (%0d,%0d) %0d hits", a, b, hits[a][b]); end
      end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (first_line_order[i] != exp_order[i]) begin failures++; $display("order[%0d]=%0d", i, first_line_order[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_column_counter #(.NL(NL), .NC(NC)) u_cnt (.clk, .rst, .frame_start, .pix_valid, .line, .col);
endmodule
