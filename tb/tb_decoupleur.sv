// tb_decoupleur: random correspondent words; checks the registered sign and
// magnitude of both displacements and that they hold while en is low.
module tb_decoupleur;
  import rectif_pkg::*;
  logic clk = 0, en = 0;
  logic [15:0] my_data_in = 0;
  disp_t delta_u, delta_v;
  int checks = 0, failures = 0;
  logic [15:0] last;

  decoupleur dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); en = 1; my_data_in = 16'h0000; last = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (en) last = my_data_in;
      checks++;
      // delta_u: bit 15 sign, 14..8 magnitude; delta_v: bit 7 sign, 6..0 magnitude
      if (delta_u.neg != last[15] || delta_u.mag != last[14:8] ||
          delta_v.neg != last[7]  || delta_v.mag != last[6:0]) begin
        failures++; $display("word %h got u=%b/%0d v=%b/%0d", last, delta_u.neg, delta_u.mag, delta_v.neg, delta_v.mag);
      end
      en = ($urandom_range(2) != 0);
      my_data_in = 16'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
