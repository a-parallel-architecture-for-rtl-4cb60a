// tb_correspondents_tables: loads the three 16384-word correspondents tables
// with different random words, then reads random addresses and checks that
// all three words arrive one cycle later and stay held until the next read.
module tb_correspondents_tables;
  import rectif_pkg::*;
  logic clk = 0, rd_en = 0;
  logic [13:0] addr = 0, ld_addr = 0;
  logic [2:0] ld_we = 0;
  logic [15:0] ld_data = 0;
  logic [2:0][15:0] corr;
  logic [15:0] model [3][DEPTH_C];
  int checks = 0, failures = 0;

  correspondents_tables dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < int'(DEPTH_C); i++) begin
        @(negedge clk); ld_we = 3'(1 << m); ld_addr = 14'(i); ld_data = 16'($urandom); model[m][i] = ld_data;
      end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(DEPTH_C - 1);
      @(negedge clk); rd_en = 1; addr = 14'(a);
      @(negedge clk); rd_en = 0; addr = 14'($urandom);
      for (int h = 0; h < 2; h++) begin
        for (int m = 0; m < 3; m++) begin
          checks++;
          if (corr[m] != model[m][a]) begin failures++; $display("mem%0d addr %0d got %h expected %h", m + 1, a, corr[m], model[m][a]); end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
