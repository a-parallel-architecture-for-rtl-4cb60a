// tb_address_table: loads random words into the whole 20480-word address
// table (RAM_G and RAM_P), then reads random indices with the channel's
// timing (rd_en in cycle t, sel_en in t+1) and checks the active bit and the
// correspondents address in cycle t+2, including indices above 16383 that
// live in RAM_P.
module tb_address_table;
  import rectif_pkg::*;
  localparam int DEPTH = DEPTH_G + DEPTH_P;
  logic clk = 0, rst = 1, rd_en = 0, sel_en = 0, ld_we = 0;
  logic [14:0] index = 0, ld_addr = 0;
  logic [15:0] ld_data = 0;
  logic active;
  logic [13:0] corr_addr;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0, n_p = 0;

  address_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 15'(i); ld_data = 16'($urandom); model[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 4000; n++) begin
      int a;
      a = (n % 2) ? $urandom_range(DEPTH - 1, DEPTH_G) : $urandom_range(DEPTH - 1);
      if (a >= int'(DEPTH_G)) n_p++;
      @(negedge clk); rd_en = 1; index = 15'(a);
      @(negedge clk); rd_en = 0; sel_en = 1; index = 15'($urandom);
      @(negedge clk); sel_en = 0;
      checks++;
      if (active != model[a][15] || corr_addr != model[a][13:0]) begin
        failures++; $display("index %0d got %b/%h expected %h", a, active, corr_addr, model[a]);
      end
    end
    checks++;
    if (n_p == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
