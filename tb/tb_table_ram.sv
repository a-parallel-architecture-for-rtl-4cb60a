// tb_table_ram: fills a 4096 x 16 RAM with random words, reads them back in
// random order and checks the one-cycle read latency and read-during-write
// (old word returned).
module tb_table_ram;
  localparam int DEPTH = 4096;
  logic clk = 0, we = 0;
  logic [11:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  table_ram #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = 12'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); addr = 12'(a); we = ($urandom_range(7) == 0); wdata = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("addr %0d got %h expected %h", a, rdata, model[a]); end
      if (we) model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
