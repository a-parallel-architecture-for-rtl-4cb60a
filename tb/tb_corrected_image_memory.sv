// tb_corrected_image_memory: writes random grey values at random addresses
// (including addresses beyond the 20172-word image, which must be dropped)
// and reads random addresses back with one cycle of latency.
module tb_corrected_image_memory;
  localparam int DEPTH = 20172;
  logic clk = 0, we = 0;
  logic [14:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  corrected_image_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    for (int n = 0; n < 20000; n++) begin
      int a, r;
      a = (n % 8 == 7) ? $urandom_range(32767, DEPTH) : $urandom_range(DEPTH - 1);
      r = $urandom_range(DEPTH - 1);
      @(negedge clk); we = 1; waddr = 15'(a); wdata = 8'($urandom); raddr = 15'(r);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[r]) begin failures++; $display("read %0d got %h expected %h", r, rdata, model[r]); end
      if (a < DEPTH) model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < DEPTH; r += 7) begin
      @(negedge clk); raddr = 15'(r);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[r]) begin failures++; $display("final read %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
