// tb_address_shift_manager: loads three random addresses, rotates, and checks
// that the output gives ad1, ad2, ad3 and then ad1 again, that it holds
// without rotate and that load wins over rotate.
module tb_address_shift_manager;
  logic clk = 0, rst = 1, load = 0, rotate = 0;
  logic [14:0] ad1 = 0, ad2 = 0, ad3 = 0, adresse_mem;
  logic [14:0] seq [3];
  int checks = 0, failures = 0;

  address_shift_manager dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic [14:0] e);
    checks++;
    if (adresse_mem !== e) begin failures++; $display("got %0d expected %0d", adresse_mem, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      seq[0] = 15'($urandom); seq[1] = 15'($urandom); seq[2] = 15'($urandom);
      ad1 = seq[0]; ad2 = seq[1]; ad3 = seq[2];
      load = 1; rotate = (n % 2 == 0);
      @(negedge clk); load = 0; rotate = 0;
      ad1 = 15'($urandom); ad2 = 15'($urandom); ad3 = 15'($urandom);
      expect_out(seq[0]);
      @(negedge clk); expect_out(seq[0]);   // no rotate: held
      for (int r = 1; r <= 4; r++) begin
        rotate = 1;
        @(negedge clk); rotate = 0;
        expect_out(seq[r % 3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
