// tb_memorization_address: every position of the 164 x 123 corrected image;
// checks the address U*123 + V and that all addresses are distinct and
// below 20172.
module tb_memorization_address;
  logic [7:0] U_in, V_in;
  logic [14:0] adresse;
  int checks = 0, failures = 0;
  bit seen [20172];

  memorization_address dut (.*);

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int u = 0; u < 164; u++)
      for (int v = 0; v < 123; v++) begin
        U_in = 8'(u); V_in = 8'(v);
        #1;
        checks++;
        if (int'(adresse) != u * 123 + v || adresse >= 15'd20172 || seen[adresse]) begin
          failures++; $display("(%0d,%0d) -> %0d", u, v, adresse);
        end else seen[adresse] = 1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
