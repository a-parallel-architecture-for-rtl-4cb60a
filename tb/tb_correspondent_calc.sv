// tb_correspondent_calc: random reduced positions and sign-magnitude
// displacements; checks U and V against integer arithmetic modulo 256.
module tb_correspondent_calc;
  import rectif_pkg::*;
  logic [7:0] i_reduit, j_reduit, U, V;
  disp_t delta_u, delta_v;
  int checks = 0, failures = 0;
  int eu, ev;

  correspondent_calc dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      i_reduit = 8'($urandom_range(163));
      j_reduit = 8'($urandom_range(122));
      delta_u  = disp_t'(8'($urandom));
      delta_v  = disp_t'(8'($urandom));
      #1;
      eu = int'(i_reduit) + (delta_u.neg ? -int'(delta_u.mag) : int'(delta_u.mag));
      ev = int'(j_reduit) + (delta_v.neg ? -int'(delta_v.mag) : int'(delta_v.mag));
      checks++;
      if (U != 8'(eu) || V != 8'(ev)) begin
        failures++; $display("(%0d,%0d)+(%h,%h) got (%0d,%0d) expected (%0d,%0d)", i_reduit, j_reduit, delta_u, delta_v, U, V, eu, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
