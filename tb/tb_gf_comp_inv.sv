// tb_gf_comp_inv: exhaustive test of the GF((2^4)^2) inverter. For every
// input c != 0 the product c * inv(c), computed with the testbench's own
// composite-field multiplier, must be 1; zero must map to zero.
module tb_gf_comp_inv;
  import tb_ref_pkg::*;
  logic [7:0] c, ci;
  int checks = 0, failures = 0;

  gf_comp_inv u_dut (.c(c), .c_inv(ci));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      c = 8'(i);
      #1;
      checks++;
      if ((i == 0 && ci != 8'h00) || (i != 0 && cmul(c, ci) != 8'h01)) begin
        failures++;
        $display("FAIL inv(%02h) = %02h", c, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
