// tb_unified_sbox: exhaustive test of the unified S-box in all six modes
// against tables computed from the AES and Camellia definitions, plus the
// first 32 entries of Camellia's published s1 table.
module tb_unified_sbox;
  import uc_pkg::*;
  import tb_ref_pkg::*;
  logic [7:0] x, y;
  sbox_mode_e mode;
  int checks = 0, failures = 0;

  localparam logic [7:0] S1_PUB [32] = '{
    8'h70, 8'h82, 8'h2c, 8'hec, 8'hb3, 8'h27, 8'hc0, 8'he5,
    8'he4, 8'h85, 8'h57, 8'h35, 8'hea, 8'h0c, 8'hae, 8'h41,
    8'h23, 8'hef, 8'h6b, 8'h93, 8'h45, 8'h19, 8'ha5, 8'h21,
    8'hed, 8'h0e, 8'h4f, 8'h4e, 8'h1d, 8'h65, 8'h92, 8'hbd};

  unified_sbox u_dut (.x(x), .mode(mode), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(logic [7:0] e);
    checks++;
    if (y != e) begin
      failures++;
      $display("FAIL mode %s x=%02h y=%02h expected %02h", mode.name(), x, y, e);
    end
  endtask

  initial begin
    ref_init();
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      mode = SB_AES_ENC; #1; expect_y(AES_SB[i]);
      mode = SB_AES_DEC; #1; expect_y(AES_ISB[i]);
      mode = SB_CAM1;    #1; expect_y(cam_s(1, x));
      if (i < 32) expect_y(S1_PUB[i]);
      mode = SB_CAM2;    #1; expect_y(cam_s(2, x));
      mode = SB_CAM3;    #1; expect_y(cam_s(3, x));
      mode = SB_CAM4;    #1; expect_y(cam_s(4, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
