// tb_unified_perm: random test of the shared permutation layer. MixColumns
// and InvMixColumns are checked column by column against GF(2^8) matrix
// products, the P-function against Camellia's byte equations.
module tb_unified_perm;
  import uc_pkg::*;
  import tb_ref_pkg::*;
  logic [63:0] x, y;
  perm_mode_e  mode;
  int checks = 0, failures = 0;

  unified_perm u_dut (.x(x), .mode(mode), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(string what, logic [63:0] e);
    checks++;
    if (y != e) begin
      failures++;
      $display("FAIL %s x=%016h y=%016h expected %016h", what, x, y, e);
    end
  endtask

  initial begin
    // FIPS-197 MixColumns example column db 13 53 45 -> 8e 4d a1 bc
    x = 64'hdb135345_f20a225c; mode = PM_MC; #1;
    expect_y("mc example", 64'h8e4da1bc_9fdc589d);
    for (int i = 0; i < 2000; i++) begin
      x = {$urandom, $urandom};
      if (i < 8) x = 64'(1) << (8 * i);   // single-byte inputs first
      mode = PM_MC;  #1; expect_y("mc",  {mixcol(x[63:32], 0), mixcol(x[31:0], 0)});
      mode = PM_IMC; #1; expect_y("imc", {mixcol(x[63:32], 1), mixcol(x[31:0], 1)});
      mode = PM_P;   #1; expect_y("p",   cam_p(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
