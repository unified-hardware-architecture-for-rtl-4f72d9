// tb_flinv_kw: random test of the merged FL^-1 / key-whitening unit: the FL^-1 function
// against Camellia's definition, key addition (sel_kadd) against x ^ kl, and
// pass-through with en low.
module tb_flinv_kw;
  import tb_ref_pkg::*;
  logic [63:0] x, kl, y;
  logic        en, sel_kadd;
  int checks = 0, failures = 0;

  flinv_kw u_dut (.x(x), .kl(kl), .en(en), .sel_kadd(sel_kadd), .y(y));

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
      $display("FAIL %s x=%016h kl=%016h y=%016h expected %016h", what, x, kl, y, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x  = {$urandom, $urandom};
      kl = {$urandom, $urandom};
      en = 1'b1; sel_kadd = 1'b0; #1; expect_y("FL^-1", cam_flinv(x, kl));
      en = 1'b1; sel_kadd = 1'b1; #1; expect_y("key add", x ^ kl);
      en = 1'b0; sel_kadd = 1'(i); #1; expect_y("pass", x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
