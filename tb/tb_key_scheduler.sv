// tb_key_scheduler: tests the key scheduler on its own. The datapath S-boxes
// are replaced by the testbench's AES S-box table on sb_out -> sb_in.
// AES: ten forward steps from a random key must give K1..K10 of the FIPS-197
// expansion; K10 is stored in K2, reloaded, and ten backward steps must give
// K9..K0. Camellia: with KA supplied on dp_state and stored, every schedule
// step in both directions must select the right F-function key (k64) and
// FL / whitening key (kl128); the Sigma constants are checked too.
module tb_key_scheduler;
  import uc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  ks_ctrl_t     ctrl;
  alg_e         alg;
  logic [127:0] key_in, dp_state, rk, kl128;
  logic [31:0]  sb_in, sb_out;
  logic [63:0]  k64;
  int checks = 0, failures = 0;

  key_scheduler u_dut (.*);

  always #5 clk = ~clk;
  always_comb sb_in = {AES_SB[sb_out[31:24]], AES_SB[sb_out[23:16]],
                       AES_SB[sb_out[15:8]], AES_SB[sb_out[7:0]]};

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] key, ka, exp_rk [11];
    logic [63:0] kw [1:4];
    logic [63:0] k  [1:18];
    logic [63:0] ke [1:4];
    ref_init();
    ctrl = '0; alg = ALG_AES; key_in = '0; dp_state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      aes_expand(key, exp_rk);
      if (t == 0) chk("fips-197 K10", exp_rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      // AES forward
      alg = ALG_AES;
      @(negedge clk);
      ctrl = '0; ctrl.load_kl = 1'b1; ctrl.rk_init = 1'b1; key_in = key;
      @(negedge clk);
      chk("K0", rk, exp_rk[0]);
      chk("kl128 = rk", kl128, exp_rk[0]);
      for (int r = 1; r <= 10; r++) begin
        ctrl = '0; ctrl.rk_step = 1'b1; ctrl.rcon_idx = 4'(r);
        @(negedge clk);
        chk($sformatf("K%0d fwd", r), rk, exp_rk[r]);
      end
      ctrl = '0; ctrl.store_k2 = 1'b1;
      @(negedge clk);
      ctrl = '0; ctrl.rk_init = 1'b1; ctrl.rk_from_k2 = 1'b1;
      @(negedge clk);
      chk("K10 from K2", rk, exp_rk[10]);
      ctrl = '0; ctrl.kl_is_k2 = 1'b1; #1;
      chk("kl128 = K2", kl128, exp_rk[10]);
      ctrl = '0; ctrl.kl_is_kl = 1'b1; #1;
      chk("kl128 = KL", kl128, exp_rk[0]);
      ctrl = '0;
      for (int r = 9; r >= 0; r--) begin
        ctrl = '0; ctrl.rk_step = 1'b1; ctrl.rk_bwd = 1'b1; ctrl.rcon_idx = 4'(r + 1);
        @(negedge clk);
        chk($sformatf("K%0d bwd", r), rk, exp_rk[r]);
      end
      // Camellia
      alg = ALG_CAMELLIA;
      ka = cam_ka(key);
      cam_keys(key, kw, k, ke);
      ctrl = '0; ctrl.load_kl = 1'b1; key_in = key;
      @(negedge clk);
      ctrl = '0; ctrl.store_k2 = 1'b1; ctrl.k2_from_dp = 1'b1; dp_state = ka;
      @(negedge clk);
      ctrl = '0; dp_state = '0;
      for (int i = 0; i < 4; i++) begin
        ctrl.sigma_en = 1'b1; ctrl.sigma_idx = 2'(i); #1;
        chk("sigma", {64'h0, k64}, {64'h0, CAM_SIGMA[i]});
      end
      ctrl = '0; ctrl.kl_is_kl = 1'b1; #1;
      chk("kl for KA", kl128, key);
      for (int dec = 0; dec < 2; dec++) begin
        int j;
        j = 0;
        for (int s = 0; s < 22; s++) begin
          ctrl = '0; ctrl.cam_step = 5'(s); ctrl.cam_dec = 1'(dec); #1;
          if (s == 0)       chk("kw first", kl128, dec ? {kw[3], kw[4]} : {kw[1], kw[2]});
          else if (s == 21) chk("kw last",  kl128, dec ? {kw[1], kw[2]} : {kw[3], kw[4]});
          else if (s == 7)  chk("ke 1",     kl128, dec ? {ke[4], ke[3]} : {ke[1], ke[2]});
          else if (s == 14) chk("ke 2",     kl128, dec ? {ke[2], ke[1]} : {ke[3], ke[4]});
          else begin
            j++;
            chk($sformatf("k%0d", j), {64'h0, k64}, {64'h0, dec ? k[19 - j] : k[j]});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
