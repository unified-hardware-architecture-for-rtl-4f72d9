// tb_cipher_ctrl: checks the sequence of control words the controller issues
// for each request: length counting the accept clock (31 / 22 / 12 / 7
// clocks), the number of each datapath operation, the first AddRoundKey done
// in the accept clock from the data input, the final-round flag of AES,
// the whitening / FL / swap positions of Camellia, the round-constant order of
// the AES key steps, and that a request during busy is ignored.
module tb_cipher_ctrl;
  import uc_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e      op;
  alg_e     alg;
  dp_ctrl_t dp;
  ks_ctrl_t ks;
  alg_e     alg_cur;
  logic     busy, done;
  int checks = 0, failures = 0;

  cipher_ctrl u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic req(op_e o, alg_e a);
    int cyc, n_fl, n_kadd, n_fr, n_key, n_h0, n_h1, n_last, n_swap, n_sigma, n_store;
    int rc_ok;
    string tag;
    tag = $sformatf("%s/%s", a.name(), o.name());
    @(negedge clk);
    start = 1'b1; op = o; alg = a;
    #1;
    if (o == OP_KEYSETUP) begin
      chk({tag, " key load on accept"}, int'(dp.op == DP_LOAD && dp.load_key && ks.load_kl), 1);
    end else begin
      chk({tag, " key add from input on accept"},
          int'(dp.op == DP_FL && dp.fl_from_in && dp.fl_kadd && dp.fl_en && ks.rk_init), 1);
      chk({tag, " alg on accept"}, int'(alg_cur), int'(a));
      if (a == ALG_AES) begin
        chk({tag, " first key"}, int'({ks.kl_is_kl, ks.kl_is_k2}), (o == OP_DECRYPT) ? 1 : 2);
      end else begin
        chk({tag, " whitening step"}, int'(ks.cam_step), 0);
        chk({tag, " whitening direction"}, int'(ks.cam_dec), int'(o == OP_DECRYPT));
      end
    end
    @(negedge clk);
    op = (o == OP_ENCRYPT) ? OP_DECRYPT : OP_ENCRYPT;   // ignored while busy
    {cyc, n_fl, n_kadd, n_fr, n_key, n_h0, n_h1, n_last, n_swap, n_sigma, n_store} = '0;
    rc_ok = 1;
    while (busy) begin
      if (dp.op == DP_FL) n_fl++;
      if (dp.op == DP_FL && dp.fl_kadd) n_kadd++;
      if (dp.op == DP_FROUND) n_fr++;
      if (dp.op == DP_AES_KEY) begin
        n_key++;
        if (o == OP_DECRYPT && ks.rcon_idx != 4'(11 - n_key)) rc_ok = 0;
        if (o != OP_DECRYPT && ks.rcon_idx != 4'(n_key)) rc_ok = 0;
        if (ks.rk_bwd != (o == OP_DECRYPT)) rc_ok = 0;
      end
      if (dp.op == DP_AES_H0) n_h0++;
      if (dp.op == DP_AES_H1) n_h1++;
      if (dp.op == DP_AES_H1 && dp.aes_last) n_last++;
      if (dp.op == DP_AES_H1 && dp.aes_last) chk({tag, " last round is round 10"}, n_h1, 10);
      if (dp.fl_swap) chk({tag, " swap on final clock"}, cyc, 20);
      if (a == ALG_CAMELLIA && o != OP_KEYSETUP && dp.op == DP_FL && !dp.fl_kadd)
        chk({tag, " FL step number"}, int'(ks.cam_step == 5'd7 || ks.cam_step == 5'd14), 1);
      if (a == ALG_CAMELLIA && o != OP_KEYSETUP && dp.op == DP_FROUND)
        chk({tag, " round step number"}, int'(ks.cam_step), cyc + 1);
      if (ks.sigma_en) n_sigma++;
      if (ks.store_k2) n_store++;
      cyc++;
      @(negedge clk);
      start = 1'b0;
    end
    chk({tag, " done after busy"}, int'(done), 1);
    chk({tag, " alg latched"}, int'(alg_cur), int'(a));
    unique case ({a, o})
      {ALG_AES, OP_ENCRYPT}, {ALG_AES, OP_DECRYPT}: begin
        chk({tag, " clocks"}, cyc + 1, 31);
        chk({tag, " key steps"}, n_key, 10);
        chk({tag, " half 0"}, n_h0, 10);
        chk({tag, " half 1"}, n_h1, 10);
        chk({tag, " final rounds"}, n_last, 1);
        chk({tag, " no key add after accept"}, n_kadd, 0);
        chk({tag, " rcon order"}, rc_ok, 1);
      end
      {ALG_CAMELLIA, OP_ENCRYPT}, {ALG_CAMELLIA, OP_DECRYPT}: begin
        chk({tag, " clocks"}, cyc + 1, 22);
        chk({tag, " feistel rounds"}, n_fr, 18);
        chk({tag, " FL clocks"}, n_fl, 3);
        chk({tag, " final whitening"}, n_kadd, 1);
      end
      {ALG_AES, OP_KEYSETUP}: begin
        chk({tag, " clocks"}, cyc + 1, 12);
        chk({tag, " key steps"}, n_key, 10);
        chk({tag, " store"}, n_store, 1);
        chk({tag, " rcon order"}, rc_ok, 1);
      end
      default: begin
        chk({tag, " clocks"}, cyc + 1, 7);
        chk({tag, " sigma rounds"}, n_sigma, 4);
        chk({tag, " feistel rounds"}, n_fr, 4);
        chk({tag, " KL add"}, n_kadd, 1);
        chk({tag, " store"}, n_store, 1);
      end
    endcase
    @(negedge clk);
    chk({tag, " done is a pulse"}, int'(done), 0);
  endtask

  initial begin
    op = OP_ENCRYPT; alg = ALG_AES;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      req(OP_KEYSETUP, ALG_AES);
      req(OP_ENCRYPT, ALG_AES);
      req(OP_DECRYPT, ALG_AES);
      req(OP_KEYSETUP, ALG_CAMELLIA);
      req(OP_ENCRYPT, ALG_CAMELLIA);
      req(OP_DECRYPT, ALG_CAMELLIA);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
