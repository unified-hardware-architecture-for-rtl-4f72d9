// tb_cipher_datapath: drives the ciphering datapath one operation at a time
// and checks each against the reference models: load, Camellia Feistel round,
// FL / FL^-1 layer, whitening with and without the half swap or taken
// straight from the data input, an AES
// encryption and decryption round (normal and final) made of the two column
// halves, and the S-box service for the key expansion.
module tb_cipher_datapath;
  import uc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  dp_ctrl_t     ctrl;
  logic [127:0] data_in, key_in, rk, kl128, state;
  logic [63:0]  k64;
  logic [31:0]  sb_in, sb_out;
  int checks = 0, failures = 0;

  cipher_datapath u_dut (.*);

  always #5 clk = ~clk;

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

  task automatic step(dp_ctrl_t c);
    ctrl = c;
    @(negedge clk);
    ctrl = '0;
  endtask

  task automatic load(logic [127:0] v);
    dp_ctrl_t c;
    c = '0; c.op = DP_LOAD; data_in = v;
    step(c);
    chk("load", state, v);
  endtask

  // one AES round on the reference side
  function automatic logic [127:0] aes_round(logic [127:0] s, logic [127:0] k, bit dec, bit last);
    logic [127:0] t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[127 - 8*(4*c + r) -: 8] = dec ? AES_ISB[byte_of(s, 4*((c - r + 4) % 4) + r)]
                                        : AES_SB[byte_of(s, 4*((c + r) % 4) + r)];
    if (dec) t ^= k;
    if (!last) for (int c = 0; c < 4; c++) t[127 - 32*c -: 32] = mixcol(t[127 - 32*c -: 32], dec);
    if (!dec) t ^= k;
    return t;
  endfunction

  initial begin
    logic [127:0] v, e;
    dp_ctrl_t c;
    ref_init();
    ctrl = '0; data_in = '0; key_in = '0; rk = '0; kl128 = '0; k64 = '0; sb_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      // Camellia round
      load(v);
      k64 = {$urandom, $urandom};
      c = '0; c.op = DP_FROUND; step(c);
      chk("feistel round", state, {v[63:0] ^ cam_F(v[127:64], k64), v[127:64]});
      // FL layer
      load(v);
      kl128 = {$urandom, $urandom, $urandom, $urandom};
      c = '0; c.op = DP_FL; c.fl_en = 1'b1; step(c);
      chk("FL layer", state, {cam_fl(v[127:64], kl128[127:64]), cam_flinv(v[63:0], kl128[63:0])});
      // whitening, plain and swapped
      load(v);
      c = '0; c.op = DP_FL; c.fl_en = 1'b1; c.fl_kadd = 1'b1; step(c);
      chk("whitening", state, v ^ kl128);
      load(v);
      c.fl_swap = 1'b1; step(c);
      chk("swap whitening", state, {v[63:0], v[127:64]} ^ kl128);
      // load and whiten in one clock
      load(~v);
      data_in = v;
      c = '0; c.op = DP_FL; c.fl_en = 1'b1; c.fl_kadd = 1'b1; c.fl_from_in = 1'b1; step(c);
      chk("whitening from input", state, v ^ kl128);
      // hold
      c = '0; c.op = DP_HOLD; e = state; step(c);
      chk("hold", state, e);
      // AES rounds: encryption / decryption, normal / final
      for (int m = 0; m < 4; m++) begin
        load(v);
        rk = {$urandom, $urandom, $urandom, $urandom};
        c = '0; c.aes_dec = m[0]; c.aes_last = m[1];
        c.op = DP_AES_H0; step(c);
        chk("state kept after half 0", state, v);
        c.aes_dec = m[0]; c.aes_last = m[1];
        c.op = DP_AES_H1; step(c);
        chk($sformatf("aes round dec=%0d last=%0d", m[0], m[1]), state, aes_round(v, rk, m[0], m[1]));
      end
      // key-expansion S-box service
      sb_in = $urandom;
      c = '0; c.op = DP_AES_KEY; ctrl = c; #1;
      chk("key sbox", {96'h0, sb_out},
          {96'h0, AES_SB[sb_in[31:24]], AES_SB[sb_in[23:16]], AES_SB[sb_in[15:8]], AES_SB[sb_in[7:0]]});
      e = state;
      @(negedge clk);
      ctrl = '0;
      chk("key op holds state", state, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
