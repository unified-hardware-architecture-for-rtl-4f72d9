// tb_unified_cipher: end-to-end test of the unified AES-128 / Camellia-128 engine
// at its only size. It checks the published test vectors of FIPS-197 and
// RFC 3713, then random keys and blocks against the reference models of
// tb_ref_pkg, in both directions and with alternating ciphers. Every request's
// latency is checked, counting the accept clock: 31 clocks (AES), 22 clocks
// (Camellia), 12 and 7 clocks for the two key setups. A stream of blocks
// with start held high must complete one block every 31 / 22 clocks. Each mechanism of the design is counted and a
// mechanism that never occurs is a failure.
module tb_unified_cipher;
  import uc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_RANDOM = 40;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [1:0]   op = '0;
  logic         alg = 1'b0;
  logic [127:0] key_in = '0, data_in = '0;
  logic [127:0] data_out;
  logic         busy, done;

  int checks = 0, failures = 0;
  int n_aes_ks = 0, n_cam_ks = 0, n_aes_enc = 0, n_aes_dec = 0, n_cam_enc = 0, n_cam_dec = 0;
  int n_stream = 0;
  int n_alg_switch = 0, n_key_sbox = 0, n_fl = 0, n_whiten = 0, n_last = 0, n_swap = 0;
  logic prev_alg = 1'b0;

  unified_cipher u_dut (.*);

  always #5 clk = ~clk;

  // mechanism counters, observed on the control words
  always @(posedge clk) if (rst_n) begin
    if (u_dut.dp.op == DP_AES_KEY) n_key_sbox++;
    if (u_dut.dp.op == DP_FL && !u_dut.dp.fl_kadd) n_fl++;
    if (u_dut.dp.op == DP_FL && u_dut.dp.fl_kadd) n_whiten++;
    if (u_dut.dp.fl_swap) n_swap++;
    if ((u_dut.dp.op == DP_AES_H1) && u_dut.dp.aes_last) n_last++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(input logic [1:0] o, input logic a, input logic [127:0] k,
                     input logic [127:0] d, output logic [127:0] res);
    int cyc;
    @(negedge clk);
    start = 1'b1; op = o; alg = a; key_in = k; data_in = d;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;   // the accept clock
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    res = data_out;
    checks++;
    begin
      int exp_cyc;
      exp_cyc = (o == 2'd0) ? (a ? 7 : 12) : (a ? 22 : 31);
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL latency op=%0d alg=%0d: %0d clocks, expected %0d", o, a, cyc, exp_cyc);
      end
    end
    if (a != prev_alg) n_alg_switch++;
    prev_alg = a;
    case ({a, o})
      {1'b0, 2'd0}: n_aes_ks++;
      {1'b1, 2'd0}: n_cam_ks++;
      {1'b0, 2'd1}: n_aes_enc++;
      {1'b0, 2'd2}: n_aes_dec++;
      {1'b1, 2'd1}: n_cam_enc++;
      {1'b1, 2'd2}: n_cam_dec++;
      default: ;
    endcase
  endtask

  task automatic known(logic a, logic [127:0] k, logic [127:0] pt, logic [127:0] ct);
    logic [127:0] r;
    // the reference model itself must match the published vector
    check("model", a ? cam_crypt(k, pt, 0) : aes_enc(k, pt), ct);
    run(2'd0, a, k, '0, r);
    run(2'd1, a, k, pt, r);
    check(a ? "camellia enc vector" : "aes enc vector", r, ct);
    run(2'd2, a, k, ct, r);
    check(a ? "camellia dec vector" : "aes dec vector", r, pt);
  endtask

  // back-to-back blocks: start held high, a new block offered whenever idle
  task automatic stream(logic a, logic dec, logic [127:0] k, int n);
    logic [127:0] blk [];
    int i_acc, i_done, t, t_last;
    blk = new[n];
    for (int i = 0; i < n; i++) blk[i] = {$urandom, $urandom, $urandom, $urandom};
    i_acc = 0; i_done = 0; t = 0; t_last = -1;
    @(negedge clk);
    op = dec ? 2'd2 : 2'd1; alg = a; key_in = k;
    while (i_done < n) begin
      if (done) begin
        check("stream block", data_out, a ? cam_crypt(k, blk[i_done], dec)
                                          : (dec ? aes_dec(k, blk[i_done]) : aes_enc(k, blk[i_done])));
        if (t_last >= 0) begin
          checks++;
          if (t - t_last != (a ? 22 : 31)) begin
            failures++;
            $display("FAIL stream period %0d clocks", t - t_last);
          end
        end
        t_last = t;
        i_done++;
      end
      if (!busy && i_acc < n) begin
        start = 1'b1; data_in = blk[i_acc]; i_acc++;
      end else if (!busy) begin
        start = 1'b0;
      end
      @(negedge clk);
      t++;
    end
    start = 1'b0;
    n_stream++;
  endtask

  initial begin
    logic [127:0] k, d, r, e;
    logic a;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    known(1'b0, 128'h000102030405060708090a0b0c0d0e0f,
          128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    known(1'b1, 128'h0123456789abcdeffedcba9876543210,
          128'h0123456789abcdeffedcba9876543210, 128'h67673138549669730857065648eabe43);
    known(1'b0, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);

    for (int i = 0; i < N_RANDOM; i++) begin
      a = i[0];
      k = {$urandom, $urandom, $urandom, $urandom};
      run(2'd0, a, k, '0, r);
      for (int j = 0; j < 2; j++) begin
        d = {$urandom, $urandom, $urandom, $urandom};
        e = a ? cam_crypt(k, d, 0) : aes_enc(k, d);
        run(2'd1, a, k, d, r);
        check("random enc", r, e);
        run(2'd2, a, k, r, r);
        check("random dec", r, d);
        e = a ? cam_crypt(k, d, 1) : aes_dec(k, d);
        run(2'd2, a, k, d, r);
        check("random dec vs model", r, e);
      end
    end

    for (int s = 0; s < 4; s++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      run(2'd0, s[1], k, '0, r);
      stream(s[1], s[0], k, 6);
    end

    // every mechanism must have occurred
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_aes_ks, n_cam_ks, n_aes_enc, n_aes_dec, n_cam_enc, n_cam_dec,
              n_alg_switch, n_key_sbox, n_fl, n_whiten, n_last, n_swap, n_stream};
      nm  = '{"aes key setup", "camellia key setup", "aes encrypt", "aes decrypt",
              "camellia encrypt", "camellia decrypt", "cipher switch", "key schedule on S-boxes",
              "FL/FL^-1 layer", "whitening / key add", "AES final round bypass", "final swap", "back-to-back stream"};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-26s : %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", nm[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
