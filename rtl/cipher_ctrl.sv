// cipher_ctrl: sequencer of the unified AES-128 / Camellia-128 engine.
//
// A request (start with op and alg) is accepted only when idle. For an
// encryption or decryption the accept clock already does the first step: the
// block from data_in is whitened (Camellia) or given its first AddRoundKey
// (AES) in the FL units, while the AES round-key register is initialised.
// The engine then runs with busy high and pulses done in the clock after the
// last one, which is also the earliest clock that accepts the next request;
// the result is on the state output from done until the next request.
// Clocks per request, accept clock included:
//   AES encrypt / decrypt    31: first AddRoundKey, then per round
//                            {key-expansion step, columns 0-1, columns 2-3}
//   Camellia encrypt/decrypt 22: whitening, 6 rounds, FL/FL^-1, 6 rounds,
//                            FL/FL^-1, 6 rounds, swap + whitening
//   AES key setup            12: key load, ten forward key steps, store K10
//   Camellia key setup        7: key load, F-rounds with Sigma1,2, XOR with KL,
//                            F-rounds with Sigma3,4, store KA
// Back to back, blocks therefore complete every 31 (AES) or 22 (Camellia)
// clocks. These two counts are the document's; the schedule within them and
// the key-setup operations are this design's. A key setup must be run after a
// new key is given and before the first encryption or decryption with it.
// Synchronous to clk, active-low asynchronous reset.
module cipher_ctrl
  import uc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  op_e      op,
  input  alg_e     alg,
  output dp_ctrl_t dp,
  output ks_ctrl_t ks,
  output alg_e     alg_cur,
  output logic     busy,
  output logic     done
);
  logic       run_q, done_q;
  op_e        op_q;
  alg_e       alg_q;
  logic [4:0] cyc_q, n_cyc;
  logic [1:0] phase_q;
  logic [3:0] rnd_q;
  logic       accept, last, dec;

  assign accept  = start && !run_q;
  assign dec     = (op_q == OP_DECRYPT);
  assign alg_cur = accept ? alg : alg_q;
  assign busy    = run_q;
  assign done    = done_q;

  always_comb begin
    unique case ({alg_q, op_q == OP_KEYSETUP})
      {ALG_AES, 1'b0}:      n_cyc = 5'(AES_CYCLES - 1);
      {ALG_AES, 1'b1}:      n_cyc = 5'(AES_ROUNDS + 1);
      {ALG_CAMELLIA, 1'b0}: n_cyc = 5'(CAM_CYCLES - 1);
      default:              n_cyc = 5'd6;
    endcase
    last = run_q && (cyc_q == n_cyc - 5'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      done_q  <= 1'b0;
      op_q    <= OP_ENCRYPT;
      alg_q   <= ALG_AES;
      cyc_q   <= '0;
      phase_q <= '0;
      rnd_q   <= '0;
    end else begin
      done_q <= last;
      if (accept) begin
        run_q   <= 1'b1;
        op_q    <= op;
        alg_q   <= alg;
        cyc_q   <= '0;
        phase_q <= '0;
        rnd_q   <= '0;
      end else if (run_q) begin
        cyc_q <= cyc_q + 5'd1;
        if (last) run_q <= 1'b0;
        phase_q <= (phase_q == 2'd2) ? 2'd0 : phase_q + 2'd1;
        if (phase_q == 2'd2) rnd_q <= rnd_q + 4'd1;
      end
    end
  end

  // ------------------------------------------------------------ control words
  always_comb begin
    logic [3:0] r;   // AES: number of the round key used in this round
    dp = '0;
    ks = '0;
    dp.op = DP_HOLD;
    r = dec ? (4'd9 - rnd_q) : (rnd_q + 4'd1);

    if (accept) begin
      ks.rk_init    = 1'b1;
      ks.rk_from_k2 = (op == OP_DECRYPT);
      if (op == OP_KEYSETUP) begin
        dp.op       = DP_LOAD;
        dp.load_key = 1'b1;
        ks.load_kl  = 1'b1;
      end else begin
        // first AddRoundKey / whitening straight from the data input
        dp.op         = DP_FL;
        dp.fl_from_in = 1'b1;
        dp.fl_en      = 1'b1;
        dp.fl_kadd    = 1'b1;
        ks.cam_step   = 5'd0;
        ks.cam_dec    = (op == OP_DECRYPT);
        if (alg == ALG_AES) begin
          ks.kl_is_kl = (op != OP_DECRYPT);
          ks.kl_is_k2 = (op == OP_DECRYPT);
        end
      end
    end else if (run_q) begin
      ks.cam_step = cyc_q + 5'd1;
      ks.cam_dec  = dec;
      unique case ({alg_q, op_q == OP_KEYSETUP})
        {ALG_AES, 1'b1}: begin
          if (cyc_q < 5'(AES_ROUNDS)) begin
            dp.op       = DP_AES_KEY;
            ks.rk_step  = 1'b1;
            ks.rcon_idx = 4'(cyc_q) + 4'd1;
          end else begin
            ks.store_k2 = 1'b1;
          end
        end
        {ALG_CAMELLIA, 1'b1}: begin
          unique case (cyc_q)
            5'd0, 5'd1, 5'd3, 5'd4: begin
              dp.op        = DP_FROUND;
              ks.sigma_en  = 1'b1;
              ks.sigma_idx = (cyc_q < 5'd2) ? cyc_q[1:0] : 2'(cyc_q - 5'd1);
            end
            5'd2: begin
              dp.op      = DP_FL;
              dp.fl_en   = 1'b1;
              dp.fl_kadd = 1'b1;
              ks.kl_is_kl = 1'b1;
            end
            default: begin
              ks.store_k2   = 1'b1;
              ks.k2_from_dp = 1'b1;
            end
          endcase
        end
        {ALG_AES, 1'b0}: begin
          dp.aes_dec  = dec;
          dp.aes_last = dec ? (r == 4'd0) : (r == 4'(AES_ROUNDS));
          unique case (phase_q)
            2'd0: begin
              dp.op       = DP_AES_KEY;
              ks.rk_step  = 1'b1;
              ks.rk_bwd   = dec;
              ks.rcon_idx = dec ? (r + 4'd1) : r;
            end
            2'd1:    dp.op = DP_AES_H0;
            default: dp.op = DP_AES_H1;
          endcase
        end
        default: begin   // Camellia encrypt / decrypt
          unique case (cyc_q + 5'd1)     // schedule step; step 0 was the accept clock
            5'd21: begin
              dp.op      = DP_FL;       // swap and final whitening
              dp.fl_en   = 1'b1;
              dp.fl_kadd = 1'b1;
              dp.fl_swap = 1'b1;
            end
            5'd7, 5'd14: begin
              dp.op    = DP_FL;         // FL / FL^-1 layer
              dp.fl_en = 1'b1;
            end
            default: dp.op = DP_FROUND;
          endcase
        end
      endcase
    end
  end

  // a request must carry a defined operation
  a_valid_op: assert property (@(posedge clk) disable iff (!rst_n)
                               accept |-> (op inside {OP_KEYSETUP, OP_ENCRYPT, OP_DECRYPT}));
endmodule
