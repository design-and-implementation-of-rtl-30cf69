// rs_decoder: Reed-Solomon (204,188) decoder correcting up to T = 8 byte errors.
//
// Same code as rs_encoder (shortened RS(255,239), roots a^0..a^15, field
// polynomial x^8+x^4+x^3+x^2+1). The decoder works on whole codewords:
//
//  1. Input: 204 bytes, first marked by in_sop, are written into one half of a
//     two-codeword buffer while the 16 syndromes S_j = r(a^j) are accumulated by
//     Horner's rule (S_j <- S_j*a^j + r).
//  2. Berlekamp-Massey: one iteration per cycle, 16 cycles, gives the error
//     locator Lambda(x) and its degree L.
//  3. Omega(x) = S(x)Lambda(x) mod x^16 in one cycle.
//  4. Chien search, pass 1: Lambda(a^-i) for byte positions i = 203..0, one per
//     cycle, counting roots. The codeword is correctable if the root count
//     equals L and L <= 8.
//  5. Chien search, pass 2: the same evaluation again; at a root the error value
//     is Omega(a^-i) / Lambda_odd(a^-i) (Forney's formula for first root a^0),
//     and the byte read from the buffer is corrected. The 188 information bytes
//     are output, out_sop on the first, out_err on all of them if the codeword
//     was not correctable (then bytes pass uncorrected).
//
// While a codeword is decoded (about 430 cycles) the next one is received into
// the other half of the buffer, so bytes may arrive every third cycle or slower
// (in the modem one byte arrives every 64 cycles). A codeword that completes
// while the previous is still being decoded sets `overrun` for one cycle and is
// not decoded. The document fixes only the code; the algorithms and the
// schedule are this design's choice.
module rs_decoder
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_err,
  output logic       cw_done,     // one pulse per decoded codeword
  output logic [3:0] cw_nerr,     // errors corrected in that codeword
  output logic       overrun
);
  typedef logic [7:0] gf_t;
  typedef gf_t vec16_t [RS_2T];
  typedef gf_t vec17_t [RS_2T+1];

  function automatic vec16_t alpha_pows();
    vec16_t r;
    for (int j = 0; j < RS_2T; j++) r[j] = gf_pow_alpha(j);
    return r;
  endfunction
  // a^(-203*j): Chien start value at the first (highest) byte position
  function automatic vec17_t chien_start();
    vec17_t r;
    for (int j = 0; j <= RS_2T; j++) r[j] = gf_pow_alpha((255 - ((RS_N - 1) * j) % 255) % 255);
    return r;
  endfunction
  function automatic vec17_t chien_step();
    vec17_t r;
    for (int j = 0; j <= RS_2T; j++) r[j] = gf_pow_alpha(j);
    return r;
  endfunction

  localparam vec16_t AJ  = alpha_pows();
  localparam vec17_t CS0 = chien_start();
  localparam vec17_t CST = chien_step();

  typedef enum logic [2:0] {S_IDLE, S_BM, S_OMEGA, S_INIT, S_CHIEN1, S_CHIEN2} state_t;

  // ------------------------------------------------------------ input side
  gf_t        mem [2*RS_N];
  logic       wbank_q;
  logic [7:0] wcnt_q;
  logic       wactive_q;
  gf_t        syn_q [RS_2T];
  logic       cw_complete;

  assign cw_complete = in_valid && (wactive_q || in_sop) &&
                       ((in_sop ? 8'd0 : wcnt_q) == 8'(RS_N - 1));

  // ------------------------------------------------------------ decode side
  state_t     st_q;
  logic       rbank_q;
  gf_t        s_q   [RS_2T];
  gf_t        lam_q [RS_2T+1];
  gf_t        bb_q  [RS_2T+1];
  gf_t        om_q  [RS_2T];
  gf_t        lt_q  [RS_2T+1];
  gf_t        ot_q  [RS_2T];
  gf_t        bdisc_q;
  logic [4:0] ll_q;
  logic [4:0] mm_q;
  logic [4:0] r_q;
  logic [7:0] pos_q;                 // 203 .. 0
  logic [4:0] roots_q;
  logic       fail_q;

  gf_t disc;
  gf_t coef;
  gf_t lam_eval;
  gf_t lam_odd;
  gf_t om_eval;
  gf_t err_val;
  gf_t lam_shift [RS_2T+1];
  gf_t om_new [RS_2T];

  always_comb begin
    // Berlekamp-Massey discrepancy for iteration r
    disc = '0;
    for (int i = 0; i <= RS_2T; i++)
      if (i <= int'(r_q) && i <= int'(ll_q)) disc ^= gf_mul(lam_q[i], s_q[int'(r_q) - i]);
    coef = gf_mul(disc, gf_inv(bdisc_q));
    for (int i = 0; i <= RS_2T; i++)
      lam_shift[i] = (i >= int'(mm_q)) ? gf_mul(coef, bb_q[i - int'(mm_q)]) : '0;
    // Omega = S * Lambda mod x^16
    for (int k = 0; k < RS_2T; k++) begin
      om_new[k] = '0;
      for (int i = 0; i <= k; i++) om_new[k] ^= gf_mul(lam_q[i], s_q[k - i]);
    end
    // Chien / Forney evaluation at the current position
    lam_eval = '0;
    lam_odd  = '0;
    om_eval  = '0;
    for (int j = 0; j <= RS_2T; j++) begin
      lam_eval ^= lt_q[j];
      if (j % 2 == 1) lam_odd ^= lt_q[j];
    end
    for (int j = 0; j < RS_2T; j++) om_eval ^= ot_q[j];
    err_val = gf_mul(om_eval, gf_inv(lam_odd));
  end

  always_ff @(posedge clk) begin
    if (in_valid && (wactive_q || in_sop))
      mem[{wbank_q ? 9'(RS_N) : 9'd0} + 9'(in_sop ? 8'd0 : wcnt_q)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank_q   <= 1'b0;
      wcnt_q    <= '0;
      wactive_q <= 1'b0;
      for (int j = 0; j < RS_2T; j++) syn_q[j] <= '0;
      st_q      <= S_IDLE;
      rbank_q   <= 1'b0;
      for (int j = 0; j < RS_2T; j++) begin
        s_q[j]  <= '0;
        om_q[j] <= '0;
        ot_q[j] <= '0;
      end
      for (int j = 0; j <= RS_2T; j++) begin
        lam_q[j] <= '0;
        bb_q[j]  <= '0;
        lt_q[j]  <= '0;
      end
      bdisc_q   <= 8'd1;
      ll_q      <= '0;
      mm_q      <= '0;
      r_q       <= '0;
      pos_q     <= '0;
      roots_q   <= '0;
      fail_q    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_err   <= 1'b0;
      cw_done   <= 1'b0;
      cw_nerr   <= '0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      cw_done   <= 1'b0;
      overrun   <= 1'b0;

      // ---- receive and accumulate syndromes
      if (in_valid && (wactive_q || in_sop)) begin
        for (int j = 0; j < RS_2T; j++)
          syn_q[j] <= (in_sop ? 8'd0 : gf_mul(syn_q[j], AJ[j])) ^ in_data;
        if (cw_complete) begin
          wactive_q <= 1'b0;
          wcnt_q    <= '0;
          wbank_q   <= ~wbank_q;
        end else begin
          wactive_q <= 1'b1;
          wcnt_q    <= (in_sop ? 8'd0 : wcnt_q) + 8'd1;
        end
      end

      // ---- decode
      unique case (st_q)
        S_IDLE: ;
        S_BM: begin
          if (disc != 0) begin
            for (int i = 0; i <= RS_2T; i++) lam_q[i] <= lam_q[i] ^ lam_shift[i];
            if (2 * int'(ll_q) <= int'(r_q)) begin
              for (int i = 0; i <= RS_2T; i++) bb_q[i] <= lam_q[i];
              ll_q    <= r_q + 5'd1 - ll_q;
              bdisc_q <= disc;
              mm_q    <= 5'd1;
            end else begin
              mm_q    <= mm_q + 5'd1;
            end
          end else begin
            mm_q <= mm_q + 5'd1;
          end
          r_q <= r_q + 5'd1;
          if (r_q == 5'(RS_2T - 1)) st_q <= S_OMEGA;
        end
        S_OMEGA: begin
          for (int k = 0; k < RS_2T; k++) om_q[k] <= om_new[k];
          st_q <= S_INIT;
        end
        S_INIT: begin
          for (int j = 0; j <= RS_2T; j++) lt_q[j] <= gf_mul(lam_q[j], CS0[j]);
          for (int j = 0; j < RS_2T; j++)  ot_q[j] <= gf_mul(om_q[j], CS0[j]);
          pos_q   <= 8'(RS_N - 1);
          if (roots_q == 0 && !fail_q) roots_q <= '0;
          st_q    <= fail_q ? S_CHIEN2 : (roots_q == 5'h1F ? S_CHIEN2 : S_CHIEN1);
        end
        S_CHIEN1: begin
          if (lam_eval == 0) roots_q <= roots_q + 5'd1;
          for (int j = 0; j <= RS_2T; j++) lt_q[j] <= gf_mul(lt_q[j], CST[j]);
          for (int j = 0; j < RS_2T; j++)  ot_q[j] <= gf_mul(ot_q[j], CST[j]);
          pos_q <= pos_q - 8'd1;
          if (pos_q == 0) begin
            // decide, then run the second pass from the start
            fail_q  <= (ll_q > 5'd8) || ((roots_q + 5'(lam_eval == 0)) != ll_q);
            roots_q <= 5'h1F;
            st_q    <= S_INIT;
          end
        end
        S_CHIEN2: begin
          for (int j = 0; j <= RS_2T; j++) lt_q[j] <= gf_mul(lt_q[j], CST[j]);
          for (int j = 0; j < RS_2T; j++)  ot_q[j] <= gf_mul(ot_q[j], CST[j]);
          pos_q <= pos_q - 8'd1;
          if (pos_q >= 8'(RS_2T)) begin
            out_valid <= 1'b1;
            out_sop   <= (pos_q == 8'(RS_N - 1));
            out_err   <= fail_q;
            out_data  <= mem[{rbank_q ? 9'(RS_N) : 9'd0} + 9'(8'(RS_N - 1) - pos_q)] ^
                         ((!fail_q && lam_eval == 0) ? err_val : 8'd0);
          end
          if (pos_q == 0) begin
            st_q    <= S_IDLE;
            cw_done <= 1'b1;
            cw_nerr <= fail_q ? 4'd0 : 4'(ll_q);
          end
        end
        default: st_q <= S_IDLE;
      endcase

      // ---- start decoding a completed codeword
      if (cw_complete) begin
        if (st_q != S_IDLE) begin
          overrun <= 1'b1;
        end else begin
          st_q    <= S_BM;
          rbank_q <= wbank_q;
          for (int j = 0; j < RS_2T; j++)
            s_q[j] <= gf_mul(syn_q[j], AJ[j]) ^ in_data;
          for (int i = 0; i <= RS_2T; i++) begin
            lam_q[i] <= (i == 0) ? 8'd1 : 8'd0;
            bb_q[i]  <= (i == 0) ? 8'd1 : 8'd0;
          end
          ll_q    <= '0;
          mm_q    <= 5'd1;
          r_q     <= '0;
          bdisc_q <= 8'd1;
          roots_q <= '0;
          fail_q  <= 1'b0;
        end
      end
    end
  end
endmodule
