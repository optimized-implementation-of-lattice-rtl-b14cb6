// collision_unit: D2Q9 bulk (interior) collision of one lattice site, BGK
// single relaxation time form.
//
//   rho  = sum f_i,  u = (sum f_i c_i) / rho
//   feq_i = w_i rho (1 + 3 c_i.u + 4.5 (c_i.u)^2 - 1.5 u.u)
//   f_i'  = f_i - omega (f_i - feq_i)
//
// The D2Q9 lattice and the role of the unit (one computational node of the
// N x N matrix, collision phase, multi-cycle latency) follow the design; the
// collision formula is the standard BGK operator, since the design names the
// operator but does not spell it out. Arithmetic is signed fixed point with
// lbm_pkg::FRAC fractional bits instead of single-precision floating point,
// which keeps the unit small and exactly reproducible; the 32-bit word width
// is kept. 1/rho is produced by a radix-2 restoring divider (2*FRAC+1 steps),
// then u and the outputs take one cycle each.
//
// Interface: pulse start with f_in valid; f_in is sampled at start. done
// pulses for one cycle with f_out valid; f_out holds until the next result.
// busy is high from start to done. Latency start -> done is 2*FRAC+4 cycles
// (52 with FRAC = 24). omega is the relaxation rate in the same fixed point
// format, sampled at start. A start while busy is ignored.
module collision_unit
  import lbm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fx_t   omega,
  input  fvec_t f_in,
  output fvec_t f_out,
  output logic  busy,
  output logic  done
);

  localparam int NUMB = 2*FRAC + 1;           // numerator 2^(2*FRAC) has NUMB bits
  localparam int IW   = $clog2(NUMB + 1);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_VEL, S_OUT} state_e;
  state_e state;

  fvec_t         f_q;
  fx_t           om_q;
  fx_t           rho_q, jx_q, jy_q;   // jx: column (East) momentum, jy: row (South) momentum
  logic [WORD_W:0]   rem_q;
  logic [NUMB-1:0]   quo_q;
  logic [IW-1:0]     cnt_q;
  fx_t           ux_q, uy_q;

  // moments of the input vector
  fx_t rho_c, jx_c, jy_c;
  always_comb begin
    rho_c = '0;
    jx_c  = '0;
    jy_c  = '0;
    for (int i = 0; i < Q; i++) begin
      rho_c += f_in[i];
      if (DC[i] > 0) jx_c += f_in[i];
      if (DC[i] < 0) jx_c -= f_in[i];
      if (DR[i] > 0) jy_c += f_in[i];
      if (DR[i] < 0) jy_c -= f_in[i];
    end
  end

  // one restoring division step; the numerator is 1 << (NUMB-1)
  logic [WORD_W+1:0] rem_sh;
  logic              num_bit;
  always_comb begin
    num_bit = (cnt_q == IW'(NUMB - 1));
    rem_sh  = {rem_q, num_bit};
  end

  // 1/rho in fixed point, saturated to the word width
  fx_t inv_rho;
  always_comb begin
    if (rho_q <= 0 || |quo_q[NUMB-1:WORD_W-1]) inv_rho = {1'b0, {(WORD_W-1){1'b1}}};
    else                                       inv_rho = fx_t'(quo_q[WORD_W-1:0]);
  end

  // equilibrium and relaxation
  fvec_t f_new;
  always_comb begin
    longint usq, cu, t, feq, d;
    usq = (longint'(ux_q) * ux_q + longint'(uy_q) * uy_q) >>> FRAC;
    for (int i = 0; i < Q; i++) begin
      cu  = longint'(DC[i]) * ux_q + longint'(DR[i]) * uy_q;
      t   = (longint'(1) <<< FRAC) + 3 * cu + ((9 * cu * cu) >>> (FRAC + 1)) - ((3 * usq) >>> 1);
      feq = (longint'(rho_q) * t) >>> FRAC;
      if (i == 0)      feq = (feq * 4) / 9;
      else if (i < 5)  feq = feq / 9;
      else             feq = feq / 36;
      d   = (longint'(om_q) * (longint'(f_q[i]) - feq)) >>> FRAC;
      f_new[i] = fx_t'(longint'(f_q[i]) - d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      f_q   <= '{default: '0};
      f_out <= '{default: '0};
      om_q  <= '0;
      rho_q <= '0;
      jx_q  <= '0;
      jy_q  <= '0;
      rem_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
      ux_q  <= '0;
      uy_q  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f_q   <= f_in;
          om_q  <= omega;
          rho_q <= rho_c;
          jx_q  <= jx_c;
          jy_q  <= jy_c;
          rem_q <= '0;
          quo_q <= '0;
          cnt_q <= IW'(NUMB - 1);
          state <= S_DIV;
        end
        S_DIV: begin
          if (rem_sh >= {2'b00, rho_q}) begin
            rem_q <= (WORD_W+1)'(rem_sh - {2'b00, rho_q});
            quo_q <= {quo_q[NUMB-2:0], 1'b1};
          end else begin
            rem_q <= (WORD_W+1)'(rem_sh);
            quo_q <= {quo_q[NUMB-2:0], 1'b0};
          end
          if (cnt_q == '0) state <= S_VEL;
          else             cnt_q <= cnt_q - 1'b1;
        end
        S_VEL: begin
          ux_q  <= fx_t'((longint'(jx_q) * inv_rho) >>> FRAC);
          uy_q  <= fx_t'((longint'(jy_q) * inv_rho) >>> FRAC);
          state <= S_OUT;
        end
        S_OUT: begin
          f_out <= f_new;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
