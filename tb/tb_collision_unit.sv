// tb_collision_unit: checks the D2Q9 BGK collision against a floating point
// reference computed here with real arithmetic, for random distributions near
// equilibrium and several relaxation rates, and checks the start -> done
// latency (2*FRAC+4 cycles).
module tb_collision_unit;
  import lbm_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0;
  fx_t   omega;
  fvec_t f_in, f_out;
  logic  busy, done;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  collision_unit dut (.*);

  localparam real W [Q] = '{4.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/36, 1.0/36, 1.0/36, 1.0/36};

  function automatic real to_r(fx_t x); return real'(x) / real'(2**FRAC); endfunction
  function automatic fx_t to_fx(real x); return fx_t'($rtoi(x * real'(2**FRAC))); endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fr [Q];
    real rho, ux, uy, usq, cu, feq, expv, om;
    int  lat;
    omega = '0;
    f_in  = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      om = (t % 3 == 0) ? 1.0 : (t % 3 == 1) ? 1.7 : 0.6;
      rho = 0.8 + 0.4 * ($urandom_range(1000) / 1000.0);
      ux  = 0.1 * (($urandom_range(2000) / 1000.0) - 1.0);
      uy  = 0.1 * (($urandom_range(2000) / 1000.0) - 1.0);
      for (int i = 0; i < Q; i++) begin
        cu    = DC[i] * ux + DR[i] * uy;
        fr[i] = W[i] * rho * (1 + 3*cu + 4.5*cu*cu - 1.5*(ux*ux+uy*uy));
        fr[i] = fr[i] * (1.0 + 0.2 * (($urandom_range(2000) / 1000.0) - 1.0));
        f_in[i] = to_fx(fr[i]);
        fr[i]   = to_r(f_in[i]);
      end
      omega = to_fx(om);
      om    = to_r(omega);
      // reference
      rho = 0; ux = 0; uy = 0;
      for (int i = 0; i < Q; i++) begin
        rho += fr[i];
        ux  += DC[i] * fr[i];
        uy  += DR[i] * fr[i];
      end
      ux /= rho; uy /= rho;
      usq = ux*ux + uy*uy;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2*FRAC + 4) begin
        failures++;
        $display("latency %0d, expected %0d", lat, 2*FRAC+4);
      end
      for (int i = 0; i < Q; i++) begin
        cu   = DC[i] * ux + DR[i] * uy;
        feq  = W[i] * rho * (1 + 3*cu + 4.5*cu*cu - 1.5*usq);
        expv = fr[i] - om * (fr[i] - feq);
        checks++;
        if ((to_r(f_out[i]) - expv) > 2.0e-6 || (expv - to_r(f_out[i])) > 2.0e-6) begin
          failures++;
          $display("t=%0d i=%0d got %f expected %f", t, i, to_r(f_out[i]), expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
