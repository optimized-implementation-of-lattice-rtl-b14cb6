// lbm_ref_pkg: floating point reference of a periodic D2Q9 BGK lattice
// Boltzmann domain, used by the testbenches to check the hardware. Sites are
// stored row by row, f[(r*width + c)*9 + i], row 0 at the top, directions as
// in lbm_pkg (1 E, 2 N, 3 W, 4 S, 5 NE, 6 NW, 7 SW, 8 SE). Also conversion
// between reals and the hardware's fixed point words.
package lbm_ref_pkg;
  import lbm_pkg::*;

  localparam real WT [Q] = '{4.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/36, 1.0/36, 1.0/36, 1.0/36};

  function automatic real to_r(fx_t x);
    return real'(x) / real'(2**FRAC);
  endfunction

  function automatic fx_t to_fx(real x);
    return fx_t'($rtoi(x * real'(2**FRAC)));
  endfunction

  // distribution of a site near equilibrium with random density and velocity
  function automatic void random_site(ref real f [], input int base);
    real rho, ux, uy, cu;
    rho = 0.9 + 0.2 * ($urandom_range(1000) / 1000.0);
    ux  = 0.05 * (($urandom_range(2000) / 1000.0) - 1.0);
    uy  = 0.05 * (($urandom_range(2000) / 1000.0) - 1.0);
    for (int i = 0; i < Q; i++) begin
      cu = DC[i] * ux + DR[i] * uy;
      f[base + i] = WT[i] * rho * (1 + 3*cu + 4.5*cu*cu - 1.5*(ux*ux + uy*uy))
                    * (1.0 + 0.05 * (($urandom_range(2000) / 1000.0) - 1.0));
      f[base + i] = to_r(to_fx(f[base + i]));
    end
  endfunction

  // one time step: collide every site, then stream periodically
  function automatic void step(ref real f [], input int width, input int height, input real om);
    real post [];
    real rho, ux, uy, usq, cu, feq;
    post = new[f.size()];
    for (int s = 0; s < width * height; s++) begin
      rho = 0; ux = 0; uy = 0;
      for (int i = 0; i < Q; i++) begin
        rho += f[s*Q + i];
        ux  += DC[i] * f[s*Q + i];
        uy  += DR[i] * f[s*Q + i];
      end
      ux /= rho; uy /= rho;
      usq = ux*ux + uy*uy;
      for (int i = 0; i < Q; i++) begin
        cu  = DC[i] * ux + DR[i] * uy;
        feq = WT[i] * rho * (1 + 3*cu + 4.5*cu*cu - 1.5*usq);
        post[s*Q + i] = f[s*Q + i] - om * (f[s*Q + i] - feq);
      end
    end
    for (int r = 0; r < height; r++)
      for (int c = 0; c < width; c++)
        for (int i = 0; i < Q; i++) begin
          int rs, cs;
          rs = (r - DR[i] + height) % height;
          cs = (c - DC[i] + width) % width;
          f[(r*width + c)*Q + i] = post[(rs*width + cs)*Q + i];
        end
  endfunction
endpackage
