// img_gen_pkg: synthetic test images for the testbenches.
//
// Each image is smooth (a gradient that changes from band to band) with
// noise of a chosen amplitude, and rare large spikes, so that small and large
// prediction residuals, saturation at 0 and 2^D-1, and escape codewords all
// occur. Images are returned in BIL order, index (y*Nz + z)*Nx + x.
package img_gen_pkg;
  import ccsds_pkg::*;

  function automatic void make_image(input int nx, input int ny, input int nz,
                                     input int noise, input int spikes, output int s[]);
    s = new[nx*ny*nz];
    for (int y = 0; y < ny; y++)
      for (int z = 0; z < nz; z++)
        for (int x = 0; x < nx; x++) begin
          int v;
          v = 20000 + 300*x + 200*y + 900*z + ((x*y*7 + z*13) % 50);
          if (noise > 0) v += int'($urandom_range(0, 2*noise)) - noise;
          if (spikes > 0 && $urandom_range(0, 99) < spikes)
            v = ($urandom_range(0, 1) == 1) ? 65535 : 0;
          if (v < 0) v = 0;
          if (v > 65535) v = 65535;
          s[(y*nz + z)*nx + x] = v;
        end
  endfunction

  function automatic cfg_t base_cfg(int nx, int ny, int nz);
    cfg_t c;
    c = '0;
    c.nx = (XW+1)'(nx); c.ny = (YW+1)'(ny); c.nz = (ZW+1)'(nz);
    c.p = 2'd3; c.full = 1'b1; c.ls_mode = LS_WIDE_NEIGHBOUR;
    c.omega = 5'd13; c.r = 6'd48; c.vmin = -5'sd1; c.vmax = 5'sd3; c.tinc = 4'd4;
    c.fidelity = FID_LOSSLESS; c.theta = 3'd0; c.phi = 4'd0; c.psi = 4'd0;
    c.gamma0 = 4'd1; c.gstar = 4'd4; c.umax = 6'd16; c.acc_init = ACCW'(8);
    return c;
  endfunction
endpackage
