// ccsds_ref_pkg: behavioural reference of the compressor for the testbenches.
//
// Written directly from the CCSDS 123.0-B-2 equations on whole-image arrays
// (no storage structure, no schedule), so that the RTL can be compared with
// an independent computation. Images are held in BIL order: index
// (y*Nz + z)*Nx + x. The hybrid coder reference uses the same stand-in
// low-entropy coder as the testbenches (see loec_model): one 4-bit codeword
// holding the code index per low-entropy sample, and a 3-bit codeword 101 per
// flush.
package ccsds_ref_pkg;
  import ccsds_pkg::*;

  function automatic longint clip(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint fdiv(longint a, longint b);  // floor division, b > 0
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic longint p2(int e);
    return longint'(1) << e;
  endfunction

  // Prediction, quantization and mapping of a whole image.
  // Counts: [0] samples with q != delta (quantized), [1] clipped weights.
  function automatic void predict(input cfg_t c, input int s[], output int mapped[],
                                  output int n_quant);
    int nx, ny, nz, idx;
    longint smax, smid, rep[], dc[], w[][];
    nx = int'(c.nx); ny = int'(c.ny); nz = int'(c.nz);
    smax = p2(D) - 1; smid = p2(D - 1);
    rep = new[nx*ny*nz]; dc = new[nx*ny*nz]; mapped = new[nx*ny*nz];
    w = new[nz];
    foreach (w[i]) w[i] = new[C_MAX];
    n_quant = 0;
    for (int y = 0; y < ny; y++)
      for (int z = 0; z < nz; z++)
        for (int x = 0; x < nx; x++) begin
          longint t, sig, dn, dw, dnw, u[C_MAX], dhat, v, m, hi, til, hat, delta, mm, q;
          longint sb, num, drep, sr, e, rho, th, om, qa;
          int pst, omega;
          omega = int'(c.omega);
          idx = (y*nz + z)*nx + x;
          t = y*nx + x;
          pst = (z < int'(c.p)) ? z : int'(c.p);
          // local sum, from sample representatives
          sig = 0;
          if (t > 0) begin
            longint W, NW, N, NE, WZ;
            W  = (x > 0) ? rep[idx-1] : 0;
            N  = (y > 0) ? rep[((y-1)*nz + z)*nx + x] : 0;
            NW = (y > 0 && x > 0) ? rep[((y-1)*nz + z)*nx + x - 1] : 0;
            NE = (y > 0 && x < nx-1) ? rep[((y-1)*nz + z)*nx + x + 1] : 0;
            WZ = (z > 0 && x > 0) ? rep[(y*nz + z - 1)*nx + x - 1] : smid;
            case (c.ls_mode)
              LS_WIDE_NEIGHBOUR:
                sig = (y == 0) ? 4*W : (x == 0) ? 2*(N + NE) : (x == nx-1) ? W + NW + 2*N : W + NW + N + NE;
              LS_NARROW_NEIGHBOUR:
                sig = (y == 0) ? 4*WZ : (x == 0) ? 2*(N + NE) : (x == nx-1) ? 2*(NW + N) : NW + 2*N + NE;
              LS_WIDE_COLUMN:   sig = (y == 0) ? 4*W : 4*N;
              default:          sig = (y == 0) ? 4*WZ : 4*N;
            endcase
            if (y > 0) begin
              dn  = 4*N - sig;
              dw  = (x > 0) ? 4*W - sig : 4*N - sig;
              dnw = (x > 0) ? 4*NW - sig : 4*N - sig;
            end else begin
              dn = 0; dw = 0; dnw = 0;
            end
          end else begin
            dn = 0; dw = 0; dnw = 0;
          end
          // weights initialised at the first sample of a band
          if (t == 0) begin
            longint iw;
            iw = fdiv(7 * p2(omega), 8);
            for (int i = 0; i < C_MAX; i++) w[z][i] = 0;
            for (int i = 0; i < pst; i++) begin w[z][3+i] = iw; iw = fdiv(iw, 8); end
          end
          for (int i = 0; i < C_MAX; i++) u[i] = 0;
          if (c.full) begin u[0] = dn; u[1] = dw; u[2] = dnw; end
          for (int i = 0; i < pst; i++) u[3+i] = dc[(y*nz + z - 1 - i)*nx + x];
          dhat = 0;
          for (int i = 0; i < C_MAX; i++) dhat += w[z][i] * u[i];
          v  = dhat + p2(omega) * (sig - 4*smid);
          m  = v + p2(int'(c.r) - 1);
          m  = m - fdiv(m, p2(int'(c.r))) * p2(int'(c.r)) - p2(int'(c.r) - 1);
          hi = clip(m + p2(omega+2)*smid + p2(omega+1), 0, p2(omega+2)*smax + p2(omega+1));
          if (t > 0) til = fdiv(hi, p2(omega+1));
          else if (c.p > 0 && z > 0) til = 2 * rep[(y*nz + z - 1)*nx + x];
          else til = 2 * smid;
          hat = fdiv(til, 2);
          delta = longint'(s[idx]) - hat;
          // quantizer
          case (c.fidelity)
            FID_ABSOLUTE: mm = c.a_lim;
            FID_RELATIVE: mm = fdiv(longint'(c.r_lim) * hat, p2(D));
            FID_BOTH: begin
              mm = fdiv(longint'(c.r_lim) * hat, p2(D));
              if (c.a_lim < mm) mm = c.a_lim;
            end
            default: mm = 0;
          endcase
          if (t == 0) mm = 0;
          qa = (delta < 0) ? -delta : delta;
          q = fdiv(qa + mm, 2*mm + 1);
          if (delta < 0) q = -q;
          if (q != delta) n_quant++;
          // sample representative
          sb = clip(hat + q*(2*mm + 1), 0, smax);
          if (t == 0) sb = s[idx];
          begin
            longint sg;
            sg = (q > 0) ? 1 : (q < 0) ? -1 : 0;
            num = 4*(p2(int'(c.theta)) - c.phi) * (sb*p2(omega) - sg*mm*c.psi*p2(omega - int'(c.theta)))
                  + c.phi*hi - c.phi*p2(omega+1);
            drep = fdiv(num, p2(omega + int'(c.theta) + 1));
            sr = fdiv(drep + 1, 2);
          end
          if (t == 0) sr = s[idx];
          rep[idx] = sr;
          dc[idx] = (t == 0) ? 0 : 4*sr - sig;
          // weight update
          e = 2*sb - til;
          if (t > 0) begin
            longint ex;
            ex = clip(c.vmin + fdiv(t - nx, p2(int'(c.tinc))), c.vmin, c.vmax) + D - omega;
            for (int i = 0; i < C_MAX; i++) begin
              longint a, d;
              if (i < 3 && !c.full) continue;
              if (i >= 3 && i - 3 >= pst) continue;
              a = (e >= 0) ? u[i] : -u[i];
              // floor((a * 2^-ex + 1) / 2)
              if (ex >= 0) d = fdiv(a + p2(int'(ex)), p2(int'(ex) + 1));
              else         d = fdiv(a * p2(int'(-ex)) + 1, 2);
              w[z][i] = clip(w[z][i] + d, -p2(omega+2), p2(omega+2) - 1);
            end
          end
          // mapper
          if (t == 0) th = (hat < smax - hat) ? hat : smax - hat;
          else begin
            longint a1, a2;
            a1 = fdiv(hat + mm, 2*mm + 1);
            a2 = fdiv(smax - hat + mm, 2*mm + 1);
            th = (a1 < a2) ? a1 : a2;
          end
          om = (til % 2 == 0) ? q : -q;
          if (qa > th && (q > th || -q > th)) mapped[idx] = int'((q < 0 ? -q : q) + th);
          else if (om >= 0 && om <= th) mapped[idx] = int'(2*(q < 0 ? -q : q));
          else mapped[idx] = int'(2*(q < 0 ? -q : q) - 1);
        end
  endfunction

  // Hybrid coder reference with the stand-in low-entropy coder. Appends bits
  // (first bit first) to bits; counts high, low and rescaling events and
  // escape codewords.
  function automatic void hybrid(input cfg_t c, input int mapped[], ref bit bits[$],
                                 output int n_high, output int n_low, output int n_resc,
                                 output int n_esc);
    int nx, ny, nz, idx;
    longint acc[], cnt[];
    nx = int'(c.nx); ny = int'(c.ny); nz = int'(c.nz);
    acc = new[nz]; cnt = new[nz];
    n_high = 0; n_low = 0; n_resc = 0; n_esc = 0;
    for (int y = 0; y < ny; y++)
      for (int z = 0; z < nz; z++)
        for (int x = 0; x < nx; x++) begin
          longint dl, t, sum;
          idx = (y*nz + z)*nx + x;
          dl = mapped[idx];
          t = y*nx + x;
          if (t == 0) begin
            acc[z] = c.acc_init; cnt[z] = p2(int'(c.gamma0));
            for (int b = D-1; b >= 0; b--) bits.push_back(dl[b]);
            n_high++;
            continue;
          end
          sum = acc[z] + 4*dl;
          if (cnt[z] < p2(int'(c.gstar)) - 1) begin
            acc[z] = sum; cnt[z] = cnt[z] + 1;
          end else begin
            acc[z] = fdiv(sum + 1, 2); cnt[z] = fdiv(cnt[z] + 1, 2);
            bits.push_back(sum[0]);
            n_resc++;
          end
          if (acc[z] * p2(14) >= longint'(code_threshold(0)) * cnt[z]) begin
            int k;
            longint uu;
            k = 0;
            for (int kk = 0; kk <= D-2; kk++)
              if (cnt[z] * p2(kk+2) <= acc[z] + fdiv(49*cnt[z], 32)) k = kk;
            uu = dl >> k;
            if (uu < c.umax) begin
              for (int b = k-1; b >= 0; b--) bits.push_back(dl[b]);
              bits.push_back(1'b1);
              for (int b = 0; b < uu; b++) bits.push_back(1'b0);
            end else begin
              for (int b = D-1; b >= 0; b--) bits.push_back(dl[b]);
              for (int b = 0; b < int'(c.umax); b++) bits.push_back(1'b0);
              n_esc++;
            end
            n_high++;
          end else begin
            int ci;
            ci = 0;
            for (int i = 0; i < NCODES; i++)
              if (acc[z] * p2(14) < longint'(code_threshold(i)) * cnt[z]) ci = i;
            for (int b = 3; b >= 0; b--) bits.push_back(ci[b]);
            n_low++;
          end
        end
    // tail: one stand-in flush codeword, accumulators, final '1'
    bits.push_back(1'b1); bits.push_back(1'b0); bits.push_back(1'b1);
    for (int z = 0; z < nz; z++)
      for (int b = 2 + D + int'(c.gstar) - 1; b >= 0; b--) bits.push_back(acc[z][b]);
    bits.push_back(1'b1);
    while (bits.size() % OUT_W != 0) bits.push_back(1'b0);
  endfunction
endpackage
