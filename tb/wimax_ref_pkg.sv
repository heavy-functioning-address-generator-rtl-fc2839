// wimax_ref_pkg - reference model of the IEEE 802.16e channel interleaver
// for the testbenches, written directly from the standard's two-step
// permutation (with its floor functions), independently of the RTL.
//   Interleaver, original index k -> transmitted index:
//     m = (Ncbps/d)*(k mod d) + floor(k/d)
//     t = s*floor(m/s) + (m + Ncbps - floor(d*m/Ncbps)) mod s
//   Deinterleaver, received index n -> original index:
//     m = s*floor(n/s) + (n + floor(d*n/Ncbps)) mod s
//     k = d*m - (Ncbps - 1)*floor(d*m/Ncbps)
// with d = 16 and s = Ncpc/2.
package wimax_ref_pkg;
  localparam int D = 16;

  function automatic int ref_interleave(int k, int ncbps, int s);
    int m;
    m = (ncbps / D) * (k % D) + k / D;
    return s * (m / s) + (m + ncbps - (D * m) / ncbps) % s;
  endfunction

  function automatic int ref_deinterleave(int n, int ncbps, int s);
    int m;
    m = s * (n / s) + (n + (D * n) / ncbps) % s;
    return D * m - (ncbps - 1) * ((D * m) / ncbps);
  endfunction

  // bits per subcarrier for mod_type 0..3 (3 uses the QPSK geometry)
  function automatic int ref_ncpc(int mod_type);
    case (mod_type)
      1: return 4;
      2: return 6;
      default: return 2;
    endcase
  endfunction
endpackage
