// Reference model for the deinterleaver testbenches.
//
// Computes the DVB-T symbol permutation directly from its definition: the raw
// generator is stepped Mmax times and every candidate below Nmax is appended
// to the table. It uses its own tables of LFSR taps and wire permutations
// (written as "R bit position for R' bits MSB..0", as in the standard) and
// shares no code with the RTL.
package dvb_ref_pkg;

  function automatic int ref_nr(int mode);
    return (mode == 0) ? 11 : (mode == 1) ? 12 : 13;
  endfunction

  function automatic int ref_nmax(int mode);
    return (mode == 0) ? 1512 : (mode == 1) ? 3024 : 6048;
  endfunction

  // Fills h[0..Nmax-1]; returns the number of out-of-range raw candidates.
  function automatic int ref_perm(int mode, ref int h[], ref int raw_idx[]);
    int perm2k[10] = '{0, 7, 5, 1, 8, 2, 6, 9, 3, 4};
    int perm4k[11] = '{7, 10, 5, 8, 1, 2, 4, 9, 0, 3, 6};
    int perm8k[12] = '{5, 11, 3, 0, 10, 8, 6, 9, 2, 4, 1, 7};
    int nr, w, m, n, q, r, rr, fb, cand, invalid;
    nr = ref_nr(mode);
    w  = nr - 1;
    m  = 1 << nr;
    n  = ref_nmax(mode);
    h  = new[n];
    raw_idx = new[n];
    q = 0; r = 0; invalid = 0;
    for (int i = 0; i < m; i++) begin
      if (i < 2) r = 0;
      else if (i == 2) r = 1;
      else begin
        case (mode)
          0: fb = ((r >> 0) ^ (r >> 3)) & 1;
          1: fb = ((r >> 0) ^ (r >> 2)) & 1;
          default: fb = ((r >> 0) ^ (r >> 1) ^ (r >> 4) ^ (r >> 6)) & 1;
        endcase
        r = (r >> 1) | (fb << (w - 1));
      end
      rr = 0;
      for (int k = 0; k < w; k++) begin
        if (((r >> k) & 1) != 0) begin
          case (mode)
            0: rr |= 1 << perm2k[w - 1 - k];
            1: rr |= 1 << perm4k[w - 1 - k];
            default: rr |= 1 << perm8k[w - 1 - k];
          endcase
        end
      end
      cand = ((i % 2) << (nr - 1)) + rr;
      if (cand < n) begin
        h[q] = cand;
        raw_idx[q] = i;
        q++;
      end else begin
        invalid++;
      end
    end
    return invalid;
  endfunction

endpackage
