// Shared types, constants and functions of the DVB-T symbol deinterleaver.
//
// The symbol permutation H(q) of DVB-T is built from an (Nr-1)-bit linear
// feedback shift register R', a fixed wire permutation of its bits, and a
// toggle bit T that becomes the address MSB. For index i of the raw sequence
//   R'_0 = R'_1 = 0, R'_2 = 1, R'_i = LFSR(R'_{i-1}) for i >= 3
//   candidate(i) = (i mod 2) * 2^(Nr-1) + WP(R'_i)
// and only candidates below Nmax are kept. The taps, the permutations and the
// start values are those of the DVB-T standard (ETSI EN 300 744). The state of
// the raw sequence is kept in h_state_t: the register R', a saturating phase
// that supplies the three special start values, and the toggle bit.
//
// The buffer is split into four banks: EL / OL hold the even / odd addresses
// below Mmax/2, EH / OH the even / odd addresses at or above Mmax/2. Word index
// inside a bank is (address mod Mmax/2) >> 1.
package dvb_deint_pkg;

  typedef enum logic [1:0] {
    MODE_2K = 2'd0,
    MODE_4K = 2'd1,
    MODE_8K = 2'd2
  } dvb_mode_e;

  typedef enum logic [1:0] {
    BANK_EL = 2'd0,
    BANK_OL = 2'd1,
    BANK_EH = 2'd2,
    BANK_OH = 2'd3
  } bank_e;

  localparam int unsigned ADDR_W = 13;  // Nr of 8k mode
  localparam int unsigned RP_W   = 12;  // width of R' in 8k mode
  localparam int unsigned BWORD_W = 11; // word index inside the largest bank

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [RP_W-1:0]    rp_t;
  typedef logic [BWORD_W-1:0] bword_t;

  typedef struct packed {
    rp_t        r;      // R'
    logic [1:0] phase;  // min(i, 3)
    logic       t;      // i mod 2
  } h_state_t;

  localparam h_state_t H_START = '{r: '0, phase: 2'd0, t: 1'b0};

  // Number of useful carriers (Nmax) per mode.
  function automatic addr_t n_max(dvb_mode_e mode);
    case (mode)
      MODE_2K: return addr_t'(1512);
      MODE_4K: return addr_t'(3024);
      default: return addr_t'(6048);
    endcase
  endfunction

  // Mmax / 2: the boundary between the low and the high banks.
  function automatic addr_t half_m(dvb_mode_e mode);
    case (mode)
      MODE_2K: return addr_t'(1024);
      MODE_4K: return addr_t'(2048);
      default: return addr_t'(4096);
    endcase
  endfunction

  // One shift of the mode's LFSR: shift right, feedback into bit Nr-2.
  function automatic rp_t lfsr_step(rp_t r, dvb_mode_e mode);
    rp_t n;
    n = r >> 1;
    case (mode)
      MODE_2K: n[9]  = r[0] ^ r[3];
      MODE_4K: n[10] = r[0] ^ r[2];
      default: n[11] = r[0] ^ r[1] ^ r[4] ^ r[6];
    endcase
    return n;
  endfunction

  // Wire permutation R = WP(R').
  function automatic rp_t wire_perm(rp_t rp, dvb_mode_e mode);
    rp_t r;
    r = '0;
    case (mode)
      MODE_2K: begin
        r[0] = rp[9]; r[7] = rp[8]; r[5] = rp[7]; r[1] = rp[6]; r[8] = rp[5];
        r[2] = rp[4]; r[6] = rp[3]; r[9] = rp[2]; r[3] = rp[1]; r[4] = rp[0];
      end
      MODE_4K: begin
        r[7] = rp[10]; r[10] = rp[9]; r[5] = rp[8]; r[8] = rp[7]; r[1] = rp[6];
        r[2] = rp[5];  r[4]  = rp[4]; r[9] = rp[3]; r[0] = rp[2]; r[3] = rp[1];
        r[6] = rp[0];
      end
      default: begin
        r[5]  = rp[11]; r[11] = rp[10]; r[3] = rp[9]; r[0] = rp[8];
        r[10] = rp[7];  r[8]  = rp[6];  r[6] = rp[5]; r[9] = rp[4];
        r[2]  = rp[3];  r[4]  = rp[2];  r[1] = rp[1]; r[7] = rp[0];
      end
    endcase
    return r;
  endfunction

  // Raw sequence step i -> i+1.
  function automatic h_state_t h_step(h_state_t s, dvb_mode_e mode);
    h_state_t n;
    case (s.phase)
      2'd0:    n.r = '0;
      2'd1:    n.r = rp_t'(1);
      default: n.r = lfsr_step(s.r, mode);
    endcase
    n.phase = (s.phase == 2'd3) ? 2'd3 : s.phase + 2'd1;
    n.t     = ~s.t;
    return n;
  endfunction

  // Candidate address of a raw state: toggle bit on top of WP(R').
  function automatic addr_t h_cand(rp_t r, logic t, dvb_mode_e mode);
    addr_t a;
    a = addr_t'(wire_perm(r, mode));
    case (mode)
      MODE_2K: a[10] = t;
      MODE_4K: a[11] = t;
      default: a[12] = t;
    endcase
    return a;
  endfunction

  function automatic logic h_valid(rp_t r, logic t, dvb_mode_e mode);
    return h_cand(r, t, mode) < n_max(mode);
  endfunction

  function automatic bank_e bank_of(addr_t a, dvb_mode_e mode);
    return bank_e'({a >= half_m(mode), a[0]});
  endfunction

  function automatic bword_t bank_word(addr_t a, dvb_mode_e mode);
    addr_t low;
    low = (a >= half_m(mode)) ? a - half_m(mode) : a;
    return bword_t'(low >> 1);
  endfunction

endpackage
