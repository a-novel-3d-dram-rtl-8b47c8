// bch_pkg: arithmetic of the block BCH code used by the EDAC.
//
// Each 128-bit word is split into 8 blocks of 16 data bits. Every block is a
// double-error-correcting binary BCH code over GF(2^5) (primitive polynomial
// x^5 + x^2 + 1), the (31,21) code shortened to (26,16): 10 parity bits per
// block, 80 for the word. Code polynomial c(x) = x^10 d(x) + (x^10 d(x) mod g(x)),
// with g(x) = m1(x) m3(x) = x^10+x^9+x^8+x^6+x^5+x^3+1. Bit positions 0..9 of a
// block hold parity, 10..25 hold data. The functions are pure and are unrolled
// into combinational logic.
package bch_pkg;

  localparam int GF_M    = 5;
  localparam int BLK_K   = 16;               // data bits per block
  localparam int BLK_P   = 10;               // parity bits per block
  localparam int BLK_N   = BLK_K + BLK_P;    // 26
  localparam int N_BLK   = 8;                // blocks per 128-bit word
  localparam logic [10:0] GEN_POLY = 11'b11101101001;

  typedef logic [GF_M-1:0] gf_t;

  // Product in GF(2^5): the 9-bit carry-less product reduced modulo
  // x^5 + x^2 + 1, written out bit by bit.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t r;
    r[0] = (a[0] & b[0]) ^ (a[1] & b[4]) ^ (a[2] & b[3]) ^ (a[3] & b[2]) ^ (a[4] & b[1]) ^ (a[4] & b[4]);
    r[1] = (a[0] & b[1]) ^ (a[1] & b[0]) ^ (a[2] & b[4]) ^ (a[3] & b[3]) ^ (a[4] & b[2]);
    r[2] = (a[0] & b[2]) ^ (a[1] & b[1]) ^ (a[1] & b[4]) ^ (a[2] & b[0]) ^ (a[2] & b[3]) ^ (a[3] & b[2])
         ^ (a[3] & b[4]) ^ (a[4] & b[1]) ^ (a[4] & b[3]) ^ (a[4] & b[4]);
    r[3] = (a[0] & b[3]) ^ (a[1] & b[2]) ^ (a[2] & b[1]) ^ (a[2] & b[4]) ^ (a[3] & b[0]) ^ (a[3] & b[3])
         ^ (a[4] & b[2]) ^ (a[4] & b[4]);
    r[4] = (a[0] & b[4]) ^ (a[1] & b[3]) ^ (a[2] & b[2]) ^ (a[3] & b[1]) ^ (a[3] & b[4]) ^ (a[4] & b[0])
         ^ (a[4] & b[3]);
    return r;
  endfunction

  // Powers of alpha (a root of x^5 + x^2 + 1) and their logarithms.
  localparam gf_t ALPHA [31] = '{5'd1, 5'd2, 5'd4, 5'd8, 5'd16, 5'd5, 5'd10, 5'd20, 5'd13, 5'd26, 5'd17, 5'd7, 5'd14, 5'd28, 5'd29, 5'd31, 5'd27, 5'd19, 5'd3, 5'd6, 5'd12, 5'd24, 5'd21, 5'd15, 5'd30, 5'd25, 5'd23, 5'd11, 5'd22, 5'd9, 5'd18};
  localparam gf_t LOG [32] = '{5'd0, 5'd0, 5'd1, 5'd18, 5'd2, 5'd5, 5'd19, 5'd11, 5'd3, 5'd29, 5'd6, 5'd27, 5'd20, 5'd8, 5'd12, 5'd23, 5'd4, 5'd10, 5'd30, 5'd17, 5'd7, 5'd22, 5'd28, 5'd26, 5'd21, 5'd25, 5'd9, 5'd16, 5'd13, 5'd14, 5'd24, 5'd15};

  // alpha^e, e taken mod 31
  function automatic gf_t gf_alpha(int e);
    return ALPHA[e % 31];
  endfunction

  // a^-1 = alpha^(31 - log a), for a != 0
  function automatic gf_t gf_inv(gf_t a);
    return ALPHA[(31 - int'(LOG[a])) % 31];
  endfunction

  function automatic logic [BLK_P-1:0] bch_parity(logic [BLK_K-1:0] d);
    logic [BLK_P-1:0] rem;
    logic fb;
    rem = '0;
    for (int i = BLK_K-1; i >= 0; i--) begin
      fb  = d[i] ^ rem[BLK_P-1];
      rem = {rem[BLK_P-2:0], 1'b0};
      if (fb) rem ^= GEN_POLY[BLK_P-1:0];
    end
    return rem;
  endfunction

  typedef struct packed {
    logic [BLK_N-1:0] flip;   // bits to invert
    logic             ce;     // one or two errors corrected
    logic             ue;     // uncorrectable pattern detected
  } bch_fix_t;

  function automatic bch_fix_t bch_decode(logic [BLK_N-1:0] r);
    bch_fix_t res;
    gf_t s1, s3, s1c, sig2, v;
    int  nroot;
    s1 = '0; s3 = '0;
    for (int j = 0; j < BLK_N; j++)
      if (r[j]) begin
        s1 ^= gf_alpha(j);
        s3 ^= gf_alpha(3*j);
      end
    res = '0;
    s1c = gf_mul(s1, gf_mul(s1, s1));
    if (s1 == '0 && s3 == '0) begin
      res = '0;
    end else if (s1 == '0) begin
      res.ue = 1'b1;
    end else begin
      // Error locator 1 + s1 x + sig2 x^2; sig2 = 0 for a single error.
      sig2  = gf_mul(s3 ^ s1c, gf_inv(s1));
      nroot = 0;
      for (int j = 0; j < BLK_N; j++) begin
        v = 5'd1 ^ gf_mul(s1, gf_alpha(31 - j)) ^ gf_mul(sig2, gf_alpha(62 - 2*j));
        if (v == '0) begin
          res.flip[j] = 1'b1;
          nroot++;
        end
      end
      if ((sig2 == '0 && nroot == 1) || (sig2 != '0 && nroot == 2)) res.ce = 1'b1;
      else begin
        res.ue   = 1'b1;
        res.flip = '0;
      end
    end
    return res;
  endfunction

  // Interleaving: block j takes bits j and j+8 of every 16-bit lane, so each
  // die contributes exactly two bits to each block and a whole-die failure is
  // at most a double error in every block. Returns the index in the 208-bit
  // code word of bit position k (0..25) of block j. Data lanes come first, so
  // code word [127:0] is the data word unchanged.
  function automatic int code_index(int j, int k);
    int i;
    if (k < BLK_P) return (8 + k/2) * 16 + j + 8 * (k % 2);
    i = k - BLK_P;
    return (i/2) * 16 + j + 8 * (i % 2);
  endfunction

endpackage
