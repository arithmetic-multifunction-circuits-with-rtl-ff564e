// tb_ref_pkg: reference models for the testbenches, written directly from the
// arithmetic definitions (bit scans, +, -, <) and sharing no structure with the trees.
// Operands are held in 64-bit vectors; n is the number of valid bits.
package tb_ref_pkg;

  typedef struct {
    logic        e;
    int unsigned p;
  } pos_t;

  // Lead/trail digit or differing-bit search on the n-bit vector v.
  //   cl=0: look for a 1 in (inv ? ~v : v); f=0 most, f=1 least significant.
  //   cl=1: v holds A on odd and B on even bits; look for the pair k where they differ
  //         and report the position (2k or 2k+1) of the bit that is 1 (after inversion).
  function automatic pos_t ref_pos(logic [63:0] v, int unsigned n, logic f, logic inv, logic cl);
    pos_t r;
    logic [63:0] x;
    r.e = 1'b0;
    r.p = 0;
    x = inv ? ~v : v;
    if (!cl) begin
      for (int k = 0; k < int'(n); k++) begin
        if (x[k] && (!r.e || !f)) begin
          r.p = k;
          r.e = 1'b1;
        end
      end
    end else begin
      for (int k = 0; k < int'(n/2); k++) begin
        if ((x[2*k+1] != x[2*k]) && (!r.e || !f)) begin
          r.p = x[2*k+1] ? 2*k+1 : 2*k;
          r.e = 1'b1;
        end
      end
    end
    return r;
  endfunction

  // Interlace two w-bit operands: A_k on bit 2k+1, B_k on bit 2k.
  function automatic logic [63:0] interlace(logic [31:0] a, logic [31:0] b, int unsigned w);
    logic [63:0] r;
    r = '0;
    for (int k = 0; k < int'(w); k++) begin
      r[2*k+1] = a[k];
      r[2*k]   = b[k];
    end
    return r;
  endfunction

  function automatic logic [63:0] mask_n(int unsigned n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  // 64-bit random value
  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
