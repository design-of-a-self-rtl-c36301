// bert_ref_pkg: bit-serial reference models for the tester's patterns.
//
// prbs_ref steps a Fibonacci LFSR one bit at a time, exactly as the
// polynomial x^L + x^k + ... + 1 defines it (new bit = XOR of the tapped
// stages, shifted into stage 1, all stages start at one) and packs 20 bits
// per word, first bit in bit 19. pattern_ref gives the word sequence of any
// pattern id, starting with the first word a freshly reset generator
// produces. Testbenches compare the RTL against these.
package bert_ref_pkg;

  class prbs_ref;
    int unsigned len;
    bit [31:0]   taps;     // bit k-1 set: stage k is tapped
    bit          inv;
    int unsigned zs;       // zero suppression run length, 0 = none
    bit [63:0]   st;       // st[k-1] = stage k

    function new(int unsigned len, bit [31:0] taps, bit inv = 0, int unsigned zs = 0);
      this.len  = len;
      this.taps = taps;
      this.inv  = inv;
      this.zs   = zs;
      this.st   = '0;
      for (int i = 0; i < len; i++) this.st[i] = 1'b1;
    endfunction

    function bit next_bit();
      bit fb, out, allzero;
      fb = 0;
      for (int k = 1; k <= len; k++) if (taps[k-1]) fb ^= st[k-1];
      out = fb;
      if (zs > 0) begin
        allzero = 1;
        for (int i = 0; i < zs; i++) if (st[i]) allzero = 0;
        if (allzero) out = 1;
      end
      for (int k = len; k >= 2; k--) st[k-1] = st[k-2];
      st[0] = fb;
      return out ^ inv;
    endfunction

    function bit [19:0] next_word();
      bit [19:0] w;
      for (int i = 19; i >= 0; i--) w[i] = next_bit();
      return w;
    endfunction
  endclass

  function automatic bit [31:0] tap(int a, int b, int c = 0, int d = 0);
    bit [31:0] t = '0;
    t[a-1] = 1; t[b-1] = 1;
    if (c > 0) t[c-1] = 1;
    if (d > 0) t[d-1] = 1;
    return t;
  endfunction

  class pattern_ref;
    int        id;
    bit [19:0] user;
    bit [19:0] count;
    prbs_ref   p;

    function new(int id, bit [19:0] user = 20'hC1554);
      this.id = id; this.user = user; this.count = 0;
      case (id)
        3:  p = new(7,  tap(7, 6));
        4:  p = new(9,  tap(9, 5));
        5:  p = new(11, tap(11, 9));
        6:  p = new(15, tap(15, 14), 1);
        7:  p = new(20, tap(20, 3));
        8:  p = new(20, tap(20, 17), 0, 14);
        9:  p = new(23, tap(23, 18), 1);
        10: p = new(29, tap(29, 27), 1);
        11: p = new(31, tap(31, 28), 1);
        12: p = new(32, tap(32, 31, 30, 10));
        default: p = null;
      endcase
    endfunction

    function bit [19:0] next_word();
      case (id)
        0:  return 20'b1010_1010_1010_1010_1010;
        1:  return 20'b11111_00000_11111_00000;
        2:  return 20'b1111111111_0000000000;
        13: return user;
        14: return 20'b1100_1100_1100_1100_1100;
        15: begin count++; return count; end
        default: return p.next_word();
      endcase
    endfunction
  endclass

endpackage
