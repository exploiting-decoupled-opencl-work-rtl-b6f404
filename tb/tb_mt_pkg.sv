// tb_mt_pkg: software MT19937 reference used by the testbenches as an
// independent model of the uniform streams (peek = current value without
// consuming it, next = consume).
package tb_mt_pkg;
class mt_model;
  int unsigned mt [624];
  int mti;
  function new(int unsigned s);
    mt[0] = s;
    for (int i = 1; i < 624; i++) mt[i] = 1812433253 * (mt[i-1] ^ (mt[i-1] >> 30)) + i;
    mti = 624;
  endfunction
  function int unsigned peek();
    int unsigned y;
    if (mti >= 624) begin
      for (int k = 0; k < 624; k++) begin
        y = (mt[k] & 32'h80000000) | (mt[(k+1)%624] & 32'h7fffffff);
        mt[k] = mt[(k+397)%624] ^ (y >> 1) ^ ((y & 1) ? 32'h9908b0df : 0);
      end
      mti = 0;
    end
    y = mt[mti];
    y ^= (y >> 11);
    y ^= (y << 7) & 32'h9d2c5680;
    y ^= (y << 15) & 32'hefc60000;
    y ^= (y >> 18);
    return y;
  endfunction
  function int unsigned next();
    int unsigned y;
    y = peek();
    mti++;
    return y;
  endfunction
endclass
endpackage
