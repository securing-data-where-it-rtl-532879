// simon_ref_pkg: software reference of SIMON-32/64 for the testbenches.
//
// Plain word-level SIMON: the key schedule for m = 4 key words (constant c = 0xfffc and
// the z0 sequence), the round x' = y ^ (x<<<1 & x<<<8) ^ (x<<<2) ^ k, y' = x, and its
// inverse. It is written from the cipher's definition, independently of the bit-sliced
// row program, and checked against the published test vector
// key 1918 1110 0908 0100, plaintext 6565 6877 -> ciphertext c69b e9bb.
package simon_ref_pkg;

  localparam logic [63:0] Z0 = 64'h19c3522fb386a45f;  // z0, first bit in bit 0

  typedef logic [15:0] rk_t [32];

  function automatic logic [15:0] rol16(input logic [15:0] v, input int unsigned s);
    return (v << s) | (v >> (16 - s));
  endfunction

  function automatic logic [15:0] ror16(input logic [15:0] v, input int unsigned s);
    return (v >> s) | (v << (16 - s));
  endfunction

  // key = {k3, k2, k1, k0} as printed (k3 first)
  function automatic rk_t key_schedule(input logic [63:0] key);
    rk_t k;
    logic [15:0] tmp;
    k[0] = key[15:0];
    k[1] = key[31:16];
    k[2] = key[47:32];
    k[3] = key[63:48];
    for (int i = 4; i < 32; i++) begin
      tmp  = ror16(k[i-1], 3) ^ k[i-3];
      tmp  = tmp ^ ror16(tmp, 1);
      k[i] = 16'hfffc ^ 16'(Z0[(i - 4) % 62]) ^ k[i-4] ^ tmp;
    end
    return k;
  endfunction

  function automatic logic [15:0] f(input logic [15:0] x);
    return (rol16(x, 1) & rol16(x, 8)) ^ rol16(x, 2);
  endfunction

  // block = {x (left), y (right)}
  function automatic logic [31:0] encrypt(input logic [31:0] blk, input rk_t k,
                                          input int unsigned rounds);
    logic [15:0] x, y, t;
    x = blk[31:16];
    y = blk[15:0];
    for (int unsigned r = 0; r < rounds; r++) begin
      t = x;
      x = y ^ f(x) ^ k[r];
      y = t;
    end
    return {x, y};
  endfunction

  function automatic logic [31:0] decrypt(input logic [31:0] blk, input rk_t k,
                                          input int unsigned rounds);
    logic [15:0] x, y, t;
    x = blk[31:16];
    y = blk[15:0];
    for (int r = int'(rounds) - 1; r >= 0; r--) begin
      t = y;
      y = x ^ f(y) ^ k[r];
      x = t;
    end
    return {x, y};
  endfunction

endpackage
