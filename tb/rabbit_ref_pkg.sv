// rabbit_ref_pkg -- word-level reference model of the Rabbit cipher for the
// testbenches. Written directly from the cipher equations (counter update
// with the eight 32-bit constants, g function, coupled next-state, key
// setup, extraction), independent of the cycle schedule of the RTL.
package rabbit_ref_pkg;

  typedef logic [31:0] w_t;
  typedef w_t          w8_t [8];

  typedef struct {
    w8_t  x;
    w8_t  c;
    logic b;
  } ref_state_t;

  localparam w_t A [8] = '{32'h4D34D34D, 32'hD34D34D3, 32'h34D34D34,
                           32'h4D34D34D, 32'hD34D34D3, 32'h34D34D34,
                           32'h4D34D34D, 32'hD34D34D3};

  function automatic w_t rl(w_t v, int n);
    return (v << n) | (v >> (32 - n));
  endfunction

  function automatic w_t ref_g(w_t u);
    logic [63:0] s;
    s = 64'(u) * 64'(u);
    return s[31:0] ^ s[63:32];
  endfunction

  // Counter update of one iteration; returns new counters and carry.
  function automatic void ref_counters(ref w8_t c, ref logic b);
    logic [32:0] t;
    for (int j = 0; j < 8; j++) begin
      t    = 33'(c[j]) + 33'(A[j]) + 33'(b);
      c[j] = t[31:0];
      b    = t[32];
    end
  endfunction

  function automatic w8_t ref_nsf(w8_t g);
    w8_t x;
    for (int j = 0; j < 8; j++) begin
      if (j % 2 == 0) x[j] = g[j] + rl(g[(j+7)%8], 16) + rl(g[(j+6)%8], 16);
      else            x[j] = g[j] + rl(g[(j+7)%8], 8) + g[(j+6)%8];
    end
    return x;
  endfunction

  function automatic void ref_iterate(ref ref_state_t st);
    w8_t g;
    ref_counters(st.c, st.b);
    for (int j = 0; j < 8; j++) g[j] = ref_g(st.x[j] + st.c[j]);
    st.x = ref_nsf(g);
  endfunction

  function automatic ref_state_t ref_setup(logic [127:0] key);
    ref_state_t st;
    logic [15:0] k [8];
    for (int i = 0; i < 8; i++) k[i] = key[16*i +: 16];
    for (int j = 0; j < 8; j++) begin
      if (j % 2 == 0) begin
        st.x[j] = {k[(j+1)%8], k[j]};
        st.c[j] = {k[(j+4)%8], k[(j+5)%8]};
      end else begin
        st.x[j] = {k[(j+5)%8], k[(j+4)%8]};
        st.c[j] = {k[j], k[(j+1)%8]};
      end
    end
    st.b = 1'b0;
    for (int i = 0; i < 4; i++) ref_iterate(st);
    for (int j = 0; j < 8; j++) st.c[j] ^= st.x[(j+4)%8];
    return st;
  endfunction

  function automatic logic [127:0] ref_extract(w8_t x);
    logic [127:0] s;
    s[ 15:  0] = x[0][15:0]  ^ x[5][31:16];
    s[ 31: 16] = x[0][31:16] ^ x[3][15:0];
    s[ 47: 32] = x[2][15:0]  ^ x[7][31:16];
    s[ 63: 48] = x[2][31:16] ^ x[5][15:0];
    s[ 79: 64] = x[4][15:0]  ^ x[1][31:16];
    s[ 95: 80] = x[4][31:16] ^ x[7][15:0];
    s[111: 96] = x[6][15:0]  ^ x[3][31:16];
    s[127:112] = x[6][31:16] ^ x[1][15:0];
    return s;
  endfunction

  // Next keystream block: iterate, then extract.
  function automatic logic [127:0] ref_next_block(ref ref_state_t st);
    ref_iterate(st);
    return ref_extract(st.x);
  endfunction

endpackage
