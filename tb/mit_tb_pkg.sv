// mit_tb_pkg -- reference functions shared by the mesh testbenches: the test
// signatures loaded into each unit, the response a healthy processor core
// returns for a signature, and the tested/testing neighbour sets written
// directly from the coordinate rules (the testing set uses the
// x + (1 - sign(x))*n - 1 form), independently of the RTL's package.
package mit_tb_pkg;

  function automatic logic [15:0] sig_fn(input int u, input int k);
    logic [31:0] h;
    h = 32'(u) * 32'h9E37_79B1 ^ 32'(k) * 32'h85EB_CA6B ^ 32'h1234_5678;
    h = h ^ (h >> 15);
    return h[15:0] ^ h[31:16];
  endfunction

  // Response of a healthy processor core to test signature t.
  function automatic logic [15:0] resp_fn(input logic [15:0] t);
    return {t[12:0], t[15:13]} ^ 16'hA5C3 ^ {8'h00, t[15:8]};
  endfunction

  function automatic int sgn(input int a);
    return (a > 0) ? 1 : 0;
  endfunction

  // Tested neighbour (set C) number code of unit u.
  function automatic int tested(input int u, input int code, input int n, input int m,
                                input int p);
    int x, y, z;
    x = u % n; y = (u / n) % m; z = u / (n * m);
    if ((code & 1) != 0) x = (x + 1) % n;
    if ((code & 2) != 0) y = (y + 1) % m;
    if ((code & 4) != 0) z = (z + 1) % p;
    return x + n * (y + m * z);
  endfunction

  // Testing neighbour (set K) number code of unit u.
  function automatic int testing(input int u, input int code, input int n, input int m,
                                 input int p);
    int x, y, z;
    x = u % n; y = (u / n) % m; z = u / (n * m);
    if ((code & 1) != 0) x = x + (1 - sgn(x)) * n - 1;
    if ((code & 2) != 0) y = y + (1 - sgn(y)) * m - 1;
    if ((code & 4) != 0) z = z + (1 - sgn(z)) * p - 1;
    return x + n * (y + m * z);
  endfunction

endpackage
