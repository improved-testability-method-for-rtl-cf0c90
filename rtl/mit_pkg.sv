// mit_pkg -- shared constants and neighbour-set arithmetic for the mutual
// inter-unit test (MIT) hardware of a mesh-connected multiprocessor.
//
// Every processor unit of a d-dimensional mesh tests the units that lie one
// step "ahead" of it in any non-empty subset of the dimensions, with wrap-around
// at the mesh edges (a torus), and is tested by the units one step "behind" it
// in the same way. Neighbour number i (1 .. 2^d - 1) is encoded by its bits:
// bit b of i set means a step of +1 (tested set) or -1 (testing set) along
// dimension b (b = 0 is x / columns n, b = 1 is y / rows m, b = 2 is z / depth p).
// For d = 2 this gives the three neighbours of rules (1)-(2) and for d = 3 the
// seven of rules (4)-(5). Units are numbered u = x + n*(y + m*z).
// The bit-order numbering of the neighbours is this design's own choice.
package mit_pkg;

  // Number of tested (and of testing) neighbours of every unit.
  function automatic int unsigned num_neighbours(input int unsigned d);
    return (1 << d) - 1;
  endfunction

  // Unit number of neighbour i (1 .. 7) of unit u. dir = +1 for the tested set C,
  // dir = -1 for the testing set K.
  function automatic int unsigned neighbour(input int unsigned u,
                                            input logic [2:0]  i,
                                            input int signed   dir,
                                            input int unsigned n,
                                            input int unsigned m,
                                            input int unsigned p);
    int unsigned x, y, z;
    x = u % n;
    y = (u / n) % m;
    z = u / (n * m);
    if (i[0]) x = (dir > 0) ? (x + 1) % n : (x + n - 1) % n;
    if (i[1]) y = (dir > 0) ? (y + 1) % m : (y + m - 1) % m;
    if (i[2]) z = (dir > 0) ? (z + 1) % p : (z + p - 1) % p;
    return x + n * (y + m * z);
  endfunction

  // Width of a counter or index that must hold values 0 .. n-1 (at least 1).
  function automatic int unsigned idx_width(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
