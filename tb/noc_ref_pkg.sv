// noc_ref_pkg: reference routing rule of the 6x6 ECCJR mesh for the
// testbenches (ports: 0 local, 1 north, 2 east, 3 south, 4 west).
package noc_ref_pkg;
  localparam int MX = 6, MY = 6;
  localparam int JR_LIST[12] = '{1, 6, 8, 11, 15, 16, 21, 22, 25, 30, 32, 35};

  function automatic bit ref_is_jr(input int x, input int y);
    foreach (JR_LIST[k]) if (JR_LIST[k] == y * MX + x + 1) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int ref_route(input int x, input int y, input int tx, input int ty);
    if (tx > MX - 1) tx = MX - 1;
    if (ty > MY - 1) ty = MY - 1;
    if (tx == x && ty == y) return 0;
    if (tx == x) return (ty > y) ? 1 : 3;
    if (ty == y) return (tx > x) ? 2 : 4;
    if (ref_is_jr(x, (ty > y) ? y + 1 : y - 1)) return (ty > y) ? 1 : 3;
    return (tx > x) ? 2 : 4;
  endfunction

  function automatic int ref_hops(input int s, input int t);
    int ax, ay;
    ax = (s % MX > t % MX) ? s % MX - t % MX : t % MX - s % MX;
    ay = (s / MX > t / MX) ? s / MX - t / MX : t / MX - s / MX;
    return ax + ay;
  endfunction
endpackage
