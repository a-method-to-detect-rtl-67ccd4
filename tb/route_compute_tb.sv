// route_compute_tb: one routing unit per position of the 6x6 mesh. For every
// destination (including out-of-range coordinates) the chosen port is
// compared with a reference of the routing rule; then every source /
// destination pair is walked hop by hop to check that the packet arrives in
// the minimal number of hops, and the example path from router 7 to router
// 29 is checked to be 7, 8, 9, 15, 21, 22, 23, 29.
module route_compute_tb;
  import eccjr_pkg::*;

  localparam int MX = 6, MY = 6;
  // Junction routers, numbered 1..36 row by row from the south-west corner.
  localparam int JR_LIST[12] = '{1, 6, 8, 11, 15, 16, 21, 22, 25, 30, 32, 35};

  logic [2:0] dx, dy;
  port_e      port [MY*MX];
  int checks = 0, failures = 0;

  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      route_compute #(.MESH_X(MX), .MESH_Y(MY), .X(x), .Y(y)) u_rc (
        .dst_x_i(dx), .dst_y_i(dy), .port_o(port[y*MX+x]));
    end
  end

  function automatic bit is_jr(input int x, input int y);
    foreach (JR_LIST[k]) if (JR_LIST[k] == y * MX + x + 1) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int ref_port(input int x, input int y, input int tx, input int ty);
    if (tx > MX - 1) tx = MX - 1;
    if (ty > MY - 1) ty = MY - 1;
    if (tx == x && ty == y) return 0;
    if (tx == x) return (ty > y) ? 1 : 3;
    if (ty == y) return (tx > x) ? 2 : 4;
    if (is_jr(x, (ty > y) ? y + 1 : y - 1)) return (ty > y) ? 1 : 3;
    return (tx > x) ? 2 : 4;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cx, cy, hops, r, idx, no_jr_run, worst_run;
    int path[$];
    int expected_path[8] = '{7, 8, 9, 15, 21, 22, 23, 29};
    for (int ty = 0; ty < 8; ty++)
      for (int tx = 0; tx < 8; tx++) begin
        dx = 3'(tx); dy = 3'(ty);
        #1;
        for (int n = 0; n < MX * MY; n++) begin
          checks++;
          if (int'(port[n]) != ref_port(n % MX, n / MX, tx, ty)) begin
            failures++;
            $display("FAIL node %0d dst (%0d,%0d): %0d", n + 1, tx, ty, port[n]);
          end
        end
      end
    // Walk all pairs using the hardware's choices.
    worst_run = 0;
    for (int s = 0; s < MX * MY; s++)
      for (int t = 0; t < MX * MY; t++) begin
        cx = s % MX; cy = s / MX; hops = 0; no_jr_run = 0;
        dx = 3'(t % MX); dy = 3'(t / MX);
        path = '{s + 1};
        forever begin
          #1;
          idx = cy * MX + cx;
          if (port[idx] == PORT_LOCAL || hops > 20) break;
          case (port[idx])
            PORT_NORTH: cy++;
            PORT_EAST:  cx++;
            PORT_SOUTH: cy--;
            default:    cx--;
          endcase
          hops++;
          path.push_back(cy * MX + cx + 1);
        end
        // Longest stretch of routers between junction routers on this path.
        no_jr_run = 0;
        for (int k = 1; k < path.size() - 1; k++) begin
          r = path[k] - 1;
          if (is_jr(r % MX, r / MX)) no_jr_run = 0;
          else no_jr_run++;
          if (no_jr_run > worst_run) worst_run = no_jr_run;
        end
        checks++;
        if (cx != t % MX || cy != t / MX ||
            hops != ((s % MX > t % MX) ? s % MX - t % MX : t % MX - s % MX) +
                    ((s / MX > t / MX) ? s / MX - t / MX : t / MX - s / MX)) begin
          failures++;
          $display("FAIL walk %0d -> %0d ended at (%0d,%0d) after %0d hops", s + 1, t + 1, cx, cy, hops);
        end
        if (s == 6 && t == 28) begin
          checks++;
          if (path.size() != 8) failures++;
          else foreach (expected_path[k]) if (path[k] != expected_path[k]) failures++;
          $display("path 7 -> 29: %p", path);
        end
      end
    $display("longest run of intermediate routers without a junction router: %0d", worst_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
