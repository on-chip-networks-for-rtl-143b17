// tb_prom_route: checks the route computation exhaustively over its random
// input and over many node / destination pairs.
//  * DOR-XY and DOR-YX ports for every current/destination pair of a 4x4 mesh.
//  * Every PROM decision is minimal (moves towards the destination) and
//    ejects at the destination.
//  * The fraction of the 65536 random values that choose X equals
//    wx / (wx + wy) to within one value, with the weights recomputed here:
//    uniform (x : y), fixed f at the source (x+f : y+f), on an X ingress
//    (x+f : y), on a Y ingress (x : y+f), and PROMV (f = fmax*xs*ys/N).
//  * O1TURN-like: intermediate nodes go straight.
//  * VC sets: the rules of the east/west split for each ingress.
module tb_prom_route;
  import noc_pkg::*;

  localparam int NVC = 4;

  coord_t cx, cy, dx, dy, sx, sy;
  port_e  in_port;
  logic [VC_W-1:0] in_vc;
  logic [15:0] rnd;

  port_e p_xy, p_yx, p_uni, p_fix, p_v, p_o1;
  logic [NVC-1:0] m_xy, m_yx, m_uni, m_fix, m_v, m_o1;

  prom_route #(.ROUTING(RT_DOR_XY), .NVC(NVC)) u_xy (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy),
    .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_xy), .vc_mask(m_xy));
  prom_route #(.ROUTING(RT_DOR_YX), .NVC(NVC)) u_yx (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy),
    .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_yx), .vc_mask(m_yx));
  prom_route #(.ROUTING(RT_PROM), .PROM_MODE(PROM_UNIFORM), .NVC(NVC)) u_uni (.cur_x(cx), .cur_y(cy),
    .dst_x(dx), .dst_y(dy), .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_uni), .vc_mask(m_uni));
  prom_route #(.ROUTING(RT_PROM), .PROM_MODE(PROM_FIXED), .F(3), .NVC(NVC)) u_fix (.cur_x(cx), .cur_y(cy),
    .dst_x(dx), .dst_y(dy), .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_fix), .vc_mask(m_fix));
  prom_route #(.ROUTING(RT_PROM), .PROM_MODE(PROM_V), .FMAX(1024), .NNODES(64), .NVC(NVC)) u_v (.cur_x(cx), .cur_y(cy),
    .dst_x(dx), .dst_y(dy), .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_v), .vc_mask(m_v));
  prom_route #(.ROUTING(RT_PROM), .PROM_MODE(PROM_O1TURN), .NVC(NVC)) u_o1 (.cur_x(cx), .cur_y(cy),
    .dst_x(dx), .dst_y(dy), .src_x(sx), .src_y(sy), .in_port, .in_vc, .rnd, .out_port(p_o1), .vc_mask(m_o1));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit productive(port_e p, int ccx, int ccy, int ddx, int ddy);
    case (p)
      P_EAST:  return ddx > ccx;
      P_WEST:  return ddx < ccx;
      P_NORTH: return ddy > ccy;
      P_SOUTH: return ddy < ccy;
      default: return ddx == ccx && ddy == ccy;
    endcase
  endfunction

  // count random values that send the PROM instance along X
  task automatic count_x(input int which, output int nx);
    nx = 0;
    for (int r = 0; r < 65536; r++) begin
      port_e p;
      rnd = 16'(r);
      #1;
      p = (which == 0) ? p_uni : (which == 1) ? p_fix : p_v;
      if (p == P_EAST || p == P_WEST) nx++;
    end
  endtask

  function automatic bit near(int nx, longint wx, longint wy);
    longint expct;
    expct = (wx * 65536 + wx + wy - 1) / (wx + wy);   // ceil
    return (nx >= expct - 1) && (nx <= expct + 1);
  endfunction

  initial begin
    in_vc = 0; rnd = 0; sx = 0; sy = 0;
    // DOR on every pair of a 4x4 mesh
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        port_e exy, eyx;
        cx = coord_t'(a % 4); cy = coord_t'(a / 4); dx = coord_t'(b % 4); dy = coord_t'(b / 4);
        in_port = P_LOCAL;
        #1;
        exy = (dx > cx) ? P_EAST : (dx < cx) ? P_WEST : (dy > cy) ? P_NORTH : (dy < cy) ? P_SOUTH : P_LOCAL;
        eyx = (dy > cy) ? P_NORTH : (dy < cy) ? P_SOUTH : (dx > cx) ? P_EAST : (dx < cx) ? P_WEST : P_LOCAL;
        check(p_xy == exy, $sformatf("DOR-XY %0d->%0d", a, b));
        check(p_yx == eyx, $sformatf("DOR-YX %0d->%0d", a, b));
        check(m_xy == '1, "DOR mask");
      end

    // PROM decisions are minimal for random inputs
    for (int k = 0; k < 3000; k++) begin
      cx = coord_t'($urandom_range(7)); cy = coord_t'($urandom_range(7));
      dx = coord_t'($urandom_range(7)); dy = coord_t'($urandom_range(7));
      sx = coord_t'($urandom_range(7)); sy = coord_t'($urandom_range(7));
      in_port = port_e'($urandom_range(4)); in_vc = VC_W'($urandom_range(NVC - 1));
      rnd = 16'($urandom);
      #1;
      check(productive(p_uni, cx, cy, dx, dy) && productive(p_fix, cx, cy, dx, dy) &&
            productive(p_v, cx, cy, dx, dy) && productive(p_o1, cx, cy, dx, dy),
            $sformatf("minimal (%0d,%0d)->(%0d,%0d)", cx, cy, dx, dy));
    end

    // probabilities: node (1,1) -> (4,3): x = 3, y = 2
    begin
      int nx;
      cx = 1; cy = 1; dx = 4; dy = 3; sx = 0; sy = 0; in_vc = 0;
      in_port = P_LOCAL;
      count_x(0, nx); check(near(nx, 3, 2), $sformatf("uniform Px %0d", nx));
      count_x(1, nx); check(near(nx, 3 + 3, 2 + 3), $sformatf("fixed source Px %0d", nx));
      // PROMV: xs = 4, ys = 3, f = 1024*12/64 = 192; scaled weights x*64 + 1024*12
      count_x(2, nx); check(near(nx, 3 * 64 + 12288, 2 * 64 + 12288), $sformatf("PROMV source Px %0d", nx));
      in_port = P_WEST;
      count_x(1, nx); check(near(nx, 3 + 3, 2), $sformatf("fixed X-ingress Px %0d", nx));
      count_x(2, nx); check(near(nx, 3 * 64 + 12288, 2 * 64), $sformatf("PROMV X-ingress Px %0d", nx));
      in_port = P_SOUTH;
      count_x(1, nx); check(near(nx, 3, 2 + 3), $sformatf("fixed Y-ingress Px %0d", nx));
      count_x(0, nx); check(near(nx, 3, 2), $sformatf("uniform Y-ingress Px %0d", nx));
      // O1TURN: straight on
      rnd = 16'h1234; in_port = P_SOUTH; #1; check(p_o1 == P_NORTH, "O1TURN straight on Y");
      in_port = P_WEST; #1; check(p_o1 == P_EAST, "O1TURN straight on X");
    end

    // VC sets (NVC = 4: low half 0011, high half 1100)
    begin
      cx = 2; cy = 2; sx = 2; sy = 2; in_vc = 0;
      // force a vertical move: destination in the same column
      dx = 2; dy = 5;
      in_port = P_WEST;  #1; check(m_uni == 4'b0011, "turn after eastbound -> low half");
      in_port = P_EAST;  #1; check(m_uni == 4'b1100, "turn after westbound -> high half");
      in_port = P_SOUTH; in_vc = 3; #1; check(m_uni == 4'b1100, "vertical keeps high half");
      in_port = P_SOUTH; in_vc = 1; #1; check(m_uni == 4'b0011, "vertical keeps low half");
      in_port = P_LOCAL; rnd = 16'h0000; #1; check(m_uni == 4'b0011 || m_uni == 4'b1100, "same column source");
      // horizontal link: any VC
      dx = 5; dy = 2; in_port = P_SOUTH; in_vc = 3; #1; check(m_uni == 4'b1111, "horizontal any VC");
      // source: destination east / west, forced vertical by same x? use O1TURN not needed:
      dx = 5; dy = 6; in_port = P_LOCAL;
      for (int r = 0; r < 64; r++) begin
        rnd = 16'(r * 1031); #1;
        if (p_uni == P_NORTH) check(m_uni == 4'b0011, "source, east destination, vertical -> low half");
        else                  check(m_uni == 4'b1111, "source horizontal any VC");
      end
      dx = 0; dy = 6;
      for (int r = 0; r < 64; r++) begin
        rnd = 16'(r * 1031); #1;
        if (p_uni == P_NORTH) check(m_uni == 4'b1100, "source, west destination, vertical -> high half");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
