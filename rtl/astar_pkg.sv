// astar_pkg: types, constants and small functions shared by the A* accelerator.
//
// The map is a square grid of 2**CW x 2**CW nodes (256 x 256, the map size the
// accelerator is evaluated on). Every node record holds its parent coordinate,
// its accumulated cost G and two flags: obstacle and closed ("visited").
// Step costs are integers: 10 for a horizontal or vertical move and 14 for a
// diagonal one, an integer stand-in for 1 and sqrt(2). The heuristic is the
// octile distance H = D*(|dx|+|dy|) + (D2-2*D)*min(|dx|,|dy|) with the same
// two weights, which keeps it consistent with the step costs.
// The cost weights, the field widths and the child numbering are this design's
// own choices; the map size, the record fields and the heuristic follow the
// accelerator's description.
package astar_pkg;

  localparam int CW     = 8;            // coordinate width: 256 x 256 map
  localparam int GW     = 20;           // width of the accumulated cost G
  localparam int FW     = 21;           // width of F = G + H
  localparam int NCHILD = 8;            // eight neighbours per node
  localparam int D_ORTH = 10;           // D : horizontal / vertical step cost
  localparam int D_DIAG = 14;           // D2: diagonal step cost

  localparam logic [GW-1:0] G_INF = '1; // "never reached" cost

  typedef logic [CW-1:0] crd_t;

  typedef struct packed {
    crd_t x;
    crd_t y;
  } coord_t;

  // One grid node as held in the node memory and in the memory manager.
  typedef struct packed {
    coord_t          parent;
    logic [GW-1:0]   g;
    logic            closed;
    logic            obstacle;
  } node_t;

  // One open-list entry: the F cost it is sorted on and the node it names.
  typedef struct packed {
    logic [FW-1:0] f;
    coord_t        pos;
  } qentry_t;

  // Child k (0..7) lies at (cx+child_dx(k), cy+child_dy(k)):
  //   0:(-1,-1) 1:(0,-1) 2:(+1,-1) 3:(-1,0) 4:(+1,0) 5:(-1,+1) 6:(0,+1) 7:(+1,+1)
  function automatic int child_dx(int k);
    case (k)
      0, 3, 5: return -1;
      1, 6:    return 0;
      default: return 1;
    endcase
  endfunction

  function automatic int child_dy(int k);
    case (k)
      0, 1, 2: return -1;
      3, 4:    return 0;
      default: return 1;
    endcase
  endfunction

  function automatic bit child_diag(int k);
    return (child_dx(k) != 0) && (child_dy(k) != 0);
  endfunction

  // Octile distance between two nodes, built from subtract, absolute value,
  // compare and constant multiply (shift-and-add) only.
  function automatic logic [FW-1:0] octile(coord_t a, coord_t b);
    logic [CW-1:0] adx, ady, mn;
    logic [FW-1:0] sum;
    adx = (a.x >= b.x) ? a.x - b.x : b.x - a.x;
    ady = (a.y >= b.y) ? a.y - b.y : b.y - a.y;
    mn  = (adx < ady) ? adx : ady;
    sum = FW'(adx) + FW'(ady);
    return FW'(D_ORTH) * sum - FW'(2 * D_ORTH - D_DIAG) * FW'(mn);
  endfunction

endpackage
