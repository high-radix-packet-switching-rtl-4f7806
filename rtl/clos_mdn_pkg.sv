// Shared types and routing functions of the Clos-MDN packet switch.
//
// A packet is a single fixed-size cell (every packet has the same size), carried
// whole on every link and stored whole in every buffer (store-and-forward). Its
// header holds the global output port and a per-module route that is recomputed
// each time the packet enters a central module (CM): the router where it must
// leave the CM, the side it leaves by, the column where it makes its first turn
// and its virtual channel (VC). Every mini-router then picks its output from its
// own mesh coordinates and that route alone.
//
// Mesh coordinates: row 0 is the north edge, column 0 the west edge. VC 0 carries
// traffic that moves east (or not at all horizontally, leaving east or north/south),
// VC 1 traffic that moves west. These two VCs, the XY and "Modulo" routes, the
// port numbering and the inter-module wiring follow the switch description; the
// field widths, the single-cell packet and the exact turn-column formula of the
// Modulo route are this design's own choices.
package clos_mdn_pkg;

  // Maximum sizes the header fields can address.
  localparam int unsigned DATA_W  = 32;  // payload bits of one cell
  localparam int unsigned PORT_W  = 10;  // up to 1024 switch ports
  localparam int unsigned COORD_W = 5;   // mesh up to 32 x 32
  localparam int unsigned OCC_W   = 16;  // congestion (occupancy) values

  // Router port / direction. Index order is used for port arrays everywhere.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [PORT_W-1:0]  port_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;      // payload
    port_t             dst;       // global output port
    logic              diverted;  // already sent to a neighbouring CM once
    coord_t            tgt_row;   // router where the packet leaves this CM
    coord_t            tgt_col;
    coord_t            turn_col;  // column of the first vertical segment
    dir_e              exit_dir;  // port it leaves by at (tgt_row, tgt_col)
    logic              vc;        // 0: eastbound class, 1: westbound class
  } pkt_t;

  // Output IOM of a global output port. IOM g holds outputs N-1-g*n down to
  // N-n-g*n (output 0 sits in the last IOM).
  function automatic int unsigned out_iom(input port_t dst, input int unsigned n_ports,
                                          input int unsigned n_per);
    return (n_ports - 1 - 32'(dst)) / n_per;
  endfunction

  // Index of the output queue of a global output port inside its IOM.
  function automatic int unsigned out_qidx(input port_t dst, input int unsigned n_ports,
                                           input int unsigned n_per);
    return (n_ports - 1 - 32'(dst)) % n_per;
  endfunction

  // Side and row by which a packet for `dst` leaves any CM. IOMs 0..k-1 sit on the
  // west edge (IOM g at row g), IOMs k..2k-1 on the east edge (IOM g at row 2k-1-g).
  function automatic logic exit_is_east(input port_t dst, input int unsigned n_ports,
                                        input int unsigned n_per, input int unsigned k);
    return out_iom(dst, n_ports, n_per) >= k;
  endfunction

  function automatic coord_t exit_row(input port_t dst, input int unsigned n_ports,
                                      input int unsigned n_per, input int unsigned k);
    int unsigned g;
    g = out_iom(dst, n_ports, n_per);
    return (g >= k) ? coord_t'(2 * k - 1 - g) : coord_t'(g);
  endfunction

  // VC a packet gets when it enters a CM from a neighbouring CM: it then only
  // heads for its exit side, so the class follows that side.
  function automatic logic arrival_vc(input port_t dst, input int unsigned n_ports,
                                      input int unsigned n_per, input int unsigned k);
    return !exit_is_east(dst, n_ports, n_per, k);
  endfunction

  // Column where a diverted packet crosses to the neighbouring CM. The interleaved
  // links shift the column by k/2, so crossing at k/2 lands it on the neighbour's
  // west column and crossing at k/2-1 on its east column: it arrives on the column
  // of its exit and only has to move vertically there.
  function automatic coord_t cross_col(input logic east_exit, input int unsigned k);
    return east_exit ? coord_t'(k / 2 - 1) : coord_t'(k / 2);
  endfunction

  // Route inside one CM from an entry router to the west/east exit of `dst`.
  // Same column: straight vertical. Entry on the opposite edge (parallel ports):
  // "Modulo" route, which turns in an intermediate column chosen from the exit
  // row (row mod (k-1), counted from the entry edge) and makes its last turn in
  // the exit row. Any other entry (perpendicular ports): XY, horizontal first.
  function automatic pkt_t route_local(input pkt_t p, input coord_t col,
                                       input int unsigned n_ports, input int unsigned n_per,
                                       input int unsigned k);
    pkt_t   r;
    logic   east;
    coord_t erow, ecol;
    r    = p;
    east = exit_is_east(p.dst, n_ports, n_per, k);
    erow = exit_row(p.dst, n_ports, n_per, k);
    ecol = east ? coord_t'(k - 1) : coord_t'(0);
    r.tgt_row  = erow;
    r.tgt_col  = ecol;
    r.exit_dir = east ? DIR_E : DIR_W;
    r.vc       = !east;
    if (col == ecol) begin
      r.turn_col = ecol;
    end else if (32'(col) == 0 && east) begin
      r.turn_col = coord_t'(32'(erow) % (k - 1));
    end else if (32'(col) == k - 1 && !east) begin
      r.turn_col = coord_t'(k - 1 - (32'(erow) % (k - 1)));
    end else begin
      r.turn_col = ecol;
    end
    return r;
  endfunction

  // Route from an IOM inlet to the south (down = 1) or north (down = 0) crossing
  // towards a neighbouring CM: XY, horizontal to the crossing column first.
  function automatic pkt_t route_divert(input pkt_t p, input logic down, input coord_t col,
                                        input int unsigned n_ports, input int unsigned n_per,
                                        input int unsigned k);
    pkt_t   r;
    coord_t c;
    r = p;
    c = cross_col(exit_is_east(p.dst, n_ports, n_per, k), k);
    r.tgt_row  = down ? coord_t'(k - 1) : coord_t'(0);
    r.tgt_col  = c;
    r.turn_col = c;
    r.exit_dir = down ? DIR_S : DIR_N;
    r.vc       = (c < col);
    r.diverted = 1'b1;
    return r;
  endfunction

  // Output port chosen by the router at (row, col) for packet p.
  function automatic dir_e next_hop(input pkt_t p, input coord_t row, input coord_t col);
    if (row == p.tgt_row && col == p.tgt_col) return p.exit_dir;
    if (row != p.tgt_row) begin
      if (col != p.turn_col) return (col < p.turn_col) ? DIR_E : DIR_W;
      return (row < p.tgt_row) ? DIR_S : DIR_N;
    end
    return (col < p.tgt_col) ? DIR_E : DIR_W;
  endfunction

  // Hop counts used by the congestion-aware dispatch (router-to-router hops).
  function automatic int unsigned absdiff(input int unsigned a, input int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic int unsigned hops_local(input coord_t row, input coord_t col,
                                             input port_t dst, input int unsigned n_ports,
                                             input int unsigned n_per, input int unsigned k);
    logic east;
    east = exit_is_east(dst, n_ports, n_per, k);
    return absdiff(32'(row), 32'(exit_row(dst, n_ports, n_per, k)))
         + absdiff(32'(col), east ? k - 1 : 0);
  endfunction

  function automatic int unsigned hops_divert(input logic down, input coord_t row,
                                              input coord_t col, input port_t dst,
                                              input int unsigned n_ports,
                                              input int unsigned n_per, input int unsigned k);
    int unsigned c, here, there;
    c     = 32'(cross_col(exit_is_east(dst, n_ports, n_per, k), k));
    here  = absdiff(32'(col), c) + (down ? (k - 1 - 32'(row)) : 32'(row));
    there = down ? 32'(exit_row(dst, n_ports, n_per, k))
                 : (k - 1 - 32'(exit_row(dst, n_ports, n_per, k)));
    return here + 1 + there;
  endfunction

endpackage
