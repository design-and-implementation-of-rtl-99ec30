// rkt_pkg: types and constants shared by the RKT switch and the RKT-NoC mesh.
//
// A packet is N_FLIT flits long (four, as in the synthesis set-up of the design).
// The first flit is the header: its low bits carry the destination and source
// router coordinates and a bypass flag that is set when the packet has been
// looped back around an unavailable neighbour. The remaining header bits and
// every other flit are payload. Coordinates are 0-based, x grows to the east,
// y grows to the north. The header layout and the port numbering are choices of
// this implementation.
package rkt_pkg;

  localparam int COORD_W = 2;          // enough for the 4 x 4 mesh
  localparam int N_FLIT  = 4;          // flits per packet
  localparam int N_DIR   = 4;          // N, E, S, W
  localparam int N_PORT  = 5;          // N, E, S, W, local IP

  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  // Diagonal neighbour indices for the "unavailable links" indications.
  typedef enum logic [1:0] {
    D_NE = 2'd0,
    D_NW = 2'd1,
    D_SE = 2'd2,
    D_SW = 2'd3
  } diag_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic               bypass;
  } hdr_t;

  localparam int HDR_W = $bits(hdr_t);

  // Number of Hamming check bits for K data bits: smallest P with 2^P >= K+P+1.
  function automatic int ham_p(input int k);
    int p;
    p = 0;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

  // Codeword width: data, Hamming check bits and one overall parity bit.
  function automatic int ham_cw(input int k);
    return k + ham_p(k) + 1;
  endfunction

  // Port on the far side of a link (a packet leaving north enters the next router from south).
  function automatic port_e opposite(input port_e p);
    case (p)
      P_N:     return P_S;
      P_S:     return P_N;
      P_E:     return P_W;
      P_W:     return P_E;
      default: return P_L;
    endcase
  endfunction

endpackage
