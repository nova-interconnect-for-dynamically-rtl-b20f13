// nova_pkg: types and constants shared by the NOVA network modules.
//
// A NOVA packet is one 32-bit word: an 8-bit header followed by a 24-bit
// payload, sized so a whole packet crosses a 32-bit link in one clock. The
// header names the destination cluster and the destination tile. The split of
// the header into fields is this design's choice: bits 7:5 hold the cluster,
// bits 4:2 the tile, and bits 1:0 are auxiliary bits that the network carries
// unchanged. The header sits in the upper byte of the word.
//
// Inside a cluster the eight tiles sit on the ring of squares around the tile
// switch. Going clockwise from the top-left corner the tile numbers are
// 0, 3, 5, 6, 7, 4, 2, 1; each tile is linked to the tile before and after it
// on that ring. The functions below convert between tile numbers and ring
// positions.
package nova_pkg;

  localparam int unsigned PKT_W        = 32;
  localparam int unsigned PAYLOAD_W    = 24;
  localparam int unsigned CLUSTER_W    = 3;
  localparam int unsigned TILE_W       = 3;
  localparam int unsigned AUX_W        = 2;
  localparam int unsigned TILES_PER_CLUSTER = 8;

  typedef struct packed {
    logic [CLUSTER_W-1:0] cluster;
    logic [TILE_W-1:0]    tile;
    logic [AUX_W-1:0]     aux;
  } nova_hdr_t;

  typedef struct packed {
    nova_hdr_t            hdr;
    logic [PAYLOAD_W-1:0] payload;
  } nova_pkt_t;

  // Tile number at each clockwise ring position.
  function automatic logic [TILE_W-1:0] ring_tile(input logic [TILE_W-1:0] pos);
    logic [TILE_W-1:0] t;
    unique case (pos)
      3'd0: t = 3'd0;
      3'd1: t = 3'd3;
      3'd2: t = 3'd5;
      3'd3: t = 3'd6;
      3'd4: t = 3'd7;
      3'd5: t = 3'd4;
      3'd6: t = 3'd2;
      default: t = 3'd1;
    endcase
    return t;
  endfunction

  // Clockwise ring position of a tile number.
  function automatic logic [TILE_W-1:0] ring_pos(input logic [TILE_W-1:0] tile);
    logic [TILE_W-1:0] p;
    unique case (tile)
      3'd0: p = 3'd0;
      3'd3: p = 3'd1;
      3'd5: p = 3'd2;
      3'd6: p = 3'd3;
      3'd7: p = 3'd4;
      3'd4: p = 3'd5;
      3'd2: p = 3'd6;
      default: p = 3'd7;
    endcase
    return p;
  endfunction

  // Router port numbering, used for the inputs and outputs of a tile router.
  typedef enum logic [1:0] {
    PORT_LOCAL  = 2'd0,   // the tile's own function (inject / eject)
    PORT_CW     = 2'd1,   // clockwise ring neighbour
    PORT_CCW    = 2'd2,   // counter-clockwise ring neighbour
    PORT_SWITCH = 2'd3    // the cluster's tile switch
  } nova_port_e;

endpackage
