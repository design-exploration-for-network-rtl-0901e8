// noc_pkg: types and constants shared by the Codec, the router and the networks.
//
// Every packet is a single flit. Its header holds the destination endpoint (one
// endpoint is one Codec, that is one router port facing a group of tiles) and the
// tile address inside that Codec. The tile address is the small extra field the
// Codec adds to a plain router packet so that its receive path can pick the tile;
// with four tiles per Codec it is two bits wide. The header field widths are fixed
// here so that one flit type serves every network size: NODE_W covers up to 64
// Codecs and TILE_W up to 16 tiles per Codec (the largest Codec evaluated). The
// 32-bit payload is this design's choice.
package noc_pkg;

  localparam int unsigned NODE_W  = 6;   // destination Codec (endpoint) id
  localparam int unsigned TILE_W  = 4;   // tile address inside the Codec
  localparam int unsigned DATA_W  = 32;  // payload
  localparam int unsigned PORT_W  = 4;   // router port index, up to 16 ports

  typedef struct packed {
    logic [NODE_W-1:0] dst_node;
    logic [TILE_W-1:0] dst_tile;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Planar topology of one tier in the 3D network.
  typedef enum logic [0:0] {
    TOPO_RING      = 1'b0,
    TOPO_FULL_MESH = 1'b1
  } topo_e;

endpackage
