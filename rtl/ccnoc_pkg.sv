// ccnoc_pkg: shared constants and types of the dual-network (request/response)
// on-chip interconnect.
//
// The chip is a 4x4 grid of tiles. Every tile has one routing node made of two
// switches: a narrow one (48-bit flits) for the request sub-network and a wide
// one (128-bit flits) for the response sub-network. Each tile has two network
// interfaces, one for the core (L1 controllers) and one for the L2 slice and
// directory; both attach to both switches of their tile.
//
// Grid size, flit widths, six switch ports, two-flit buffers and 64-byte cache
// blocks follow the published design. The message header layout below is this
// implementation's own: a 72-bit header is chosen so that a message splits
// into exactly the flit counts the design quotes: 2 (short) or 13 (long) flits
// at 48 bits, 1 or 5 at 128 bits, and 1 or 4 at 176 bits.
package ccnoc_pkg;

  // Grid and endpoints.
  localparam int unsigned MESH_X   = 4;
  localparam int unsigned MESH_Y   = 4;
  localparam int unsigned NUM_TILE = MESH_X * MESH_Y;
  localparam int unsigned NI_PER_TILE = 2;                    // core NI, L2 NI
  localparam int unsigned NUM_EP   = NUM_TILE * NI_PER_TILE;  // 32 endpoints
  localparam int unsigned EP_W     = $clog2(NUM_EP);          // 5

  // Flit widths of the two sub-networks.
  localparam int unsigned REQ_FLIT_W  = 48;
  localparam int unsigned RESP_FLIT_W = 128;

  // Switch: four mesh ports and two network-interface ports.
  localparam int unsigned NPORTS    = 6;
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned BUF_DEPTH = 2;

  typedef enum logic [PORT_W-1:0] {
    P_N   = 3'd0,
    P_E   = 3'd1,
    P_S   = 3'd2,
    P_W   = 3'd3,
    P_NI1 = 3'd4,   // core network interface
    P_NI2 = 3'd5    // L2 slice / directory network interface
  } port_e;

  // Messages.
  localparam int unsigned BLOCK_BITS = 512;   // 64-byte cache block
  localparam int unsigned SEQ_W      = 8;
  localparam int unsigned OP_W       = 5;
  localparam int unsigned ADDR_W     = 48;

  typedef enum logic {
    CLS_REQ  = 1'b0,
    CLS_RESP = 1'b1
  } msg_class_e;

  // Header. The destination sits in the least significant bits so that the
  // first flit of every packet carries it, whatever the flit width.
  // Endpoint id = {tile, ni}, tile = y*MESH_X + x.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [OP_W-1:0]   op;       // coherence message type, opaque to the NoC
    logic [SEQ_W-1:0]  seq;      // per source/destination sequence number
    logic              is_long;  // carries a cache block
    logic [EP_W-1:0]   src;
    logic [EP_W-1:0]   dst;
  } msg_hdr_t;

  localparam int unsigned HDR_W = $bits(msg_hdr_t);   // 72

  typedef struct packed {
    msg_class_e            cls;
    msg_hdr_t              hdr;
    logic [BLOCK_BITS-1:0] data;
  } msg_t;

  // Flit counts of a packet on a network with flits of width w.
  function automatic int unsigned hdr_flits(int unsigned w);
    return (HDR_W + w - 1) / w;
  endfunction

  function automatic int unsigned data_flits(int unsigned w);
    return (BLOCK_BITS + w - 1) / w;
  endfunction

endpackage
