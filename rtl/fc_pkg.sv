// fc_pkg: shared types and constants of the credit-based flow-control
// protocol and of the Ethernet framing used by the network modules.
//
// FC control flit ("header"): 28 bits, field widths as defined by the
// protocol: payload length (12), start-of-packet (1), end-of-packet (1),
// credit-only (1), reserved (1), credit update (12).  The field order below
// follows the protocol drawing (Len first, CU last, Len in the most
// significant bits); the header sits in the low 28 bits of a flit and the
// upper bits of a control flit are zero.  That bit placement, the sync flit
// encoding and the flit width default are this design's choices.
//
// Sync flit: a flit whose upper 32 bits hold SYNC_MAGIC; bit 0 carries the
// "I have heard you" acknowledge used by the connection handshake.
package fc_pkg;

  localparam int unsigned LEN_W  = 12;  // payload length field
  localparam int unsigned CU_W   = 12;  // credit update field
  localparam int unsigned HDR_W  = 28;  // whole FC header

  typedef struct packed {
    logic [LEN_W-1:0] len;  // number of data flits that follow
    logic             sop;  // first data flit starts an application message
    logic             eop;  // last data flit ends an application message
    logic             co;   // credit-only packet (len = 0)
    logic             res;  // reserved, sent as 0
    logic [CU_W-1:0]  cu;   // credits returned to the peer's credit counter
  } fc_hdr_t;

  localparam logic [31:0] SYNC_MAGIC = 32'h5359_4E43;  // "SYNC"

  // Ethernet data link header: destination MAC, source MAC, type/length.
  localparam int unsigned ETH_HDR_BYTES   = 14;
  localparam int unsigned ETH_MIN_PAYLOAD = 46;

  typedef struct packed {
    logic [47:0] dst;
    logic [47:0] src;
    logic [15:0] tl;
  } eth_hdr_t;

endpackage
