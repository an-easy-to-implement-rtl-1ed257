// ffc_pkg: types and constants shared by the full-credit flow control (FFC-CR)
// torus router.
//
// A packet is a run of flits; every flit carries its packet's header fields
// (destination, length) so that any flit at the head of a queue can be routed
// without extra per-queue state. The link between two routers carries one flit
// per cycle plus a side band that names the virtual channel (VC) and whether
// the flit is written into the downstream escape buffer or the shared
// adaptive buffer. Credits flow back on a separate bundle: one adaptive credit
// per cycle, a credit count per escape VC (one released flit in normal
// operation, or the whole accumulated count Ca when a bubble swap ends), and a
// bubble-assertion bit per escape VC (the B_ctrl line).
//
// Numbers that follow the description: four VCs per port, a bubble of twelve
// flits (one longest packet), escape buffers one bubble deep. The adaptive
// buffer depth, flit payload width and coordinate width are this design's own
// choices.
package ffc_pkg;

  localparam int unsigned NUM_VC    = 4;   // message-class VCs per port
  localparam int unsigned MAX_PKT   = 12;  // longest packet = bubble size (flits)
  localparam int unsigned ESC_DEPTH = 12;  // escape buffer per VC = one bubble
  localparam int unsigned ADP_DEPTH = 48;  // shared adaptive (DAMQ) buffer per port
  localparam int unsigned NUM_PORTS = 5;   // X+, X-, Y+, Y-, local

  localparam int unsigned VC_W    = $clog2(NUM_VC);
  localparam int unsigned LEN_W   = $clog2(MAX_PKT + 1);
  localparam int unsigned COORD_W = 3;     // up to 8 x 8 torus
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned ECNT_W  = $clog2(ESC_DEPTH + 1);
  localparam int unsigned ACNT_W  = $clog2(ADP_DEPTH + 1);
  localparam int unsigned PORT_W  = 3;

  // Port numbering. Input port p receives flits travelling in direction p,
  // so input p and output p of one router belong to the same ring.
  typedef enum logic [PORT_W-1:0] {
    P_XP  = 3'd0,
    P_XM  = 3'd1,
    P_YP  = 3'd2,
    P_YM  = 3'd3,
    P_LOC = 3'd4
  } port_e;

  typedef struct packed {
    logic               head;
    logic               tail;
    logic [COORD_W-1:0] dx;    // destination column
    logic [COORD_W-1:0] dy;    // destination row
    logic [LEN_W-1:0]   len;   // packet length in flits
    logic [DATA_W-1:0]  data;
  } flit_t;

  typedef struct packed {
    logic            valid;
    logic            esc;     // 1: write into escape buffer of VC vc
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  typedef struct packed {
    logic                          adp;     // one adaptive-buffer flit freed
    logic [NUM_VC-1:0][ECNT_W-1:0] esc;     // escape credits returned per VC
    logic [NUM_VC-1:0]             bubble;  // B_ctrl: bubble now upstream of sender
  } cred_t;

  // One-cycle event strobes a router reports, for statistics and tests.
  typedef struct packed {
    logic swap;         // a bubble swap finished (bubble moved upstream)
    logic hold;         // an escape credit was held back in Ca
    logic escape;       // a blocked adaptive packet was granted an escape port
    logic esc_back;     // an escape packet was granted back to the adaptive network
    logic ring_fwd;     // an escape packet continued in its ring
    logic ring_enter;   // a packet entered an escape ring from outside it
  } ev_t;

endpackage
