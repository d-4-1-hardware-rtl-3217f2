// noc_pkg: types and constants shared by the partitionable, runtime-reconfigurable
// mesh network (LBDR routing, OSR-Lite reconfiguration, priority-class arbitration).
//
// Port order N, E, W, S, L follows the routing-option list of the LBDR logic.
// The 32-bit flit width, 8-level (3-bit) QoS field and 4+4-bit destination address
// are the document's; the bit positions of the header fields, the head/tail sideband
// flags and the circuit-enable bit are this design's own choices.
package noc_pkg;

  localparam int NPORTS    = 5;
  localparam int FLIT_W    = 32;   // flit width
  localparam int COORD_W   = 4;    // 4 bits per coordinate (8-bit destination)
  localparam int PRIO_W    = 3;    // 8 priority levels, 0 lowest, 7 highest
  localparam int NPRIO     = 1 << PRIO_W;

  // Port indices
  localparam int P_N = 0;
  localparam int P_E = 1;
  localparam int P_W = 2;
  localparam int P_S = 3;
  localparam int P_L = 4;

  typedef logic [NPORTS-1:0] portvec_t;

  // Header flit layout (within the 32 data bits)
  //   [3:0]   destination x
  //   [7:4]   destination y
  //   [10:8]  QoS priority level
  //   [11]    message type: 0 = local (intra-partition), 1 = global
  //   [31:12] free for the upper protocol layers
  typedef struct packed {
    logic [FLIT_W-13:0] payload;
    logic               global_msg;
    logic [PRIO_W-1:0]  prio;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } header_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // One set of routing bits. Rxy = 1: a packet may leave through x and take
  // y at the next switch.
  typedef struct packed {
    logic ne, nw, en, es, wn, ws, se, sw;
  } rbits_t;

  // Connectivity bits, one per network output port, indexed N, E, W, S.
  typedef logic [3:0] cbits_t;

  // Circuit entry of one input port: 8-bit destination plus 3-bit output port
  // (the 11 bits), and an enable bit.
  typedef struct packed {
    logic               en;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
    logic [2:0]         port;
  } circuit_t;

  // The complete routing configuration of one switch (one LBDR bank).
  typedef struct packed {
    rbits_t   r_local;
    rbits_t   r_global;
    cbits_t   c_local;
    cbits_t   c_global;
    circuit_t [NPORTS-1:0] circ;
  } lbdr_cfg_t;

endpackage
