// mc_pkg: types and constants shared by the multicast controller.
//
// A router of N_PORTS ports circulates multicast packets through a unicast
// crossbar along a binary circulation tree. Every port keeps a tree memory
// with one entry per session that passes it; the entry address is the
// session identification number (SID) local to that port. An entry holds the
// port's tree level, its parent and its two children, each as (port ID, SID).
//
// Everything that travels between ports (data packets and the control
// messages that build and repair trees) uses one message format, msg_t.
// The message kinds and their fields are this design's own encoding; the
// letter that describes the algorithm gives no message format.
//
// All registers use a synchronous, active-low reset (rst_n).
//
// Defaults: 16 ports (4-bit port IDs, as in the worked examples of the
// algorithm), 256 sessions per port and a 16-bit data tag are assumptions.
package mc_pkg;

  parameter int unsigned N_PORTS  = 16;   // router ports
  parameter int unsigned N_SID    = 256;  // tree memory entries per port
  parameter int unsigned DATA_W   = 16;   // data packet tag carried through the tree

  localparam int unsigned PORT_W  = $clog2(N_PORTS);
  localparam int unsigned SID_W   = $clog2(N_SID);
  // A port at level L sits at the tree position spelled by the first L bits of
  // its ID, so levels run from 0 (root) to PORT_W.
  localparam int unsigned LVL_W   = $clog2(PORT_W + 1);

  typedef logic [PORT_W-1:0] port_t;
  typedef logic [SID_W-1:0]  sid_t;
  typedef logic [LVL_W-1:0]  lvl_t;

  // Reference to a tree node: a port and the SID of the session at that port.
  typedef struct packed {
    logic  vld;
    port_t port;
    sid_t  sid;
  } node_t;

  // One tree memory entry. child[0] is the left child (ID bit 0 at this level),
  // child[1] the right child (ID bit 1).
  typedef struct packed {
    logic         vld;
    lvl_t         level;
    node_t        parent;
    node_t [1:0]  child;
  } entry_t;

  typedef enum logic [2:0] {
    MSG_DATA      = 3'd0, // multicast packet: forward a copy to every child
    MSG_CREATE    = 3'd1, // new session rooted at this port: allocate a SID
    MSG_ADD       = 3'd2, // request: add port a.port; routed down by its ID bits
    MSG_ATTACH    = 3'd3, // to the new port: create an entry under parent a
    MSG_REMOVE    = 3'd4, // request: remove port a.port; routed down by its ID bits
    MSG_REPLACE   = 3'd5, // move one level up: new parent a, new level, sibling b
    MSG_SETCHILD  = 3'd6, // overwrite child[dir] with a
    MSG_SETPARENT = 3'd7  // overwrite parent with a
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e          kind;
    port_t              dest;   // port the crossbar delivers this message to
    sid_t               sid;    // entry addressed at the destination port
    lvl_t               level;  // ATTACH, REPLACE: level the receiver takes
    logic               dir;    // ATTACH, SETCHILD: child slot at the parent
    node_t              a;      // see msg_kind_e
    node_t              b;      // REPLACE: sibling that becomes a child
    logic [DATA_W-1:0]  data;   // DATA: packet tag
  } msg_t;

  // Per-message activity pulses of one multicast control, for statistics.
  typedef struct packed {
    logic data_fwd;     // a data packet was circulated (at least one copy)
    logic data_fork;    // a data packet was copied to two children
    logic create;       // a session was created at this (root) port
    logic add_fwd;      // an add request was passed to a child
    logic add_place;    // an add request found the free slot for the new port
    logic attach;       // this port joined a tree
    logic remove_fwd;   // a remove request was passed to a child
    logic leave_leaf;   // this port left the tree as a leaf
    logic leave_repl;   // this port left the tree and a child replaces it
    logic replace;      // this port moved one level up
    logic set_child;    // a child pointer was rewritten
    logic set_parent;   // a parent pointer was rewritten
    logic drop;         // message ignored (unknown SID, no free SID, ...)
  } evt_t;

  // Bit i of a port ID, counting i = 0 as the most significant bit.
  function automatic logic id_bit(port_t id, lvl_t i);
    return id[PORT_W-1-int'(i)];
  endfunction

endpackage
