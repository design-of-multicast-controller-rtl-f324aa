// mc_control: the multicast control of one router port.
//
// It handles one message at a time from the input multiplexer, using the
// port's tree memory, and queues the messages it produces for the crossbar.
//
// Circulation: a data packet carries the SID it has at this port; the entry
// at that SID names the children, and a copy goes to each child with the
// child's own SID, so no address lookup is needed after the root.
//
// Binary circulation tree: the position of a port in a tree is fixed by its
// ID. A port at level i has its left child where bit i of the child's ID
// (bit 0 = MSB) is 0 and its right child where it is 1.
//  * ADD(new ID), entering at the root: each port passes the request to the
//    child selected by bit <its level> of the new ID; the port whose selected
//    slot is empty reserves the slot and sends ATTACH to the new port. The
//    new port takes its lowest free SID, writes an entry one level below the
//    parent and reports the SID to the parent with SETCHILD.
//  * REMOVE(ID), entering at the root: routed the same way down to the
//    leaving port. A leaf simply clears its slot at the parent (SETCHILD with
//    an empty child). Otherwise it frees its entry and sends REPLACE to one
//    child (the right one if present, else the left one). A port that gets
//    REPLACE moves one level up into the vacated position: it adopts the
//    parent and the sibling carried by the message, tells the parent
//    (SETCHILD) and the sibling (SETPARENT) about itself, and passes REPLACE
//    on to one of its own old children, which refills the slot it left. The
//    chain stops at a leaf. All ports on the path thus move one level up.
//  * CREATE starts a session at its root port (level 0, no parent) and
//    reports the allocated SID on created_valid/created_sid.
// The add and remove procedures, the forwarding by ID bits, the tree memory
// contents and the upward move along one path follow the letter. The message
// set, the SID allocation, the right-child-first choice of the replacement
// path (it reproduces the letter's worked example) and the rule that the
// root never leaves are this design's choices. Requests for one session
// must be issued one at a time: a request that overtakes an unfinished one
// of the same session may see a half-updated tree.
//
// Timing: a message is accepted in IDLE (memory read issued), processed in
// EXEC one cycle later (memory written, up to three messages prepared), and
// the prepared messages are pushed to the output one per cycle from the next
// cycle on. A message that produces nothing takes 2 cycles, one that produces
// k messages 2 + k cycles when the output is ready.
module mc_control
  import mc_pkg::*;
#(
  parameter port_t MY_ID = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  // messages in (from the multiplexer)
  input  logic   in_valid,
  output logic   in_ready,
  input  msg_t   in_msg,
  // messages out (to the output queue)
  output logic   out_valid,
  input  logic   out_ready,
  output msg_t   out_msg,
  // tree memory
  output sid_t   mem_raddr,
  input  entry_t mem_rdata,
  output logic   mem_we,
  output sid_t   mem_waddr,
  output entry_t mem_wdata,
  input  logic   mem_free_any,
  input  sid_t   mem_free_sid,
  // session created at this root
  output logic   created_valid,
  output sid_t   created_sid,
  // activity pulses
  output evt_t   evt
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_EMIT} state_e;

  state_e       state_q;
  msg_t         m_q;          // message being processed
  msg_t   [2:0] pend_q;       // prepared output messages
  logic   [2:0] pend_vld_q;

  // EXEC results
  msg_t   [2:0] gen;
  logic   [2:0] gen_vld;

  localparam node_t NODE_NONE = '0;

  assign in_ready  = (state_q == S_IDLE);
  assign mem_raddr = in_msg.sid;

  // Processing of the message held in m_q against its entry.
  always_comb begin
    entry_t e, ne;
    logic   d, c, dir_up;
    msg_t   t;

    e       = mem_rdata;
    ne      = e;
    mem_we  = 1'b0;
    mem_waddr = m_q.sid;
    gen     = '0;
    gen_vld = '0;
    evt     = '0;
    created_valid = 1'b0;
    created_sid   = mem_free_sid;
    d = 1'b0; c = 1'b0; dir_up = 1'b0;
    t = '0;

    if (state_q == S_EXEC) begin
      unique case (m_q.kind)
        MSG_DATA: begin
          if (e.vld && (e.child[0].vld || e.child[1].vld)) begin
            for (int k = 0; k < 2; k++) begin
              t      = m_q;
              t.dest = e.child[k].port;
              t.sid  = e.child[k].sid;
              gen[k]     = t;
              gen_vld[k] = e.child[k].vld;
            end
            evt.data_fwd  = 1'b1;
            evt.data_fork = e.child[0].vld && e.child[1].vld;
          end else if (!e.vld) begin
            evt.drop = 1'b1;
          end
        end

        MSG_CREATE: begin
          if (mem_free_any) begin
            mem_we    = 1'b1;
            mem_waddr = mem_free_sid;
            ne        = '0;
            ne.vld    = 1'b1;
            created_valid = 1'b1;
            evt.create    = 1'b1;
          end else begin
            evt.drop = 1'b1;
          end
        end

        MSG_ADD: begin
          if (!e.vld || m_q.a.port == MY_ID || int'(e.level) >= PORT_W) begin
            evt.drop = 1'b1;
          end else begin
            d = id_bit(m_q.a.port, e.level);
            if (e.child[d].vld) begin
              t      = m_q;
              t.dest = e.child[d].port;
              t.sid  = e.child[d].sid;
              gen[0] = t; gen_vld[0] = 1'b1;
              evt.add_fwd = 1'b1;
            end else begin
              // reserve the slot; the SID arrives with SETCHILD
              ne.child[d].vld  = 1'b1;
              ne.child[d].port = m_q.a.port;
              ne.child[d].sid  = '0;
              mem_we = 1'b1;
              t       = '0;
              t.kind  = MSG_ATTACH;
              t.dest  = m_q.a.port;
              t.level = e.level + 1'b1;
              t.dir   = d;
              t.a     = '{vld: 1'b1, port: MY_ID, sid: m_q.sid};
              gen[0] = t; gen_vld[0] = 1'b1;
              evt.add_place = 1'b1;
            end
          end
        end

        MSG_ATTACH: begin
          t      = '0;
          t.kind = MSG_SETCHILD;
          t.dest = m_q.a.port;
          t.sid  = m_q.a.sid;
          t.dir  = m_q.dir;
          if (mem_free_any) begin
            mem_we    = 1'b1;
            mem_waddr = mem_free_sid;
            ne        = '0;
            ne.vld    = 1'b1;
            ne.level  = m_q.level;
            ne.parent = m_q.a;
            t.a       = '{vld: 1'b1, port: MY_ID, sid: mem_free_sid};
            evt.attach = 1'b1;
          end else begin
            t.a      = NODE_NONE;   // give the reserved slot back
            evt.drop = 1'b1;
          end
          gen[0] = t; gen_vld[0] = 1'b1;
        end

        MSG_SETCHILD: begin
          if (e.vld) begin
            ne.child[m_q.dir] = m_q.a;
            mem_we = 1'b1;
            evt.set_child = 1'b1;
          end else begin
            evt.drop = 1'b1;
          end
        end

        MSG_SETPARENT: begin
          if (e.vld) begin
            ne.parent = m_q.a;
            mem_we = 1'b1;
            evt.set_parent = 1'b1;
          end else begin
            evt.drop = 1'b1;
          end
        end

        MSG_REMOVE: begin
          if (!e.vld) begin
            evt.drop = 1'b1;
          end else if (m_q.a.port != MY_ID) begin
            if (int'(e.level) < PORT_W) d = id_bit(m_q.a.port, e.level);
            if (int'(e.level) < PORT_W && e.child[d].vld) begin
              t      = m_q;
              t.dest = e.child[d].port;
              t.sid  = e.child[d].sid;
              gen[0] = t; gen_vld[0] = 1'b1;
              evt.remove_fwd = 1'b1;
            end else begin
              evt.drop = 1'b1;        // not a member of this tree
            end
          end else if (!e.parent.vld || e.level == '0) begin
            evt.drop = 1'b1;          // the root does not leave
          end else begin
            ne     = '0;              // free the entry
            mem_we = 1'b1;
            dir_up = id_bit(MY_ID, lvl_t'(e.level - 1'b1));
            if (!e.child[0].vld && !e.child[1].vld) begin
              t      = '0;
              t.kind = MSG_SETCHILD;
              t.dest = e.parent.port;
              t.sid  = e.parent.sid;
              t.dir  = dir_up;
              t.a    = NODE_NONE;
              evt.leave_leaf = 1'b1;
            end else begin
              c       = e.child[1].vld;
              t       = '0;
              t.kind  = MSG_REPLACE;
              t.dest  = e.child[c].port;
              t.sid   = e.child[c].sid;
              t.level = e.level;
              t.a     = e.parent;
              t.b     = e.child[!c];
              evt.leave_repl = 1'b1;
            end
            gen[0] = t; gen_vld[0] = 1'b1;
          end
        end

        MSG_REPLACE: begin
          if (!e.vld || m_q.level == '0 || int'(m_q.level) >= PORT_W) begin
            evt.drop = 1'b1;
          end else begin
            d      = id_bit(MY_ID, m_q.level);                  // slot this port left
            dir_up = id_bit(MY_ID, lvl_t'(m_q.level - 1'b1));   // slot it takes
            ne.level    = m_q.level;
            ne.parent   = m_q.a;
            ne.child[!d] = m_q.b;
            ne.child[d]  = NODE_NONE;   // refilled by the next REPLACE
            mem_we = 1'b1;
            evt.replace = 1'b1;
            // tell the new parent
            t      = '0;
            t.kind = MSG_SETCHILD;
            t.dest = m_q.a.port;
            t.sid  = m_q.a.sid;
            t.dir  = dir_up;
            t.a    = '{vld: 1'b1, port: MY_ID, sid: m_q.sid};
            gen[0] = t; gen_vld[0] = 1'b1;
            // tell the adopted sibling
            t      = '0;
            t.kind = MSG_SETPARENT;
            t.dest = m_q.b.port;
            t.sid  = m_q.b.sid;
            t.a    = '{vld: 1'b1, port: MY_ID, sid: m_q.sid};
            gen[1] = t; gen_vld[1] = m_q.b.vld;
            // pull one old child up into the slot just left
            if (e.child[0].vld || e.child[1].vld) begin
              c       = e.child[1].vld;
              t       = '0;
              t.kind  = MSG_REPLACE;
              t.dest  = e.child[c].port;
              t.sid   = e.child[c].sid;
              t.level = m_q.level + 1'b1;
              t.a     = '{vld: 1'b1, port: MY_ID, sid: m_q.sid};
              t.b     = e.child[!c];
              gen[2] = t; gen_vld[2] = 1'b1;
            end
          end
        end

        default: evt.drop = 1'b1;
      endcase
    end
    mem_wdata = ne;
  end

  // Output: the lowest pending message first.
  always_comb begin
    out_valid = 1'b0;
    out_msg   = pend_q[0];
    for (int k = 2; k >= 0; k--) begin
      if (pend_vld_q[k]) begin
        out_valid = (state_q == S_EMIT);
        out_msg   = pend_q[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == S_IDLE && in_valid) m_q <= in_msg;
    if (state_q == S_EXEC)             pend_q <= gen;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      pend_vld_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (in_valid) state_q <= S_EXEC;
        S_EXEC: begin
          pend_vld_q <= gen_vld;
          state_q    <= (gen_vld != '0) ? S_EMIT : S_IDLE;
        end
        S_EMIT: if (out_ready) begin
          logic [2:0] rest;
          rest = pend_vld_q;
          for (int k = 0; k < 3; k++) begin
            if (pend_vld_q[k]) begin
              rest[k] = 1'b0;
              break;
            end
          end
          pend_vld_q <= rest;
          if (rest == '0) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_no_emit_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> state_q == S_EMIT);
endmodule
