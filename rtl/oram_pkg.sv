// oram_pkg: shared types of the Path ORAM controller with last path caching.
//
// Holds the controller's state encoding and the small helper functions that
// the controller and its testbenches share: the index of a tree node on a
// path, and the test whether two paths share the node at a given level.
// Levels are numbered from 0 (root) to L (leaf); a path is named by the ID of
// its leaf, L bits wide, whose most significant bits select the branch taken
// near the root.
package oram_pkg;

  // Controller phases, in the order one ORAM access walks through them.
  typedef enum logic [4:0] {
    S_IDLE,        // wait for an ORAM request
    S_LOOKUP,      // step 1: search the stash (and with it the LPC)
    S_HIT_RD,      // stash hit: read the tag RAM for the block's leaf ID
    S_RESP_HIT,    // answer a stash hit
    S_PREP,        // overlapped LPC levels: hand their blocks back to the stash
    S_SCAN,        // register blocks waiting in the stash to the heap
    S_SCAN_PUSH,   //   (tag RAM read latency)
    S_RD_REQ,      // step 3: request the non-overlapped buckets of the path
    S_RD_RSP,      //   receive Z block tags per bucket
    S_RD_DONE,     // requested block never written: create it
    S_RESP_MISS,   // answer the request after the path read
    S_WB_OLD,      // step 4, per level: retire the LPC's non-overlapped entries
    S_WB_OLD_WR,   //   Delay level: write the retired block to the tree
    S_WB_NEW,      //   fill the level from the heap head
    S_WB_NEW_WR,   //   Reuse level: write the block through to the tree
    S_FINISH       // remember the path in the LPC
  } ctrl_state_e;

  // Two paths share their node at level lvl when their leaf IDs agree in the
  // lvl most significant bits (the root, level 0, is always shared).
  function automatic logic same_node(input logic [31:0] a, input logic [31:0] b,
                                     input int unsigned l_height, input int unsigned lvl);
    logic [31:0] d;
    d = (a ^ b) >> (l_height - lvl);
    return (d == 32'd0);
  endfunction

endpackage
