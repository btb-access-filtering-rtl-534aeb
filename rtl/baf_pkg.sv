// baf_pkg: types shared by the BTB-access-filtering branch prediction unit.
//
// br_kind_e  is the branch class that the fetch stage knows from predecode
//            when it asks for a prediction (conditional, unconditional jump,
//            call, return).
// tgt_src_e  says which structure supplied the predicted target. The fetch
//            stage hands it back with the resolved branch so the update logic
//            knows which buffers already hold the right target.
package baf_pkg;

  typedef enum logic [1:0] {
    BR_COND   = 2'd0,
    BR_UNCOND = 2'd1,
    BR_CALL   = 2'd2,
    BR_RET    = 2'd3
  } br_kind_e;

  typedef enum logic [1:0] {
    SRC_NONE   = 2'd0,  // no target: predicted not-taken, or no buffer hit
    SRC_FILTER = 2'd1,  // small filter buffer hit
    SRC_MAIN   = 2'd2,  // large main BTB hit
    SRC_RAS    = 2'd3   // return address stack
  } tgt_src_e;

  // Alpha instructions are 4 bytes: the two low PC bits are never stored.
  localparam int unsigned INST_ALIGN = 2;

endpackage
