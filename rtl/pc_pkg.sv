// pc_pkg: types and constants shared by the packet classifier.
//
// NLANE is the number of packets classified side by side. The published
// design reads the data memory of every processing element through two
// ports, so two packets enter the pipeline in every clock cycle; that
// number is fixed here. The update command and response encodings are
// choices of this implementation.
package pc_pkg;

  // Two concurrent packets per cycle (dual read-port data memory).
  localparam int unsigned NLANE = 2;

  // Rule update command. UPD_WRITE inserts the rule if its rule ID is not
  // in the rule set yet and modifies it otherwise; UPD_DELETE removes it.
  typedef enum logic {
    UPD_WRITE  = 1'b0,
    UPD_DELETE = 1'b1
  } upd_op_e;

  // Outcome of an update command.
  typedef enum logic [2:0] {
    ST_INSERTED  = 3'd0,  // RID was new, stored in a free slot
    ST_MODIFIED  = 3'd1,  // RID existed, its bit vectors and priority rewritten
    ST_DELETED   = 3'd2,  // RID existed, its valid bit cleared
    ST_FULL      = 3'd3,  // insertion refused: no invalid slot left
    ST_NOT_FOUND = 3'd4   // deletion refused: RID not in the rule set
  } upd_status_e;

endpackage
