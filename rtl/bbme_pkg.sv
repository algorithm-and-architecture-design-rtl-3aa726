// bbme_pkg: types shared by the blocks of the bi-directional binary motion
// estimator (BBME).
package bbme_pkg;

  typedef logic signed [5:0] bmvc_t;   // one MV component, -32..31
  typedef struct packed {
    bmvc_t x;
    bmvc_t y;
  } bmv_t;

  typedef enum logic [1:0] {LVL1 = 2'd0, LVL2 = 2'd1, LVL3 = 2'd2} lvl_t;

endpackage
