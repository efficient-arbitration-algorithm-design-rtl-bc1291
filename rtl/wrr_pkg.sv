// Shared constants and types of the weighted round-robin (WRR) bus arbiter.
//
// The arbiter serves four bus masters, and every master has a 4-bit weight:
// the number of acknowledged bus slots it may hold in a row before the grant
// passes on. Both numbers are those of the reference configuration; the
// sub-blocks take them as parameters, so they can be reused for other sizes.
package wrr_pkg;

  // Number of bus masters (width of hbusreq / hgrant).
  localparam int unsigned NUM_REQ  = 4;
  // Width of one weight value.
  localparam int unsigned WEIGHT_W = 4;

  typedef logic [NUM_REQ-1:0]  req_vec_t;
  typedef logic [WEIGHT_W-1:0] weight_t;

endpackage
