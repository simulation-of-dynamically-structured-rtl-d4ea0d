// decoupler: isolation between one reconfigurable area and the static buses.
//
// While decouple is high, everything the area drives towards the static part
// (its control-bus report, its communication-bus request and its
// structure-change call) is forced to zero, so a component that is being
// reconfigured cannot put spurious requests on a bus. When decouple is low the
// signals pass unchanged. Purely combinational. Placing a decoupler on every
// area follows the platform description; gating only the area-to-static
// direction is this design's choice (the static-to-area signals are harmless
// while the area is also held in reset).
module decoupler
  import prdevs_pkg::*;
(
  input  logic     decouple,
  input  ctrl_up_t rp_ctrl_up,
  input  msg_t     rp_msg_req,
  input  sc_req_t  rp_sc_req,
  output ctrl_up_t st_ctrl_up,
  output msg_t     st_msg_req,
  output sc_req_t  st_sc_req
);
  assign st_ctrl_up = decouple ? '0 : rp_ctrl_up;
  assign st_msg_req = decouple ? '0 : rp_msg_req;
  assign st_sc_req  = decouple ? '0 : rp_sc_req;
endmodule
