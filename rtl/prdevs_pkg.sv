// prdevs_pkg: types and constants shared by the DEVS simulation platform.
//
// The platform simulates a flat DEVS model on an FPGA: a coordinator drives
// simulation cycles over a control bus, components exchange messages over a
// broadcast communication bus and ask for structure changes over an SC bus.
// This package holds the field widths and the packed structs that carry the
// three buses. The signal names (step, tn_min, stepped, tn, tn_valid,
// ack_stepped, sc, sc_type, sc_parm_*, update_connection) follow the
// platform description; every width below is a choice of this design, as the
// description only says that times are bounded integers and ids are vectors.
package prdevs_pkg;

  parameter int TN_W      = 32;  // width of every simulation time value (tn_type)
  parameter int COMP_ID_W = 8;   // component identifier; 0 means "no component"
  parameter int PORT_ID_W = 4;   // port identifier inside a component
  parameter int VALUE_W   = 8;   // message payload on the communication bus
  parameter int BS_ID_W   = 8;   // bitstream identifier handed to the PR controller

  typedef logic [TN_W-1:0]      tn_t;
  typedef logic [COMP_ID_W-1:0] comp_id_t;
  typedef logic [PORT_ID_W-1:0] port_id_t;
  typedef logic [VALUE_W-1:0]   value_t;
  typedef logic [BS_ID_W-1:0]   bs_id_t;

  // Full identifier of a port: component id plus port id.
  typedef struct packed {
    comp_id_t comp;
    port_id_t port;
  } full_id_t;

  // Component library of the generator/counter example. CT_BLANK is an
  // empty reconfigurable area.
  typedef enum logic [1:0] {
    CT_BLANK   = 2'd0,
    CT_GEN1    = 2'd1,
    CT_GEN2    = 2'd2,
    CT_COUNTER = 2'd3
  } comp_type_t;

  // Structure-change functions kept in the hardware platform.
  typedef enum logic [1:0] {
    SC_ADD_COMPONENT     = 2'd0,
    SC_REMOVE_COMPONENT  = 2'd1,
    SC_ADD_CONNECTION    = 2'd2,
    SC_REMOVE_CONNECTION = 2'd3
  } sc_type_t;

  // Control bus, coordinator to components (broadcast).
  typedef struct packed {
    logic step;    // one-cycle pulse: a simulation cycle starts
    tn_t  tn_min;  // time of the cycle, held until the next step
  } ctrl_down_t;

  // Control bus, one component to the coordinator.
  typedef struct packed {
    logic stepped;   // held until ack_stepped
    tn_t  tn;        // next event time of the component
    logic tn_valid;  // 0: tn is infinite
  } ctrl_up_t;

  // Communication bus message (also used as the request of one area).
  typedef struct packed {
    logic     valid;
    full_id_t sender;  // full id of the emitting output port
    value_t   value;
  } msg_t;

  // Structure-change call from a component (held until sc_done).
  typedef struct packed {
    logic       sc;
    sc_type_t   sc_type;
    comp_type_t comp_type;   // addComponent parameter
    comp_id_t   compo_id_1;  // output side / target component
    port_id_t   port_id_1;
    comp_id_t   compo_id_2;  // input side
    port_id_t   port_id_2;
  } sc_req_t;

  // Connection update broadcast on the SC bus.
  typedef struct packed {
    logic     update_connection;
    full_id_t out_id;  // 0 when the connection is removed
    full_id_t in_id;
  } conn_upd_t;

  // Port numbering of the example library.
  localparam port_id_t GEN_EVENT_PORT     = 4'd1;
  localparam port_id_t COUNTER_EVENT_PORT = 4'd1;

endpackage
