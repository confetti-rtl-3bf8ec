// confetti_pkg: types and constants shared by the CONFETTI platform logic.
//
// Every ERouting FPGA has five link ports: its four cardinal neighbours and the
// ECell board mounted above it. A link carries fixed-width words; the word
// width is this design's choice (the platform only fixes the physical link:
// one forwarded clock pair and two data pairs per direction).
package confetti_pkg;

  // Port numbering of an ERouting node.
  typedef enum logic [2:0] {
    PORT_N     = 3'd0,
    PORT_E     = 3'd1,
    PORT_S     = 3'd2,
    PORT_W     = 3'd3,
    PORT_LOCAL = 3'd4   // the ECell above the node
  } port_e;

  localparam int unsigned N_PORTS = 5;

  // Line symbols of the serial link (two data pairs, D1 is the MSB).
  localparam logic [1:0] SYM_IDLE  = 2'b00;
  localparam logic [1:0] SYM_START = 2'b11;

  // States of the start-up supervisor.
  typedef enum logic [2:0] {
    SUP_OFF      = 3'd0,
    SUP_POWER_UP = 3'd1,
    SUP_CONFIG   = 3'd2,
    SUP_RUN      = 3'd3,
    SUP_SHUTDOWN = 3'd4
  } sup_state_e;

  // Cause of a shutdown, latched by the supervisor.
  typedef enum logic [2:0] {
    FAULT_NONE     = 3'd0,
    FAULT_PGOOD_TO = 3'd1,  // a supply did not come up in time
    FAULT_PGOOD    = 3'd2,  // a supply dropped while running
    FAULT_CFG_TO   = 3'd3,  // ERouting configuration timed out
    FAULT_TEMP     = 3'd4   // a temperature above the trip limit
  } fault_e;

endpackage
