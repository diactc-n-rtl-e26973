// diactc_pkg: types shared by every block of the DiaCTC(N) switch.
//
// A cell is the fixed-size unit the switch moves in one time slot (one clock
// cycle). Each cell carries a valid bit, the input port it entered the switch
// at (src), its destination output port (dst) and a payload. Port fields are
// PORT_W bits wide, so one set of types serves every switch size up to
// 2**PORT_W ports; each module checks its own N against that limit.
// The payload width and the port field width are this design's choice: the
// switch architecture only needs the destination to route a cell.
package diactc_pkg;

  localparam int unsigned PORT_W = 8;    // port index field, up to 256 ports
  localparam int unsigned DATA_W = 64;   // payload bits carried per cell

  typedef logic [PORT_W-1:0] port_t;

  typedef struct packed {
    logic              valid;
    port_t             src;
    port_t             dst;
    logic [DATA_W-1:0] data;
  } cell_t;

  localparam cell_t NO_CELL = '0;

  // The two states of a crosspoint switching element.
  typedef enum logic {
    SE_CR = 1'b0,   // cross: row and column lines pass straight through
    SE_RT = 1'b1    // receive-and-transmit: row cell goes down the column,
                    // the cell arriving from upstream is taken into the row's port
  } se_state_e;

endpackage
