// xbar_pkg: sizes and types shared by the crossbar switch and its scheduler.
//
// The switch has N_IN input ports and N_OUT output ports (4 x 3, the
// configuration of the switch this RTL describes). Each input asks for one
// output port at a time, named by a dest_t index. DATA_W, the width of the
// data that crosses the switch, is a choice of this design: the switch
// definition fixes only the port counts, so 8 bits is used as a placeholder
// width that any instance may override.
package xbar_pkg;

  parameter int unsigned N_IN   = 4;   // input ports I0..I3
  parameter int unsigned N_OUT  = 3;   // output ports O0..O2
  parameter int unsigned DATA_W = 8;   // payload width (own choice)

  localparam int unsigned DEST_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int unsigned SRC_W  = (N_IN  > 1) ? $clog2(N_IN)  : 1;

  typedef logic [DEST_W-1:0] dest_t;   // output port number
  typedef logic [SRC_W-1:0]  src_t;    // input port number
  typedef logic [DATA_W-1:0] data_t;   // payload word

endpackage
