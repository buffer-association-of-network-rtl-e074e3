// route_decode: decode logic of the router.
//
// Extracts the destination output port of a flit and turns it into a one-hot
// request vector over the NUM_PORTS outputs. The destination is held in the
// top PORT_W bits of the flit (this design's choice of flit format). A
// destination number at or above NUM_PORTS (possible when NUM_PORTS is not a
// power of two) is flagged as invalid and requests no output.
// Purely combinational: no clock, no latency.
module route_decode #(
  parameter int unsigned NUM_PORTS = noc_pkg::NUM_PORTS,
  parameter int unsigned DATA_W    = noc_pkg::DATA_W,
  localparam int unsigned PORT_W   = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic [DATA_W-1:0]    flit,
  output logic [PORT_W-1:0]    dest,
  output logic [NUM_PORTS-1:0] dest_onehot,
  output logic                 dest_ok
);
  always_comb begin
    dest        = flit[DATA_W-1 -: PORT_W];
    dest_ok     = (32'(dest) < NUM_PORTS);
    dest_onehot = '0;
    if (dest_ok) dest_onehot[dest] = 1'b1;
  end
endmodule
