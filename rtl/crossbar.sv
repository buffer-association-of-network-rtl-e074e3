// crossbar: the router's switch.
//
// Every output has its own multiplexer, so each output can be connected to
// any input while other outputs carry other inputs: a blocked output never
// blocks another output. sel[o] is the one-hot grant of output o's arbiter
// (bit i set = input i connected). An output with no grant bit set carries
// zero with valid low. Purely combinational.
module crossbar #(
  parameter int unsigned NUM_PORTS = noc_pkg::NUM_PORTS,
  parameter int unsigned W         = noc_pkg::DATA_W
) (
  input  logic [NUM_PORTS-1:0][W-1:0]         in_data,
  input  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] sel,      // [output][input]
  output logic [NUM_PORTS-1:0][W-1:0]         out_data,
  output logic [NUM_PORTS-1:0]                out_valid
);
  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      out_data[o]  = '0;
      out_valid[o] = |sel[o];
      for (int unsigned i = 0; i < NUM_PORTS; i++)
        if (sel[o][i]) out_data[o] = out_data[o] | in_data[i];
    end
  end
endmodule
