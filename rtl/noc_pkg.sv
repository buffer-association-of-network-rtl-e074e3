// noc_pkg: constants and types shared by the router blocks.
//
// The router has NUM_PORTS ports, and each flit is DATA_W bits wide. Every
// input carries a virtual-channel (VC) number beside the flit. Each input
// buffer holds SLOTS flits, shared among NUM_VC virtual channels.
//  - The 8-port size comes from the 8x8 router the design is built around.
//  - The 32-bit flit and the 2-bit VC number match the example flits and
//    VC numbers (up to 3) seen in the reference simulations.
//  - SLOTS = 16 is one of the buffer sizes (4, 8, 16, 32) the input-port
//    comparison covers.
//  - LTR_W (the width of the hold-off count) is this design's choice.
//
// Flit layout: the destination output port sits in the top PORT_W bits.
// The remaining bits are payload. This layout is this design's choice.
package noc_pkg;
  parameter int unsigned NUM_PORTS = 8;
  parameter int unsigned DATA_W    = 32;
  parameter int unsigned NUM_VC    = 4;
  parameter int unsigned SLOTS     = 16;
  parameter int unsigned LTR_W     = 4;

endpackage
