// addr_mapper: the packetizer's mapping unit, an address decoder that turns
// an AXI address into the mesh coordinates of the destination node.
//
// The address map is this design's own: the top five address bits give the
// node number n of a MESH_X by MESH_Y mesh, numbered row by row, so
// x = n mod MESH_X and y = n div MESH_X. A node number beyond the mesh raises
// err. Purely combinational.
module addr_mapper
  import noc_pkg::*;
#(
  parameter int MESH_X = 5,
  parameter int MESH_Y = 5
) (
  input  logic [ADDR_W-1:0]  addr,
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output logic               err
);
  logic [4:0] node;
  always_comb begin
    node = addr[ADDR_W-1 -: 5];
    x    = COORD_W'(node % 5'(MESH_X));
    y    = COORD_W'(node / 5'(MESH_X));
    err  = (node >= 5'(MESH_X * MESH_Y));
  end
endmodule
