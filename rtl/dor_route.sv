// dor_route: dimension-order routing function of the diversion network.
//
// Diverted packets travel on the diversion BVC, whose routing is restricted
// so that its buffer dependency graph has no cycles. In a mesh this is
// dimension-order routing: first correct x, then y, then leave on the host
// port. Node ids are y*8+x. Combinational.
module dor_route
  import dvc_pkg::*;
(
  input  logic [NODE_W-1:0] here,
  input  logic [NODE_W-1:0] dst,
  output logic [PORT_W-1:0] oport
);
  always_comb begin
    if (node_x(dst) > node_x(here))      oport = P_XP;
    else if (node_x(dst) < node_x(here)) oport = P_XM;
    else if (node_y(dst) > node_y(here)) oport = P_YP;
    else if (node_y(dst) < node_y(here)) oport = P_YM;
    else                                 oport = P_HOST;
  end
endmodule
