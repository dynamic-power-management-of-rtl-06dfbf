// tb_pm_noc_mesh: end-to-end test of the mesh with a power budget of a
// third of the default, so that every power mechanism is driven: each one
// must happen at least once, and every flit must still be delivered in
// order.
module tb_pm_noc_mesh;
  tb_mesh_harness #(.FULL(1'b0), .P_ALLOC(64'd8000000), .CHECK_ALL(1'b1)) h ();
endmodule
