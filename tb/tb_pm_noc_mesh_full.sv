// tb_pm_noc_mesh_full: the whole mesh with every parameter at its default
// (4x4 routers, 256-cycle power windows, the default power budget), run
// through the quiet, loaded and drain phases of the traffic harness, with
// uniform random destinations (no hot spot). It
// checks delivery and order and reports how often each power mechanism
// acted.
module tb_pm_noc_mesh_full;
  tb_mesh_harness #(.FULL(1'b1), .CHECK_ALL(1'b0), .HOT_SPOT(1'b0)) h ();
endmodule
