// fuse_box -- fuse set describing one spare column.
//
// Holds, in fuse_cell latches, a flag fuse USED (the spare repairs a normal
// column), a fuse BAD (the spare column itself is defective) and AW address
// fuses giving the normal column the spare replaces. A fuse is blown by a
// rising edge of `prog` while its bit of the programming value is 1; all
// fuses are sensed by the common fuse_ctrl pulse after power-up. The EN
// output (FA in the block diagram) is USED or BAD: 1 means the spare is
// unavailable for an extra check bit. The separate BAD fuse and the binary
// address encoding are this design's own choices.
module fuse_box #(
  parameter int AW = $clog2(secded_pkg::N)
) (
  input  logic          fuse_ctrl,
  input  logic          prog,
  input  logic          prog_used,
  input  logic          prog_bad,
  input  logic [AW-1:0] prog_addr,
  output logic          used,
  output logic [AW-1:0] addr,
  output logic          en
);
  fuse_cell u_used (.prog(prog & prog_used), .fuse_ctrl(fuse_ctrl), .en(used));
  logic bad;

  fuse_cell u_bad  (.prog(prog & prog_bad),  .fuse_ctrl(fuse_ctrl), .en(bad));

  for (genvar i = 0; i < AW; i++) begin : g_addr
    fuse_cell u_a (.prog(prog & prog_addr[i]), .fuse_ctrl(fuse_ctrl), .en(addr[i]));
  end

  assign en = used | bad;
endmodule
