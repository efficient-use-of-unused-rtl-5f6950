// fuse_cell -- behavioural model of one fuse latch (not synthesizable logic).
//
// The circuit is a fuse from VDD to a sense node, an NMOS pull-down on the
// node driven by FUSE_CTRL, an inverter from the node to EN, and an NMOS
// keeper from the node to VSS gated by EN. With the fuse intact the node is
// held high and EN is 0. With the fuse blown, a FUSE_CTRL pulse discharges
// the node, EN rises and the keeper holds the node low, so EN stays 1.
// The model keeps the fuse state in `blown`, cleared at power-up and set by
// a pulse on `prog` (standing for laser or electrical programming); `node`
// follows the rules above and keeps its value when nothing drives it, so
// lint reports a latch on `node`: that latch is the keeper of the circuit.
module fuse_cell (
  input  logic prog,       // blow the fuse (rising edge)
  input  logic fuse_ctrl,  // sense pulse
  output logic en
);
  logic blown;
  logic node;

  initial begin
    blown = 1'b0;
    node  = 1'b1;
  end

  always @(posedge prog) blown <= 1'b1;

  always_latch begin
    if (!blown)         node = 1'b1;    // intact fuse pulls the node to VDD
    else if (fuse_ctrl) node = 1'b0;    // discharged; keeper holds it low
  end

  assign en = ~node;
endmodule
