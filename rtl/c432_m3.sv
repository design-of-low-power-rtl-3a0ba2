// c432_m3: bus C stage of the c432 interrupt controller.
//
// pc is high when an enabled C channel requests on a channel still open
// after buses A and B (masks x1 and x2). Ports and widths follow the
// document's block diagram. Purely combinational.
module c432_m3
  import c432_pkg::*;
(
  input  chan_vec_t x1,
  input  chan_vec_t x2,
  input  chan_vec_t c,
  input  chan_vec_t e,
  output logic      pc
);
  assign pc = |(c & e & x1 & x2);
endmodule
