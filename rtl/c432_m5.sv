// c432_m5: 9-line-to-4-line priority encoder of the c432 interrupt
// controller. chan is the binary index of the highest set bit of i, 0 when
// i is zero (then pa, pb and pc are all low). Purely combinational.
module c432_m5
  import c432_pkg::*;
(
  input  chan_vec_t  i,
  output logic [3:0] chan
);
  assign chan = msb_index(i);
endmodule
