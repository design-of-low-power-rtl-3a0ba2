// c432_pkg: helpers shared by the blocks of the 27-channel interrupt
// controller c432. Channel i of a 9-bit bus has priority over channel j
// when i > j, so both helpers search from the top bit down.
package c432_pkg;

  localparam int unsigned NCH = 9;  // channels per bus

  typedef logic [NCH-1:0] chan_vec_t;

  // one-hot vector of the highest set bit of v (all zero if v is zero)
  function automatic chan_vec_t msb_onehot(chan_vec_t v);
    chan_vec_t oh = '0;
    for (int i = NCH - 1; i >= 0; i--)
      if (v[i]) begin
        oh[i] = 1'b1;
        break;
      end
    return oh;
  endfunction

  // index of the highest set bit of v (0 if v is zero)
  function automatic logic [3:0] msb_index(chan_vec_t v);
    logic [3:0] idx = '0;
    for (int i = NCH - 1; i >= 0; i--)
      if (v[i]) begin
        idx = 4'(i);
        break;
      end
    return idx;
  endfunction

endpackage
