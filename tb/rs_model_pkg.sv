// rs_model_pkg - the functions of the Reed-Solomon core stand-in
// (rs_coder_model), shared with the testbenches that compute its expected
// responses.
package rs_model_pkg;
  import comod_pkg::*;

  function automatic logic [15:0] next_acc(input logic [15:0] acc, input rs_in_t i);
    return {acc[14:0], acc[15] ^ acc[13]} ^ i.i7 ^ {5'd0, i.i2} ^ {11'd0, i.i5};
  endfunction

  function automatic rs_out_t outputs(input logic [15:0] acc, input rs_in_t i);
    rs_out_t o;
    o.data_out      = acc ^ {i.i6, 15'd0};
    o.data_out_size = acc[1:0] ^ {i.i3, i.i4};
    o.ready         = i.i1;
    o.data_valid    = ^acc;
    o.enc_complete  = acc[15];
    o.dec_complete  = i.i6 & acc[0];
    return o;
  endfunction
endpackage
