// core_alu: the arithmetic unit of one ring core. In every time cycle it
// forms one product w[y][x] * Is[x] and adds the running sum Istim[y] of the
// previous cycles to it, giving the new Istim[y]:
//     istim_out = w * is_val + istim_in
// One multiplication and one addition per cycle is the unit the ring is built
// around. The unit is purely combinational; the result is written back into
// the core's registers at the clock edge that ends the time cycle.
// The result wraps modulo 2**DATA_W (no saturation), a choice of this design.
module core_alu
  import ring_pkg::*;
(
  input  data_t w,          // weight element w[y][x]
  input  data_t is_val,     // vector element Is[x]
  input  data_t istim_in,   // partial sum Istim[y] so far
  output data_t istim_out   // w*Is + Istim
);

  data_t product;   // low DATA_W bits of the full product

  always_comb begin
    product   = w * is_val;
    istim_out = product + istim_in;
  end

endmodule
