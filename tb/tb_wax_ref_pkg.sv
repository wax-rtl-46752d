// tb_wax_ref_pkg: reference arithmetic for the WAX testbenches.
//
// These functions compute what the accelerator should produce straight from
// the definition of the layer (a 1-D valid convolution per kernel row and a
// dot product per neuron), without the shift register, the partitioned
// adders or the pipeline that the RTL uses. All results wrap to 8 bits.
package tb_wax_ref_pkg;
  import wax_pkg::*;

  function automatic row_t rand_row();
    row_t r;
    for (int i = 0; i < int'(ROW_BYTES); i++) r[i] = byte_t'($urandom);
    return r;
  endfunction

  // One WAXFlow-3 slice. Partition p of act holds 6 consecutive activations
  // of channel p; partition p of wgt holds kernel-row weights of channel p for
  // kernel 0 (bytes 0..2) and kernel 1 (bytes 3..5). Output x of kernel g is
  // sum over p and k of act[p][x+k] * wgt[p][3g+k], for x = 0..3, and lands in
  // entry slot*12 + g*6 + x of the psum row.
  function automatic row_t conv_slice(row_t act, row_t wgt, row_t psum, bit slot);
    row_t r = psum;
    for (int g = 0; g < int'(GROUPS); g++) begin
      for (int x = 0; x <= int'(PART_W - KW); x++) begin
        int acc = 0;
        for (int p = 0; p < int'(PARTS); p++)
          for (int k = 0; k < int'(KW); k++)
            acc += int'($signed(act[p*PART_W + x + k])) * int'($signed(wgt[p*PART_W + g*KW + k]));
        r[int'(slot)*PART_W*GROUPS + g*PART_W + x] =
          byte_t'(int'(r[int'(slot)*PART_W*GROUPS + g*PART_W + x]) + acc);
      end
    end
    return r;
  endfunction

  // Dot product of two rows, wrapped to 8 bits.
  function automatic byte_t dot(row_t a, row_t w);
    int acc = 0;
    for (int i = 0; i < int'(ROW_BYTES); i++)
      acc += int'($signed(a[i])) * int'($signed(w[i]));
    return byte_t'(acc);
  endfunction

  function automatic row_t row_add(row_t a, row_t b);
    row_t r;
    for (int i = 0; i < int'(ROW_BYTES); i++) r[i] = a[i] + b[i];
    return r;
  endfunction

endpackage
