// conv_ref_pkg: reference model for the testbenches. Computes the seven
// column sums of the direct-method convolution of two four-sample sequences
// with plain integer arithmetic: column 6 - (i + j) collects x[i] * h[j].
package conv_ref_pkg;
  import conv_pkg::*;

  function automatic conv_out_t conv_ref(input sample_t [NSEQ-1:0] x,
                                         input sample_t [NSEQ-1:0] h);
    int col [7];
    conv_out_t r;
    foreach (col[k]) col[k] = 0;
    for (int i = 0; i < NSEQ; i++)
      for (int j = 0; j < NSEQ; j++)
        col[6 - (i + j)] += int'(x[i]) * int'(h[j]);
    r.conv0 = 8'(col[0]);
    r.conv1 = 9'(col[1]);
    r.conv2 = 10'(col[2]);
    r.conv3 = 10'(col[3]);
    r.conv4 = 10'(col[4]);
    r.conv5 = 9'(col[5]);
    r.conv6 = 8'(col[6]);
    return r;
  endfunction
endpackage
