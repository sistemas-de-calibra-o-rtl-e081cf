// Reference models shared by the testbenches.
//
// The PRBS-14 sequence is produced here from its recurrence
// a[k] = a[k-14] ^ a[k-5] ^ a[k-3] ^ a[k-1] with a[0..13] = 1, a form
// independent of the shift-register code in the RTL, and the test
// patterns are built from it bit by bit, first bit first.
package tb_ref_pkg;

  typedef bit bitq_t[$];

  // First n bits of the PRBS-14 sequence.
  function automatic bitq_t prbs_bits(int n);
    bitq_t a;
    for (int k = 0; k < n; k++) begin
      if (k < 14) a.push_back(1'b1);
      else        a.push_back(a[k-14] ^ a[k-5] ^ a[k-3] ^ a[k-1]);
    end
    return a;
  endfunction

  // Marker of w bits (MSB first) followed by n PRBS bits.
  function automatic bitq_t marked_bits(logic [31:0] marker, int w, int n);
    bitq_t a, p;
    p = prbs_bits(n);
    for (int i = w-1; i >= 0; i--) a.push_back(marker[i]);
    foreach (p[i]) a.push_back(p[i]);
    return a;
  endfunction

  // 32-bit word made of bits q[s .. s+31], q[s] in the MSB.
  function automatic logic [31:0] word_at(bitq_t q, int s);
    logic [31:0] w;
    for (int i = 0; i < 32; i++) w[31-i] = q[s+i];
    return w;
  endfunction

  function automatic int popcount32(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
