// tb_ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL, as plain loops over bits and queues.
//
//   ref_transitions(w, n)  number of neighbouring bit pairs of w[n-1:0] that differ
//   ref_inv_odd(w, n)      w with bits 1, 3, 5, ... inverted
//   ref_gr_code(r, k)      Golomb-Rice code word of run length r, m = 2^k,
//                          as a queue of bits in sending order
//   ref_rle_frame(bits, k) run-length code of one frame (bits in sending
//                          order), closing an open run with a virtual '1'
package tb_ref_pkg;
  typedef bit bitq_t[$];

  function automatic int ref_transitions(input logic [31:0] w, input int n);
    int c = 0;
    for (int i = 1; i < n; i++) if (w[i] != w[i-1]) c++;
    return c;
  endfunction

  function automatic logic [31:0] ref_inv_odd(input logic [31:0] w, input int n);
    logic [31:0] r = w;
    for (int i = 1; i < n; i += 2) r[i] = ~w[i];
    return r;
  endfunction

  function automatic bitq_t ref_gr_code(input int r, input int k);
    bitq_t q;
    for (int i = 0; i < (r >> k); i++) q.push_back(1'b1);
    q.push_back(1'b0);
    for (int i = k - 1; i >= 0; i--) q.push_back(bit'((r >> i) & 1));
    return q;
  endfunction

  function automatic bitq_t ref_rle_frame(input bitq_t bits, input int k);
    bitq_t out, cw;
    int run = 0;
    foreach (bits[i]) begin
      if (bits[i]) begin
        cw = ref_gr_code(run, k);
        foreach (cw[j]) out.push_back(cw[j]);
        run = 0;
      end else begin
        run++;
        if (i == bits.size() - 1) begin
          cw = ref_gr_code(run, k);
          foreach (cw[j]) out.push_back(cw[j]);
        end
      end
    end
    return out;
  endfunction
endpackage
