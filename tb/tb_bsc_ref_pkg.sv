// Reference model of the boundary shift code for the testbenches, written
// from the code's definition rather than from the RTL structure: build the
// pre-shifted word by duplicating every data bit and appending even parity
// at wire 0, then rotate the whole word right by one wire in odd cycles.
// Words are held LSB-aligned in fixed 129-bit vectors (data up to 64 bits).
package tb_bsc_ref_pkg;

  localparam int MAXN = 64;
  localparam int MAXW = 2 * MAXN + 1;

  typedef logic [MAXW-1:0] word_t;
  typedef logic [MAXN-1:0] data_t;

  function automatic word_t preshift(input data_t d, input int n);
    word_t p = '0;
    logic  par = 1'b0;
    for (int i = 0; i < n; i++) begin
      p[2*i+1] = d[i];
      p[2*i+2] = d[i];
      par ^= d[i];
    end
    p[0] = par;
    return p;
  endfunction

  // One-wire circular right shift of a w-bit word: wire 0 goes to the top.
  function automatic word_t rotr(input word_t p, input int w);
    word_t r = '0;
    for (int j = 0; j < w - 1; j++) r[j] = p[j+1];
    r[w-1] = p[0];
    return r;
  endfunction

  function automatic word_t encode(input data_t d, input int n, input bit odd);
    word_t p = preshift(d, n);
    return odd ? rotr(p, 2 * n + 1) : p;
  endfunction

  // Two neighbouring wires switching in opposite directions.
  function automatic int invalid_transitions(input word_t a, input word_t b,
                                             input int w);
    int cnt = 0;
    for (int k = 0; k + 1 < w; k++)
      if (a[k] != b[k] && a[k+1] != b[k+1] && b[k] != b[k+1]) cnt++;
    return cnt;
  endfunction

  function automatic int hamming(input word_t a, input word_t b);
    return $countones(a ^ b);
  endfunction

endpackage
