// hamming_ref_pkg: reference model of the (11,4) Hamming code for the
// testbenches. Written generically: data bits fill the non-power-of-two
// positions 3..11 in order, and check bit 2^i makes every position whose
// number has bit i set even. It shares no code with the RTL.
package hamming_ref_pkg;

  function automatic logic [11:1] ref_encode(input logic [6:0] d);
    logic [11:1] c;
    int k;
    c = '0;
    k = 0;
    for (int p = 1; p <= 11; p++)
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k++;
      end
    for (int i = 0; i < 4; i++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= 11; p++)
        if (((p >> i) & 1) != 0 && p != (1 << i)) par ^= c[p];
      c[1 << i] = par;
    end
    return c;
  endfunction

  function automatic logic [3:0] ref_syndrome(input logic [11:1] c);
    logic [3:0] s;
    s = '0;
    for (int p = 1; p <= 11; p++)
      if (c[p]) s ^= 4'(p);
    return s;
  endfunction

endpackage
